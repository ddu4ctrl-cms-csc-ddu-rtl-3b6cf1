// tb_bxn_counter: checks the BX counter against a reference count for the SPS (923) and LHC
// (3563) limits, a limit lowered while counting, and the synchronous clear.
module tb_bxn_counter;
  logic clk = 0, rst = 1, clr = 0;
  logic [11:0] lim, bxn;
  logic bc0;
  int checks = 0, failures = 0;
  int exp_bx, wraps;
  bxn_counter dut (.clk(clk), .rst(rst), .clr(clr), .bx_lim(lim), .bxn(bxn), .bc0(bc0));
  always #5 clk = ~clk;
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      checks++;
      if (bxn != 12'(exp_bx) || bc0 != (exp_bx == 0)) begin
        failures++; $display("bx mismatch: got %0d exp %0d", bxn, exp_bx);
      end
      @(posedge clk);
      if (clr) exp_bx = 0;
      else exp_bx = (exp_bx >= int'(lim)) ? 0 : exp_bx + 1;
      if (exp_bx == 0) wraps++;
      @(negedge clk);
    end
  endtask
  initial begin
    lim = 12'd923; exp_bx = 0; wraps = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    run(3000);                       // three SPS orbits of 924
    checks++; if (wraps != 3) begin failures++; $display("wraps %0d", wraps); end
    lim = 12'd3563; run(8000);
    lim = 12'd5; run(40);
    clr = 1; run(1); clr = 0; run(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
