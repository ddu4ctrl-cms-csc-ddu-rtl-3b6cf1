// tb_jtag_status_sr: captures random status words and shifts them out, checking every bit, that
// the register holds while not selected and that tdi fills in from the top.
module tb_jtag_status_sr;
  localparam int W = 24;
  logic clk = 0, rst = 1, dvcenb = 0, sel = 0, shift = 0, tdi = 0, tdo;
  logic [W-1:0] status;
  int checks = 0, failures = 0;
  jtag_status_sr #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int t = 0; t < 20; t++) begin
      logic [W-1:0] v, got, fill;
      v = W'($urandom); fill = W'($urandom);
      @(negedge clk); status = v; dvcenb = 1; sel = 1; shift = 0;
      @(negedge clk); shift = 1; status = ~v;
      for (int i = 0; i < W; i++) begin
        got[i] = tdo; tdi = fill[i];
        if (i == 5) begin sel = 0; @(negedge clk); checks++; if (tdo != got[i]) failures++; sel = 1; end
        @(negedge clk);
      end
      checks++; if (got != v) begin failures++; $display("got %h exp %h", got, v); end
      for (int i = 0; i < W; i++) begin
        got[i] = tdo; @(negedge clk);
      end
      checks++; if (got != fill) begin failures++; $display("fill %h exp %h", got, fill); end
      dvcenb = 0; shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
