// tb_l1a_counter: random triggers from both sources against a reference count, and the resync.
module tb_l1a_counter;
  logic clk = 0, rst = 1, sync_rst = 0, l1a = 0, vme = 0, strobe;
  logic [23:0] num;
  int checks = 0, failures = 0, exp_n = 0;
  l1a_counter dut (.clk(clk), .rst(rst), .sync_rst(sync_rst), .l1a(l1a), .vme_l1a(vme), .l1a_num(num), .l1a_strobe(strobe));
  always #5 clk = ~clk;
  initial begin #200_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++; if (num != 24'(exp_n)) begin failures++; $display("n %0d exp %0d", num, exp_n); end
      l1a = $urandom_range(0, 1); vme = ($urandom_range(0, 7) == 0);
      sync_rst = (i == 1500);
      @(posedge clk); #1;
      exp_n = (i == 1500) ? 0 : exp_n + ((l1a | vme) ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
