// tb_one_hot_sr: both resets load a single one, the one circulates when fed back, and serial data
// shifts in at bit 0. A random phase then drives the clock enable, the synchronous reset, the
// feedback choice and the serial input at random for 2000 cycles against a model kept here.
module tb_one_hot_sr;
  logic clk = 0, arst = 0, srst = 0, ce = 0, sli;
  logic [7:0] q;
  int checks = 0, failures = 0;
  logic fb = 1;
  one_hot_sr #(.W(8)) dut (.clk(clk), .arst(arst), .srst(srst), .ce(ce), .sli(fb ? q[7] : sli), .q(q));
  always #5 clk = ~clk;
  initial begin #100_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [7:0] e;
    #1 arst = 1; #1; checks++; if (q != 8'h01) failures++;
    @(negedge clk); arst = 0; ce = 1; e = 8'h01;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); e = {e[6:0], e[7]};
      checks++; if (q != e) begin failures++; $display("q %h exp %h", q, e); end
    end
    ce = 0; @(negedge clk); checks++; if (q != e) failures++;
    srst = 1; @(negedge clk); srst = 0; checks++; if (q != 8'h01) failures++;
    fb = 0; ce = 1; e = 8'h01;
    for (int i = 0; i < 20; i++) begin
      sli = $urandom_range(0, 1); @(negedge clk); e = {e[6:0], sli};
      checks++; if (q != e) failures++;
    end
    for (int i = 0; i < 2000; i++) begin
      ce = $urandom_range(0, 1); srst = ($urandom_range(0, 15) == 0);
      fb = $urandom_range(0, 1); sli = $urandom_range(0, 1);
      #1;
      if (srst) e = 8'h01;
      else if (ce) e = {e[6:0], fb ? e[7] : sli};
      @(negedge clk);
      checks++; if (q != e) begin failures++; $display("cycle %0d: q %h exp %h", i, q, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
