// tb_gbe_rx: RXDV is delayed one cycle, DO follows DOUT only while RXDV is high, and every four
// valid receive words make one 64-bit word, first word in the lowest lane.
module tb_gbe_rx;
  logic clk = 0, rst = 1, rxdv = 0, lrxdv, wv;
  logic [15:0] rx_dout, rx_do;
  logic [63:0] word;
  int checks = 0, failures = 0, nwords = 0;
  gbe_rx dut (.clk(clk), .rst(rst), .rxdv(rxdv), .rx_dout(rx_dout), .lrxdv(lrxdv), .rx_do(rx_do), .word(word), .word_valid(wv));
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [15:0] vals[$];
  logic prev_dv; logic [15:0] last_v;
  always @(posedge clk) if (!rst && wv) begin
    logic [63:0] e;
    e = {vals[3], vals[2], vals[1], vals[0]};
    repeat (4) void'(vals.pop_front());
    checks++; nwords++;
    if (word != e) begin failures++; $display("word %h exp %h", word, e); end
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0; prev_dv = 0; last_v = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      rxdv = ($urandom_range(0, 3) != 0); rx_dout = 16'($urandom);
      if (rxdv) begin vals.push_back(rx_dout); last_v = rx_dout; end
      @(posedge clk); #1;
      checks++; if (lrxdv != rxdv || rx_do != last_v) begin failures++; $display("dv/do"); end
    end
    checks++; if (nwords < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
