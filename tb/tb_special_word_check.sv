// tb_special_word_check: random 64-bit words against a vote/consistency model computed per
// 16-bit word, plus the latching enable.
module tb_special_word_check;
  logic clk = 0, rst = 1, en = 0;
  logic [63:0] data;
  logic [3:0] vb, notall, lvb;
  logic lnotall;
  int checks = 0, failures = 0;
  special_word_check dut (.*);
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [3:0] ev, en_, nib[4];
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      data = {$urandom, $urandom};
      if (t % 3 == 0) begin logic [3:0] c; c = 4'($urandom); for (int j = 0; j < 4; j++) data[16*j+12 +: 4] = c; end
      en = $urandom_range(0, 1);
      for (int j = 0; j < 4; j++) nib[j] = data[16*j+12 +: 4];
      for (int k = 0; k < 4; k++) begin
        int n; n = nib[0][k] + nib[1][k] + nib[2][k] + nib[3][k];
        ev[k] = (n >= 2); en_[k] = (n != 0) && (n != 4);
      end
      #1;
      checks++; if (vb != ev || notall != en_) begin failures++; $display("vb %h/%h na %h/%h", vb, ev, notall, en_); end
      if (en) begin
        @(posedge clk); #1;
        checks++; if (lvb != ev || lnotall != |en_) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
