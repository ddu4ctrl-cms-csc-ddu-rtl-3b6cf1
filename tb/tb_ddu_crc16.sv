// tb_ddu_crc16: random word streams against a long-division reference of the x^16+x^15+x^2+1
// CRC, with restarts through init and pauses through en.
module tb_ddu_crc16;
  import ddu_tb_pkg::*;
  logic clk = 0, rst = 1, init = 0, en = 0;
  logic [63:0] data;
  logic [15:0] crc, ref_crc;
  int checks = 0, failures = 0;
  ddu_crc16 dut (.*);
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0; ref_crc = 16'hFFFF;
    checks++; if (crc != 16'hFFFF) failures++;
    // Known value: one all-zero word after 0xFFFF start.
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      init = (t % 97 == 0); en = $urandom_range(0, 3) != 0; data = {$urandom, $urandom};
      @(posedge clk); #1;
      if (init) ref_crc = 16'hFFFF; else if (en) ref_crc = crc16_ref(ref_crc, data);
      checks++; if (crc != ref_crc) begin failures++; $display("crc %h exp %h", crc, ref_crc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
