// tb_eth_crc32: random frames of byte pairs against a bit-serial CRC-32 model; then the frame's
// FCS is fed through the CRC as well, which must leave the standard Ethernet residue 0xDEBB20E3.
module tb_eth_crc32;
  import ddu_tb_pkg::*;
  logic clk = 0, rst = 1, init = 0, en = 0;
  logic [15:0] data;
  logic [31:0] crc, fcs, r;
  int checks = 0, failures = 0;
  eth_crc32 dut (.*);
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int f = 0; f < 50; f++) begin
      int n;
      logic [31:0] f_fcs;
      n = $urandom_range(2, 40);
      @(negedge clk); init = 1; @(negedge clk); init = 0; r = '1;
      for (int i = 0; i < n; i++) begin
        data = 16'($urandom); en = 1;
        r = crc32_byte(crc32_byte(r, data[15:8]), data[7:0]);
        @(negedge clk);
        checks++; if (crc != r) begin failures++; $display("crc %h exp %h", crc, r); end
      end
      f_fcs = fcs;
      checks++; if (f_fcs != ~r) failures++;
      data = {f_fcs[7:0], f_fcs[15:8]}; @(negedge clk);
      data = {f_fcs[23:16], f_fcs[31:24]}; @(negedge clk);
      en = 0;
      checks++; if (crc != 32'hDEBB20E3) begin failures++; $display("residue %h", crc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
