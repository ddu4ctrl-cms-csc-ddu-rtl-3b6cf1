// ddu_crc16: CRC-16 of the DDU event, generator x^16 + x^15 + x^2 + 1 (0x8005).
//
// One 64-bit word per enabled cycle is folded into the remainder, most significant bit first,
// without reflection. init loads the start value. crc is the remainder after the last word. The
// polynomial follows the documentation; the bit order and the start value 0xFFFF are this
// design's choice (the text gives neither).
module ddu_crc16 #(
  parameter logic [15:0] INIT = 16'hFFFF
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        init,
  input  logic        en,
  input  logic [63:0] data,
  output logic [15:0] crc
);
  function automatic logic [15:0] next_crc(input logic [15:0] c, input logic [63:0] d);
    logic [15:0] r;
    r = c;
    for (int i = 63; i >= 0; i--) begin
      logic fb;
      fb = r[15] ^ d[i];
      r  = {r[14:0], 1'b0};
      if (fb) r = r ^ 16'h8005;
    end
    return r;
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       crc <= INIT;
    else if (init) crc <= INIT;
    else if (en)   crc <= next_crc(crc, data);
  end
endmodule
