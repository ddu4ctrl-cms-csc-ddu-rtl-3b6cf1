// eth_crc32: Ethernet frame check sequence, two bytes per clock.
//
// The IEEE 802.3 CRC-32 (reflected polynomial 0xEDB88320, start value all ones). Each enabled
// cycle folds a 16-bit word whose upper byte is the earlier byte on the wire, each byte least
// significant bit first. crc is the running register; the frame check sequence is its
// complement, sent lowest byte first. The GbE framer of the DDU sends a CRC32 after the data;
// its definition is the standard one, not given further by the documentation. Reset is
// synchronous, like the framer's.
module eth_crc32 (
  input  logic        clk,
  input  logic        rst,
  input  logic        init,
  input  logic        en,
  input  logic [15:0] data,
  output logic [31:0] crc,
  output logic [31:0] fcs
);
  function automatic logic [31:0] crc_byte(input logic [31:0] c, input logic [7:0] b);
    logic [31:0] r;
    r = c;
    for (int i = 0; i < 8; i++) begin
      logic fb;
      fb = r[0] ^ b[i];
      r  = r >> 1;
      if (fb) r = r ^ 32'hEDB88320;
    end
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst)       crc <= '1;
    else if (init) crc <= '1;
    else if (en)   crc <= crc_byte(crc_byte(crc, data[15:8]), data[7:0]);
  end
  assign fcs = ~crc;
endmodule
