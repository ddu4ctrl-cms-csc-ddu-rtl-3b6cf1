// ddu_tb_pkg: reference models shared by the DDU testbenches.
//
// crc16_ref folds 64-bit words into the x^16+x^15+x^2+1 remainder one bit at a time using a
// polynomial long division written independently of the RTL. crc32_byte is a bit-serial IEEE
// 802.3 CRC step. dmb_block builds a synthetic DMB data block: a first word whose four 16-bit
// words all carry special code 0x9 and the L1A number in HDR2/HDR3, n_mid body words with codes
// other than 0xE, and a last word with code 0xE in all four 16-bit words.
package ddu_tb_pkg;

  function automatic logic [15:0] crc16_ref(input logic [15:0] c, input logic [63:0] d);
    // Long division of (c * x^64 xor d * x^16) by the generator, kept as a 80-bit shift.
    logic [79:0] m;
    m = {c, 64'd0} ^ {d, 16'd0};
    for (int i = 79; i >= 16; i--)
      if (m[i]) m[i -: 17] = m[i -: 17] ^ 17'h18005;
    return m[15:0];
  endfunction

  function automatic logic [31:0] crc32_byte(input logic [31:0] c, input logic [7:0] b);
    logic [31:0] r;
    r = c ^ {24'd0, b};
    for (int i = 0; i < 8; i++) r = r[0] ? ((r >> 1) ^ 32'hEDB88320) : (r >> 1);
    return r;
  endfunction

  function automatic logic [63:0] code_word(input logic [3:0] code, input logic [47:0] body);
    return {code, body[47:36], code, body[35:24], code, body[23:12], code, body[11:0]};
  endfunction

  typedef logic [63:0] word_q_t[$];

  function automatic word_q_t dmb_block(input logic [23:0] l1a, input int n_mid, input int seed);
    word_q_t q;
    logic [3:0] c;
    q.push_back({4'h9, 12'(seed), 4'h9, l1a[23:12], 4'h9, l1a[11:0], 4'h9, 12'(seed + 1)});
    for (int k = 0; k < n_mid; k++) begin
      c = 4'((seed + k) % 14);           // 0..13, never 0xE
      if (c == 4'h9) c = 4'h7;
      q.push_back(code_word(c, {seed[15:0] + 16'(k), 32'(k * 2654435761)}));
    end
    q.push_back(code_word(4'hE, 48'(seed)));
    return q;
  endfunction

endpackage
