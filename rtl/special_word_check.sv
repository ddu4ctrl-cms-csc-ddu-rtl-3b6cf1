// special_word_check: vote and consistency check of the DMB "special word" bits.
//
// A 64-bit DMB word carries four 16-bit words; bits 15..12 of each mark header, trailer and
// other special words. For each of the four bit positions this block votes the four copies
// (set when 2 or more of 4 are set) and flags disagreement: NOTALL = ANY xor ALL, high when some
// but not all copies are set. With en high the voted nibble and the disagreement flags are
// latched (the "latched voted special bits" of the control word). Vote rule and NOTALL follow the
// documentation; the comb outputs next to the latched ones are this design's choice.
module special_word_check (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [63:0] data,
  output logic [3:0]  vb,        // voted bits 15..12, combinational
  output logic [3:0]  notall,    // copies disagree, combinational
  output logic [3:0]  lvb,       // latched vb
  output logic        lnotall    // latched: any bit position disagreed
);
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      logic [3:0] c;
      int unsigned n;
      for (int j = 0; j < 4; j++) c[j] = data[16*j + 12 + k];
      n = 0;
      for (int j = 0; j < 4; j++) n += c[j];
      vb[k]     = (n >= 2);
      notall[k] = (|c) ^ (&c);
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      lvb <= '0; lnotall <= 1'b0;
    end else if (en) begin
      lvb <= vb; lnotall <= |notall;
    end
  end
endmodule
