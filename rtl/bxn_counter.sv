// bxn_counter: 12-bit bunch-crossing (BX) number counter.
//
// Counts one per LHC clock from 0 up to the BX limit and returns to 0 on the cycle after the
// limit, so an orbit is bx_lim+1 crossings long (3564 for the LHC with limit 3563 = 0xDEB, 924 for
// the SPS with limit 923 = 0x39B). The limit comes from bx_orbit_reg. bc0 marks the cycle with
// bxn == 0. Wrap rule and limits follow the documentation; the synchronous clear input (used for
// a BX0/BX reset) and the active-high asynchronous reset are this design's choice.
module bxn_counter (
  input  logic        clk,
  input  logic        rst,      // asynchronous, active high
  input  logic        clr,      // synchronous restart at 0
  input  logic [11:0] bx_lim,   // last BX number of the orbit
  output logic [11:0] bxn,
  output logic        bc0
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)                 bxn <= '0;
    else if (clr)            bxn <= '0;
    else if (bxn >= bx_lim)  bxn <= '0;
    else                     bxn <= bxn + 12'd1;
  end
  assign bc0 = (bxn == '0);
endmodule
