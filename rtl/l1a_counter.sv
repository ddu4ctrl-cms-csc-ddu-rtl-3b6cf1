// l1a_counter: 24-bit Level-1-Accept event number scaler.
//
// Increments on every accepted trigger, from the trigger link (l1a) or the DDU-only VME/JTAG
// trigger (vme_l1a); both on the same cycle count once. Cleared by reset or by a synchronous
// resync (sync_rst). The first event after a reset gets number 1. Width follows the documentation
// (JTAG opcode 2 reads a 24-bit scaler); counting from 1 and the merge of the two sources are
// this design's choice.
module l1a_counter #(
  parameter int W = 24
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sync_rst,
  input  logic         l1a,
  input  logic         vme_l1a,
  output logic [W-1:0] l1a_num,
  output logic         l1a_strobe  // the counter moved this cycle
);
  assign l1a_strobe = l1a | vme_l1a;
  always_ff @(posedge clk or posedge rst) begin
    if (rst)             l1a_num <= '0;
    else if (sync_rst)   l1a_num <= '0;
    else if (l1a_strobe) l1a_num <= l1a_num + 1'b1;
  end
endmodule
