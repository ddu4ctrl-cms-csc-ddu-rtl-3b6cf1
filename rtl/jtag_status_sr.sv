// jtag_status_sr: capture-and-shift status read-out register for the JTAG user data path.
//
// Clocked only while its instruction is decoded (dvcenb) and the user scan chain is selected
// (sel = SEL2): CLKENA = DVCENB & SEL2. With shift low (NSHFT = not LSHFT) it captures the W-bit
// status word; with shift high it shifts right, filling from tdi, and presents bit 0 on tdo. The
// documentation uses 10-, 15-, 16-, 24- and 32-bit versions of this register; W selects the width.
module jtag_status_sr #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         dvcenb,
  input  logic         sel,
  input  logic         shift,
  input  logic         tdi,
  input  logic [W-1:0] status,
  output logic         tdo
);
  logic [W-1:0] sr;
  logic clkena;
  assign clkena = dvcenb & sel;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) sr <= '0;
    else if (clkena) sr <= shift ? {tdi, sr[W-1:1]} : status;
  end
  assign tdo = sr[0];
endmodule
