// kill_register: JTAG-loaded readout-path enable mask ("KillCh" register).
//
// Bit i = 1 keeps readout path i alive, 0 kills it. Bits [14:0] are the DMB input fibers, bit 16
// the ALCT path and bit 17 the TMB path; the other bits are carried but unused. A W-bit shift
// register is captured from the mask (check, opcode 13) or shifted from tdi (load, opcode 14)
// while selected; an update pulse with the load instruction copies it into the mask. Reset sets
// every path alive. Bit meanings and width follow the documentation; the all-alive reset value and
// the update-strobe loading are this design's choice.
module kill_register #(
  parameter int W = 20
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sel,
  input  logic         load,
  input  logic         check,
  input  logic         shift,
  input  logic         update,
  input  logic         tdi,
  output logic         tdo,
  output logic [W-1:0] kill_n     // 1 = alive
);
  logic [W-1:0] sr;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) sr <= '0;
    else if ((load | check) & sel) sr <= shift ? {tdi, sr[W-1:1]} : kill_n;
  end
  always_ff @(posedge clk or posedge rst) begin
    if (rst) kill_n <= '1;
    else if (update && load && sel) kill_n <= sr;
  end
  assign tdo = sr[0];
endmodule
