// jtag_decode: user-instruction decoder of the JTAG control path.
//
// instr is the 6-bit user instruction held in the JTAG instruction register (already in the
// fabric clock domain). fsel has one line per opcode, high while that instruction is loaded; the
// read-out registers use it as their DVCENB. Three instructions act once instead of selecting a
// register: 1 (FPGA reset), 31 (toggle the CFEB calibration auto-L1A) and 33 (DDU-only L1A). For
// those, a single-cycle pulse is made when the instruction appears, and the decoder re-arms only
// after a NOOP (opcode 0) has been seen, so a glitch or a held instruction cannot fire twice.
// cal_auto_l1 is the toggled calibration-L1A enable; it is on after reset. The opcode table and
// the NOOP re-arm rule follow the documentation; the pulse length is this design's choice.
module jtag_decode
  import ddu_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [5:0]          instr,
  output logic [NUM_OPS-1:0]  fsel,
  output logic                soft_rst_pulse,
  output logic                vme_l1a_pulse,
  output logic                cal_auto_l1
);
  logic armed;
  logic is_toggle;

  always_comb begin
    fsel = '0;
    if (int'(instr) < NUM_OPS) fsel[instr] = 1'b1;
  end

  assign is_toggle = (instr == OP_RESET) || (instr == OP_CAL_TOGGLE) || (instr == OP_VME_L1A);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      armed          <= 1'b0;   // a NOOP is needed after reset
      soft_rst_pulse <= 1'b0;
      vme_l1a_pulse  <= 1'b0;
      cal_auto_l1    <= 1'b1;
    end else begin
      soft_rst_pulse <= 1'b0;
      vme_l1a_pulse  <= 1'b0;
      if (instr == OP_NOOP) armed <= 1'b1;
      else if (is_toggle && armed) begin
        armed <= 1'b0;
        if (instr == OP_RESET)     soft_rst_pulse <= 1'b1;
        if (instr == OP_VME_L1A)   vme_l1a_pulse  <= 1'b1;
        if (instr == OP_CAL_TOGGLE) cal_auto_l1   <= ~cal_auto_l1;
      end
    end
  end
endmodule
