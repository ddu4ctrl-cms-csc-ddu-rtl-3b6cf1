// bx_orbit_reg: JTAG-programmable BX-per-orbit limit register.
//
// A 12-bit shift register STAT sits on the JTAG user data path. It is clocked when the register
// is selected (sel, the SEL2 line of the boundary-scan primitive) and either the load (opcode 29)
// or the read (opcode 30) instruction is active (CLKENA = (READ | LOAD) & SEL2). While shift is
// low it captures the current limit, while shift is high it shifts tdi in at the top and out at
// tdo from bit 0. An update pulse while the load instruction is active copies STAT into the
// limit register STATUS. Reset presets STATUS to 923 (0x39B, 924 BX per orbit). The structure
// (STAT shift register, FD12 register clocked by UPDATE with CE = LOAD, preset 923) follows the
// documentation; running it on the fabric clock with update as an enable is this design's choice.
module bx_orbit_reg #(
  parameter logic [11:0] DEFAULT_LIM = 12'd923
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sel,     // SEL2
  input  logic        load,    // load instruction (29) active
  input  logic        read,    // read instruction (30) active
  input  logic        shift,   // LSHFT
  input  logic        update,  // one-cycle UPDATE strobe
  input  logic        tdi,
  output logic        tdo,
  output logic [11:0] bx_lim   // STATUS[11:0]
);
  logic [11:0] stat;
  logic        clkena;
  assign clkena = (read | load) & sel;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) stat <= '0;
    else if (clkena) stat <= shift ? {tdi, stat[11:1]} : bx_lim;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) bx_lim <= DEFAULT_LIM;
    else if (update && load && sel) bx_lim <= stat;
  end

  assign tdo = stat[0];
endmodule
