// bus_match: bus-matching register that gathers narrow words into one wide word.
//
// Each cycle with ce high stores din in the next lane of the wide register, lowest lane first.
// When the last lane is written the completed word appears on dout and valid pulses for one
// cycle; the lane pointer then starts again at lane 0. clr (asynchronous) empties it. The
// documentation has a 16-to-64-bit and an 8-to-16-bit version (FD16-64CE, FD8-16CE), both with
// asynchronous clear and chip enable; the lane order and the valid pulse are this design's choice.
module bus_match #(
  parameter int IN_W  = 16,
  parameter int OUT_W = 64
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             ce,
  input  logic [IN_W-1:0]  din,
  output logic [OUT_W-1:0] dout,
  output logic             valid
);
  localparam int LANES = OUT_W / IN_W;
  localparam int LW    = (LANES > 1) ? $clog2(LANES) : 1;
  logic [OUT_W-1:0] acc;
  logic [LW-1:0]    lane;

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      acc <= '0; lane <= '0; dout <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (ce) begin
        acc[lane*IN_W +: IN_W] <= din;
        if (lane == LW'(LANES-1)) begin
          lane  <= '0;
          valid <= 1'b1;
          dout  <= acc;
          dout[(LANES-1)*IN_W +: IN_W] <= din;
        end else begin
          lane <= lane + 1'b1;
        end
      end
    end
  end
endmodule
