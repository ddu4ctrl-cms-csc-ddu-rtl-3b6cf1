// sync_fifo: single-clock first-word-fall-through FIFO, used as the L1A FIFO.
//
// Each accepted trigger pushes {L1A number, BXN}; the event builder pops one entry per event it
// reads out. dout shows the oldest entry whenever empty is low. Flags: empty (L1A_MT), full
// (L1A_FF) and afull (L1A_AF, at AF_LEVEL entries or more). A push while full is dropped and
// counted as an overflow pulse; a pop while empty is ignored. Depth, width and the almost-full
// level are not given by the documentation and are this design's choice.
module sync_fifo #(
  parameter int W        = 36,
  parameter int DEPTH    = 16,
  parameter int AF_LEVEL = DEPTH - 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic         afull,
  output logic         overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_push, do_pop;

  assign empty    = (count == 0);
  assign full     = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign afull    = (count >= AF_LEVEL[$clog2(DEPTH+1)-1:0]);
  assign do_push  = push && !full;
  assign do_pop   = pop && !empty;
  assign overflow = push && full;
  assign dout     = mem[rp];

  always_ff @(posedge clk) if (do_push) mem[wp] <= din;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end
endmodule
