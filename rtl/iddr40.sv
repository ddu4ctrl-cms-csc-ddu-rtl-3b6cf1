// iddr40: 40-bit double-data-rate input register with asynchronous clear.
//
// din is sampled on both clock edges. The falling-edge sample becomes the lower 40 bits of the
// output word and the following rising-edge sample the upper 40 bits; the pair is presented as
// one 80-bit word q, registered on the rising edge. The width and the falling-edge timing of the
// lower five bytes follow the documentation; the order of the two halves in time is this
// design's choice.
module iddr40 #(
  parameter int W = 40
) (
  input  logic         clk,
  input  logic         clr,
  input  logic [W-1:0] din,
  output logic [2*W-1:0] q
);
  logic [W-1:0] fall;
  always_ff @(negedge clk or posedge clr) begin
    if (clr) fall <= '0;
    else     fall <= din;
  end
  always_ff @(posedge clk or posedge clr) begin
    if (clr) q <= '0;
    else     q <= {din, fall};
  end
endmodule
