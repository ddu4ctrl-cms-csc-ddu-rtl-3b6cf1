// one_hot_sr: serial-in, parallel-out shift register that starts with a single one.
//
// Reset (asynchronous arst or synchronous srst) loads 1 into bit 0 and clears the others; each
// cycle with ce high shifts left and takes sli into bit 0. Feeding q[W-1] back into sli makes a
// circulating one-hot step sequencer. The documentation has 4- and 8-bit versions (SR4CE loading
// the one on sync reset, SR8CE on async clear); this module offers both resets.
module one_hot_sr #(
  parameter int W = 4
) (
  input  logic         clk,
  input  logic         arst,
  input  logic         srst,
  input  logic         ce,
  input  logic         sli,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or posedge arst) begin
    if (arst)      q <= W'(1);
    else if (srst) q <= W'(1);
    else if (ce)   q <= {q[W-2:0], sli};
  end
endmodule
