// gbe_rx: capture stage of the GbE receive path.
//
// The transceiver's receive-data-valid flag RXDV is registered to LRXDV; the 16-bit receive word
// DOUT is registered to DO on every cycle with RXDV high (FD16CE with CE = RXDV). The captured
// words are then gathered four at a time into 64-bit words by a 16-to-64 bus-matching register.
// Registers and enables follow the documentation. Removing the preamble and the CRC bytes from the
// valid window is not part of it: the documentation lists it as still to do.
module gbe_rx (
  input  logic        clk,
  input  logic        rst,
  input  logic        rxdv,
  input  logic [15:0] rx_dout,
  output logic        lrxdv,
  output logic [15:0] rx_do,
  output logic [63:0] word,
  output logic        word_valid
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      lrxdv <= 1'b0; rx_do <= '0;
    end else begin
      lrxdv <= rxdv;
      if (rxdv) rx_do <= rx_dout;
    end
  end

  bus_match #(.IN_W(16), .OUT_W(64)) u_match (
    .clk(clk), .clr(rst), .ce(lrxdv), .din(rx_do), .dout(word), .valid(word_valid)
  );
endmodule
