// fiber_led: front-panel LED drivers for one optical input fiber.
//
// FOK LED: lit when the link is locked and error free (fok), blinking slowly when light is
// present but the link is not ready (present and not fok), off when no link is present. DAV LED:
// lit while this fiber's data is being transmitted. The blink is the top bit of a free-running
// BLINK_BITS-bit counter (about 0.4 s per phase at 40 MHz). LED meanings follow the documentation;
// the blink rate is this design's choice. Outputs are active high.
module fiber_led #(
  parameter int BLINK_BITS = 24
) (
  input  logic clk,
  input  logic rst,
  input  logic present,
  input  logic fok,
  input  logic dav,
  output logic fok_led,
  output logic dav_led
);
  logic [BLINK_BITS-1:0] cnt;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end
  assign fok_led = fok ? 1'b1 : (present ? cnt[BLINK_BITS-1] : 1'b0);
  assign dav_led = dav;
endmodule
