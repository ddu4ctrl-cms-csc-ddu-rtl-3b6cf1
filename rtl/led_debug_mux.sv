// led_debug_mux: selects what the front-panel LEDs and the 16-bit logic-analyser header show.
//
// The LED mode (a switch setting) chooses the source, as a set of bus drivers enabled per mode:
//   mode 10: LED[3:0] show the output-FIFO write enable and the L1A FIFO push, pop and empty lines
//            (WE is active low at the input and is inverted like the others, LEDs are active low).
//   mode 11: the logic-analyser header LA[15:0] shows the serial-data shift register SD_SHIFT[0:15]
//            (SD_SHIFT[0] on LA[15]).
//   mode 15: LA[15:0] shows the event-builder debug lines listed on the port below.
//   version: with the version switch on, the LEDs show the firmware version number.
// Otherwise the LEDs are dark and LA is 0 (the original leaves the bus undriven). The signal
// assignment per mode follows the documentation's schematic pages; the default state, the
// 8-LED width and the version display format are this design's choice.
module led_debug_mux #(
  parameter logic [7:0] VERSION = 8'd28
) (
  input  logic [3:0]  led_mode,
  input  logic        show_version,
  // mode 10
  input  logic        we_n,
  input  logic        l1a_push,
  input  logic        l1a_pop,
  input  logic        l1a_mt,
  // mode 11
  input  logic [15:0] sd_shift,   // SD_SHIFT[0:15] as bit 0..15
  // mode 15
  input  logic        first_dat,
  input  logic        first_hdr,
  input  logic        lsecond_hdr,
  input  logic        stat_code,
  input  logic        golddat,
  input  logic        firstdat_err,
  input  logic        second_hdr_first,
  input  logic        lvb15,
  input  logic        ldofw2,
  input  logic        lgoodfw,
  input  logic        dlfifo_mt,
  input  logic        moredata,
  input  logic        linl1err,
  input  logic        l1a_error,
  input  logic        single_error,
  output logic [7:0]  led_n,      // active low
  output logic [15:0] la
);
  always_comb begin
    led_n = '1;
    la    = '0;
    if (show_version) led_n = ~VERSION;
    else if (led_mode == 4'd10) led_n[3:0] = ~{l1a_mt, l1a_pop, l1a_push, ~we_n};
    if (led_mode == 4'd11) begin
      for (int k = 0; k < 16; k++) la[15-k] = sd_shift[k];
    end else if (led_mode == 4'd15) begin
      la = {single_error, l1a_error, linl1err, moredata,
            dlfifo_mt, lgoodfw, ldofw2, golddat,
            lvb15, second_hdr_first, firstdat_err, golddat,
            stat_code, lsecond_hdr, first_hdr, first_dat};
    end
  end
endmodule
