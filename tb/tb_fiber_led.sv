// tb_fiber_led: lit with link OK, blinking (both states seen, period 2^BLINK_BITS) with light but
// no link, off without a link; DAV LED follows its input.
module tb_fiber_led;
  logic clk = 0, rst = 1, present = 0, fok = 0, dav = 0, fl, dl;
  int checks = 0, failures = 0;
  fiber_led #(.BLINK_BITS(4)) dut (.clk(clk), .rst(rst), .present(present), .fok(fok), .dav(dav), .fok_led(fl), .dav_led(dl));
  always #5 clk = ~clk;
  initial begin #100_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int on, tog; logic prev;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 40; i++) begin @(negedge clk); checks++; if (fl != 0) begin failures++; $display("off: led on"); end end
    fok = 1; present = 1;
    for (int i = 0; i < 40; i++) begin @(negedge clk); checks++; if (fl != 1) begin failures++; $display("lit: led off"); end end
    fok = 0; on = 0; tog = 0; prev = fl;
    for (int i = 0; i < 64; i++) begin @(negedge clk); on += fl; if (fl != prev) tog++; prev = fl; end
    checks++; if (on != 32 || tog < 7 || tog > 9) begin failures++; $display("blink on=%0d tog=%0d", on, tog); end
    for (int i = 0; i < 10; i++) begin dav = $urandom_range(0, 1); #1; checks++; if (dl != dav) begin failures++; $display("dav"); end @(negedge clk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
