// tb_led_debug_mux: random inputs in each LED mode against the signal assignment of the mode
// table, and the version display.
module tb_led_debug_mux;
  logic [3:0] mode; logic ver;
  logic we_n, push, pop, mt;
  logic [15:0] sd, dbg, la;
  logic [7:0] led_n;
  int checks = 0, failures = 0;
  led_debug_mux dut (.led_mode(mode), .show_version(ver), .we_n(we_n), .l1a_push(push), .l1a_pop(pop), .l1a_mt(mt),
    .sd_shift(sd), .first_dat(dbg[0]), .first_hdr(dbg[1]), .lsecond_hdr(dbg[2]), .stat_code(dbg[3]),
    .golddat(dbg[4]), .firstdat_err(dbg[5]), .second_hdr_first(dbg[6]), .lvb15(dbg[7]),
    .ldofw2(dbg[9]), .lgoodfw(dbg[10]), .dlfifo_mt(dbg[11]), .moredata(dbg[12]), .linl1err(dbg[13]),
    .l1a_error(dbg[14]), .single_error(dbg[15]), .led_n(led_n), .la(la));
  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [15:0] ela, rev; logic [7:0] eled;
      mode = 4'($urandom); ver = ($urandom_range(0, 3) == 0);
      {we_n, push, pop, mt} = 4'($urandom); sd = 16'($urandom); dbg = 16'($urandom);
      dbg[8] = dbg[4];   // GOLDDAT drives two header pins
      for (int k = 0; k < 16; k++) rev[15-k] = sd[k];
      eled = 8'hFF; ela = 0;
      if (ver) eled = ~8'd28; else if (mode == 10) eled = {4'hF, ~mt, ~pop, ~push, we_n};
      if (mode == 11) ela = rev; else if (mode == 15) ela = dbg;
      #1;
      checks++; if (led_n != eled || la != ela) begin failures++; $display("mode %0d led %h/%h la %h/%h", mode, led_n, eled, la, ela); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
