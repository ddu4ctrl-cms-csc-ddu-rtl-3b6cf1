// tb_bx_orbit_reg: the JTAG-loaded bunch-crossing limit.
//
// After reset the limit must be the power-up value 923. Then 200 random scans follow, each either
// a load (a new 12-bit limit is shifted in and takes effect on the update strobe) or a read (the
// limit is shifted out and must stay unchanged). Each bit shifted out is compared with a model of
// the register, and the limit output with the model after each update. Some scans are run with
// the select line low, which must change nothing.
module tb_bx_orbit_reg;
  logic clk = 0, rst = 1, sel = 0, load = 0, read = 0, shift = 0, update = 0, tdi = 0, tdo;
  logic [11:0] lim;
  int checks = 0, failures = 0;
  int n_load = 0, n_read = 0, n_unsel = 0;
  bx_orbit_reg dut (.*, .bx_lim(lim));
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic scan(input logic s, input logic ld, input logic [11:0] din, output logic [11:0] dout);
    @(negedge clk); sel = s; load = ld; read = !ld; shift = 0;   // capture
    @(negedge clk); shift = 1;
    for (int i = 0; i < 12; i++) begin
      dout[i] = tdo; tdi = din[i];
      @(negedge clk);
    end
    shift = 0; update = 1; @(negedge clk); update = 0; sel = 0; load = 0; read = 0;
  endtask

  logic [11:0] r, d, model;
  logic s, ld;
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    model = 12'd923;
    checks++; if (lim != model) failures++;
    for (int n = 0; n < 200; n++) begin
      s  = ($urandom_range(0, 7) != 0);
      ld = $urandom_range(0, 1);
      d  = 12'($urandom);
      scan(s, ld, d, r);
      if (s) begin
        for (int i = 0; i < 12; i++) begin checks++; if (r[i] != model[i]) failures++; end
        if (ld) begin model = d; n_load++; end else n_read++;
      end else n_unsel++;
      checks++;
      if (lim != model) begin failures++; $display("scan %0d: limit %0d expected %0d", n, lim, model); end
    end
    $display("loads=%0d reads=%0d unselected=%0d", n_load, n_read, n_unsel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
