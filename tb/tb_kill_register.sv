// tb_kill_register: the JTAG-loaded fiber kill mask (20 bits here).
//
// All paths must be alive after reset. Then 200 random scans follow, each either a load (the new
// mask is shifted in and takes effect on the update strobe) or a check (the mask is read back and
// must stay unchanged). Every scan compares each bit shifted out with the mask a model of the
// register holds, and the mask output with the model after the update. Some scans are run with
// the select line low, which must neither shift nor update.
module tb_kill_register;
  localparam int W = 20;
  logic clk = 0, rst = 1, sel = 0, load = 0, check = 0, shift = 0, update = 0, tdi = 0, tdo;
  logic [W-1:0] kill_n;
  int checks = 0, failures = 0;
  int n_load = 0, n_check = 0, n_unsel = 0;
  kill_register #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // capture, W shift cycles (bit 0 first), update strobe
  task automatic scan(input logic s, input logic ld, input logic [W-1:0] din, output logic [W-1:0] dout);
    @(negedge clk); sel = s; load = ld; check = !ld; shift = 0;
    @(negedge clk); shift = 1;
    for (int i = 0; i < W; i++) begin dout[i] = tdo; tdi = din[i]; @(negedge clk); end
    shift = 0; update = 1; @(negedge clk); update = 0; sel = 0; load = 0; check = 0;
  endtask

  logic [W-1:0] r, d, model;
  logic s, ld;
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    model = '1;
    checks++; if (kill_n != model) failures++;
    for (int n = 0; n < 200; n++) begin
      s  = ($urandom_range(0, 7) != 0);
      ld = $urandom_range(0, 1);
      d  = W'($urandom);
      scan(s, ld, d, r);
      if (s) begin
        for (int i = 0; i < W; i++) begin checks++; if (r[i] != model[i]) failures++; end
        if (ld) begin model = d; n_load++; end else n_check++;
      end else n_unsel++;
      checks++;
      if (kill_n != model) begin failures++; $display("scan %0d: mask %h expected %h", n, kill_n, model); end
    end
    $display("loads=%0d checks=%0d unselected=%0d", n_load, n_check, n_unsel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
