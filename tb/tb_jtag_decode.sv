// tb_jtag_decode: checks the one-hot select for every opcode, that toggled functions fire once
// per appearance only after a NOOP, and that the calibration enable toggles. A random phase then
// holds random instructions (mostly NOOP and the three toggled ones) for random times and compares
// the one-hot select, both pulses and the calibration enable every cycle with a model kept here.
module tb_jtag_decode;
  import ddu_pkg::*;
  logic clk = 0, rst = 1;
  logic [5:0] instr = 0;
  logic [NUM_OPS-1:0] fsel;
  logic srp, vlp, cal;
  int checks = 0, failures = 0, nres = 0, nvme = 0;
  jtag_decode dut (.clk(clk), .rst(rst), .instr(instr), .fsel(fsel), .soft_rst_pulse(srp), .vme_l1a_pulse(vlp), .cal_auto_l1(cal));
  always #5 clk = ~clk;
  always @(posedge clk) begin nres += srp; nvme += vlp; end
  initial begin #400_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic hold(input int op, input int n);
    @(negedge clk); instr = 6'(op); repeat (n) @(negedge clk);
  endtask
  initial begin
    @(negedge clk); rst = 0;
    for (int op = 0; op < 64; op++) begin
      instr = 6'(op); #1;
      checks++;
      if (op < NUM_OPS) begin if (fsel != (NUM_OPS'(1) << op)) failures++; end
      else if (fsel != '0) failures++;
      if (failures) $display("op %0d fsel %h", op, fsel);
      @(negedge clk);
    end
    // no NOOP after reset: the sweep above hit opcode 1 before opcode 0? it started at 0.
    instr = OP_RESET; rst = 1; @(negedge clk); rst = 0; nres = 0; nvme = 0;
    repeat (5) @(negedge clk);                      // not armed after reset
    checks++; if (nres != 0) begin failures++; $display("unarmed fired"); end
    hold(OP_NOOP, 2); hold(OP_RESET, 5);    // armed: one pulse
    checks++; if (nres != 1) begin failures++; $display("nres %0d", nres); end
    hold(OP_VME_L1A, 3);                    // no NOOP in between: nothing
    checks++; if (nvme != 0) begin failures++; $display("vme without noop"); end
    hold(OP_NOOP, 1); hold(OP_VME_L1A, 3); hold(OP_NOOP, 1); hold(OP_VME_L1A, 3);
    checks++; if (nvme != 2) begin failures++; $display("nvme %0d", nvme); end
    checks++; if (cal != 1) failures++;
    hold(OP_NOOP, 1); hold(OP_CAL_TOGGLE, 3);
    checks++; if (cal != 0) failures++;
    hold(OP_NOOP, 1); hold(OP_CAL_TOGGLE, 3);
    checks++; if (cal != 1) failures++;
    // random phase
    begin
      logic m_armed, m_cal, m_sr, m_vl;
      int op, n_fire;
      m_armed = 0; m_cal = cal; n_fire = 0;
      for (int k = 0; k < 600; k++) begin
        case ($urandom_range(0, 4))
          0: op = OP_NOOP;
          1: op = OP_RESET;
          2: op = OP_CAL_TOGGLE;
          3: op = OP_VME_L1A;
          default: op = $urandom_range(0, 63);
        endcase
        instr = 6'(op);
        repeat ($urandom_range(1, 4)) begin
          #1;
          checks++;
          if (fsel != ((op < NUM_OPS) ? (NUM_OPS'(1) << op) : '0)) begin failures++; $display("op %0d fsel %h", op, fsel); end
          @(posedge clk);
          m_sr = 0; m_vl = 0;
          if (op == OP_NOOP) m_armed = 1;
          else if (m_armed && (op == OP_RESET || op == OP_CAL_TOGGLE || op == OP_VME_L1A)) begin
            m_armed = 0; n_fire++;
            m_sr = (op == OP_RESET); m_vl = (op == OP_VME_L1A);
            if (op == OP_CAL_TOGGLE) m_cal = !m_cal;
          end
          @(negedge clk);
          checks++;
          if (srp != m_sr || vlp != m_vl || cal != m_cal) begin
            failures++; $display("k %0d op %0d: pulses %b%b cal %b, expected %b%b %b", k, op, srp, vlp, cal, m_sr, m_vl, m_cal);
          end
        end
      end
      $display("toggled instructions acted %0d times", n_fire);
      checks++; if (n_fire < 50) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
