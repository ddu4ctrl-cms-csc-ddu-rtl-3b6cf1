// tb_fmm_ctrl: BUSY in reset, each input group mapped to its FMM bit one cycle later, Error held
// after a critical error until reset, and the two-stage REAL_FMM synchroniser. A random phase then
// drives every input at random for 2000 cycles and compares the FMM word, the gathered full and
// warning vectors and the received TTS state each cycle with a model kept here.
module tb_fmm_ctrl;
  logic clk = 0, softrst = 1, busy_in = 0, l1a_ff = 0, ff = 0, l1a_af = 0, paf = 0, crit = 0;
  logic [3:0] rfull = 0, rwarn = 0, real_fmm = 0, fmm, tts;
  logic [5:0] inf, inw;
  int checks = 0, failures = 0;
  fmm_ctrl dut (.clk(clk), .softrst(softrst), .busy_in(busy_in), .rd_ctrl_full(rfull), .l1a_ff(l1a_ff), .ff(ff),
    .rd_ctrl_warn(rwarn), .l1a_af(l1a_af), .paf(paf), .crit_err(crit), .real_fmm(real_fmm),
    .in_rd_full(inf), .in_rd_warn(inw), .fmm(fmm), .tts_stat(tts));
  always #5 clk = ~clk;
  initial begin #200_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic expect_fmm(input logic [3:0] e, input string what);
    @(negedge clk); @(negedge clk);
    checks++; if (fmm !== e) begin failures++; $display("%s: fmm %b exp %b", what, fmm, e); end
  endtask
  initial begin
    @(negedge clk);
    checks++; if (fmm != 4'b0001) failures++;
    softrst = 0;
    expect_fmm(4'b0000, "ready");
    for (int k = 0; k < 4; k++) begin rfull = 4'(1 << k); expect_fmm(4'b0100, "rdfull"); end
    rfull = 0; l1a_ff = 1; expect_fmm(4'b0100, "l1a_ff");
    checks++; if (inf != 6'b010000) failures++;
    l1a_ff = 0; ff = 1; expect_fmm(4'b0100, "ff"); ff = 0;
    rwarn = 4'b0010; expect_fmm(4'b0010, "warn"); rwarn = 0;
    l1a_af = 1; expect_fmm(4'b0010, "l1a_af"); l1a_af = 0;
    paf = 1; expect_fmm(4'b0010, "paf");
    checks++; if (inw != 6'b100000) failures++;
    paf = 0;
    busy_in = 1; expect_fmm(4'b0001, "busy"); busy_in = 0;
    @(negedge clk); crit = 1; @(negedge clk); crit = 0;
    expect_fmm(4'b1000, "err held");
    real_fmm = 4'b1010; @(negedge clk);
    checks++; if (tts == 4'b1010) failures++;       // not yet: two stages
    @(negedge clk);
    checks++; if (tts != 4'b1010) failures++;
    softrst = 1; @(negedge clk); softrst = 0;
    expect_fmm(4'b0000, "after reset");
    // random phase: model registers updated at each rising edge
    begin
      logic [3:0] m_fmm, m_t1, m_t2;
      logic m_err;
      logic [5:0] ef, ew;
      m_fmm = fmm; m_t1 = real_fmm; m_t2 = tts; m_err = 0;
      for (int t = 0; t < 2000; t++) begin
        busy_in = ($urandom_range(0, 3) == 0);
        rfull = ($urandom_range(0, 2) == 0) ? 4'($urandom) : 4'h0;
        rwarn = ($urandom_range(0, 2) == 0) ? 4'($urandom) : 4'h0;
        l1a_ff = ($urandom_range(0, 5) == 0); ff = ($urandom_range(0, 5) == 0);
        l1a_af = ($urandom_range(0, 5) == 0); paf = ($urandom_range(0, 5) == 0);
        crit = (t > 1000) && ($urandom_range(0, 200) == 0);
        real_fmm = 4'($urandom);
        ef = {ff, l1a_ff, rfull};
        ew = {paf, l1a_af, rwarn};
        #1;
        checks++; if (inf != ef || inw != ew) begin failures++; $display("gathered %b %b", inf, inw); end
        @(posedge clk);
        m_fmm = {m_err | crit, |ef, |ew, busy_in};
        if (crit) m_err = 1;
        m_t2 = m_t1; m_t1 = real_fmm;
        @(negedge clk);
        checks++; if (fmm != m_fmm) begin failures++; $display("cycle %0d: fmm %b exp %b", t, fmm, m_fmm); end
        checks++; if (tts != m_t2) begin failures++; $display("cycle %0d: tts %b exp %b", t, tts, m_t2); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
