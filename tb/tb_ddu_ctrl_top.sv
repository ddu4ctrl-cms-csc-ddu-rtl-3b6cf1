// tb_ddu_ctrl_top: end-to-end test of the DDU control FPGA with four fibers, short timeouts, a
// four-entry L1A FIFO and 64-byte Ethernet packets.
//
// Models around the design: four first-word-fall-through input FIFOs, a dual-clock GbE FIFO
// (written on clk, read on rclk), an S-Link that is full at random, and a JTAG driver that sets the
// user instruction and scans the selected register. Each trigger is given a DMB block per fiber
// (good, missing, cut short or carrying a wrong L1A number); the expected DDU event is rebuilt here
// (header with the L1A number counted here and the bunch crossing number followed here from the
// bc0 output, the blocks, trailer word count and CRC-16) and compared with the S-Link output. The
// Ethernet stream is parsed and its data must equal the S-Link stream word for word.
// Mechanisms that must each happen at least once: S-Link stall, start timeout, end timeout, L1A
// mismatch, special-bit disagreement (count and fiber flags read back over JTAG), killed fiber
// (loaded over JTAG), dump mode, VME (JTAG) L1A, L1A FIFO full with FMM lost-sync/warning and a
// lost trigger with FMM busy, FMM error, BX wrap at a JTAG-loaded limit, soft reset, calibration
// toggle, GbE packet split at the byte limit and GbE filler.
module tb_ddu_ctrl_top;
  import ddu_pkg::*;
  import ddu_tb_pkg::*;
  localparam int NF = 4, STMO = 16, ETMO = 60, L1D = 4, MAXB = 64, GWAIT = 40;

  logic clk = 0, rclk = 0, rst = 1;
  always #5 clk = ~clk;
  always #7 rclk = ~rclk;

  logic l1a = 0, dump_mode = 0, cal_mode = 0, cal_auto_l1, bc0;
  logic [3:0] mode_sw = 0;
  logic version_sw = 0;
  logic [15:0] board_id = 16'hC35A;
  logic [NF-1:0][63:0] fifo_data;
  logic [NF-1:0] fifo_empty, fifo_ren, fiber_ok = '1, fiber_present = '1;
  logic [3:0][3:0] rd_ctrl_stat = '0;
  logic [3:0] real_fmm = 0, fmm, tts_stat;
  logic slink_ff_n = 1, dcc_paf_n = 1, slink_wen, slink_ctrl;
  logic [63:0] slink_data;
  logic [64:0] gfifo_wdata, gfifo_rdata;
  logic gfifo_wen, gfifo_paf_n = 1, gfifo_empty, gfifo_pae_n, gfifo_ren;
  logic [15:0] gbe_txdata;
  logic [1:0] gbe_txcharisk;
  logic gbe_rxdv = 0, gbe_rx_valid;
  logic [15:0] gbe_rxdata = 0;
  logic [63:0] gbe_rx_word;
  logic [39:0] ddr_in = 0;
  logic [79:0] ddr_word;
  logic [5:0] jtag_instr = 0;
  logic jtag_sel = 0, jtag_shift = 0, jtag_update = 0, jtag_tdi = 0, jtag_tdo;
  logic [NF-1:0] fok_led, dav_led;
  logic [7:0] led_n;
  logic [15:0] la;

  ddu_ctrl_top #(
    .NFIB(NF), .START_TMO(STMO), .CAL_START_TMO(2 * STMO), .END_TMO(ETMO), .L1A_DEPTH(L1D),
    .MAX_DATA_BYTES(MAXB), .GBE_WAIT_CYC(GWAIT), .BLINK_BITS(4)
  ) dut (
    .clk(clk), .rst(rst), .rclk(rclk), .l1a(l1a), .dump_mode(dump_mode), .cal_mode(cal_mode),
    .cal_auto_l1(cal_auto_l1), .bc0(bc0), .mode_sw(mode_sw), .version_sw(version_sw),
    .board_id(board_id), .fifo_data(fifo_data), .fifo_empty(fifo_empty), .fifo_ren(fifo_ren),
    .fiber_ok(fiber_ok), .fiber_present(fiber_present), .in_fifo_afull(1'b0), .in_fifo_full(1'b0),
    .rd_ctrl_stat(rd_ctrl_stat), .real_fmm(real_fmm), .fmm(fmm), .tts_stat(tts_stat),
    .slink_ff_n(slink_ff_n), .dcc_paf_n(dcc_paf_n), .slink_data(slink_data), .slink_wen(slink_wen),
    .slink_ctrl(slink_ctrl), .gfifo_wdata(gfifo_wdata), .gfifo_wen(gfifo_wen),
    .gfifo_paf_n(gfifo_paf_n), .gfifo_rdata(gfifo_rdata), .gfifo_empty(gfifo_empty),
    .gfifo_pae_n(gfifo_pae_n), .gfifo_ren(gfifo_ren), .gbe_txdata(gbe_txdata),
    .gbe_txcharisk(gbe_txcharisk), .gbe_rxdv(gbe_rxdv), .gbe_rxdata(gbe_rxdata),
    .gbe_rx_word(gbe_rx_word), .gbe_rx_valid(gbe_rx_valid), .ddr_in(ddr_in), .ddr_word(ddr_word),
    .jtag_instr(jtag_instr), .jtag_sel(jtag_sel), .jtag_shift(jtag_shift),
    .jtag_update(jtag_update), .jtag_tdi(jtag_tdi), .jtag_tdo(jtag_tdo), .fok_led(fok_led),
    .dav_led(dav_led), .led_n(led_n), .la(la)
  );

  int checks = 0, failures = 0;
  int n_stall = 0, n_stmo = 0, n_etmo = 0, n_mism = 0, n_kill = 0, n_dump = 0, n_vme = 0;
  int n_l1full = 0, n_busy = 0, n_warn = 0, n_err = 0, n_bxwrap = 0, n_softrst = 0, n_cal = 0;
  int n_split = 0, n_fill = 0, n_events = 0, n_gbe_words = 0, n_sbad = 0;
  logic [NF-1:0] exp_dmb_err = '0;   // fibers that sent a word with disagreeing special bits

  task automatic fail(input string s);
    failures++;
    $display("FAIL %0t: %s", $time, s);
  endtask

  initial begin
    #30_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- input FIFO models ------------------------------------------------------------------------
  logic [63:0] fq[NF][$];
  function automatic void fifo_upd();
    for (int i = 0; i < NF; i++) begin
      fifo_empty[i] = (fq[i].size() == 0);
      fifo_data[i]  = fifo_empty[i] ? 64'd0 : fq[i][0];
    end
  endfunction
  initial fifo_upd();
  always @(posedge clk) begin
    logic [NF-1:0] r;
    r = fifo_ren;
    #1;
    for (int i = 0; i < NF; i++) if (r[i] && fq[i].size() > 0) void'(fq[i].pop_front());
    fifo_upd();
  end

  // ---- GbE FIFO model: written on clk, read on rclk ---------------------------------------------
  logic [64:0] gq[$];
  function automatic void gfifo_upd();
    gfifo_empty = (gq.size() == 0);
    gfifo_rdata = gfifo_empty ? '0 : gq[0];
    gfifo_pae_n = (gq.size() > 24);
  endfunction
  initial gfifo_upd();
  always @(posedge clk) if (gfifo_wen) begin
    logic [64:0] w;
    w = gfifo_wdata;
    #1; gq.push_back(w); gfifo_upd();
  end
  always @(posedge rclk) if (gfifo_ren && !gfifo_empty) begin
    #1; void'(gq.pop_front()); gfifo_upd();
  end

  // ---- bunch crossing number followed from bc0 --------------------------------------------------
  int bx_m = 0, bx_period = 0, bx_last = -1, l1a_bx = 0;
  always @(posedge clk) begin
    if (rst) bx_m = 0;
    else if (bc0) begin
      if (bx_last >= 0) bx_period = bx_m + 1;
      bx_m = 0; bx_last = 0;
    end else bx_m++;
    if (l1a) l1a_bx = bx_m;     // the BXN stored with a trigger sampled at this edge
  end

  // ---- expected events --------------------------------------------------------------------------
  typedef struct {
    logic [23:0] l1a;
    logic [11:0] bxn;
    logic [NF-1:0] live, delivered;
    int ndmb;
    bit bx_chk;
  } evh_t;
  evh_t exp_h[$];
  word_q_t exp_b[$];
  logic [23:0] l1a_cnt = 0;     // triggers counted here since the last (soft) reset
  int built = 0;                // events built since the last (soft) reset
  logic [NF-1:0] kill_mask = '1;
  bit gd_bx_chk = 1;            // 0: the BXN of this trigger is not followed here

  // Build the data of one trigger for every fiber. kinds: 0 none, 1 cut short, 2 wrong L1A,
  // 3 one word with one copy of a special bit flipped (the vote still holds), else good
  task automatic give_data(input logic [23:0] num, input logic [11:0] bxn, input int kinds[NF]);
    evh_t h;
    word_q_t blk, all;
    h.l1a = num; h.bxn = bxn; h.bx_chk = gd_bx_chk; h.live = kill_mask & fiber_ok; h.delivered = '0; h.ndmb = 0;
    all = {};
    for (int i = 0; i < NF; i++) begin
      if (!h.live[i]) begin n_kill++; continue; end
      if (kinds[i] == 0) begin n_stmo++; continue; end
      blk = dmb_block((kinds[i] == 2) ? num ^ 24'h000200 : num, $urandom_range(0, 10), 32'(num) * 8 + i);
      if (kinds[i] == 1) begin void'(blk.pop_back()); n_etmo++; end
      else h.ndmb++;
      if (kinds[i] == 2) n_mism++;
      if (kinds[i] == 3) begin
        int k, b;
        k = $urandom_range(1, blk.size() - 1);
        b = 16 * $urandom_range(0, 3) + 12 + $urandom_range(0, 3);
        blk[k][b] = !blk[k][b];
        n_sbad++; exp_dmb_err[i] = 1'b1;
      end
      h.delivered[i] = 1'b1;
      foreach (blk[k]) begin fq[i].push_back(blk[k]); all.push_back(blk[k]); end
    end
    fifo_upd();
    exp_h.push_back(h);
    exp_b.push_back(all);
  endtask

  task automatic pulse_l1a();
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
  endtask

  // ---- S-Link capture and event check -----------------------------------------------------------
  logic [63:0] got[$];
  logic [64:0] sl_stream[$];    // every S-Link word with its end-of-event flag, for the GbE check
  logic in_evt = 0;

  task automatic check_event();
    evh_t h;
    word_q_t b;
    logic [15:0] c;
    n_events++;
    checks++;
    if (exp_h.size() == 0) begin fail("event with no trigger"); return; end
    h = exp_h.pop_front();
    b = exp_b.pop_front();
    if (got.size() != b.size() + 6) begin
      fail($sformatf("L1A %0d: %0d words, expected %0d", h.l1a, got.size(), b.size() + 6));
      return;
    end
    checks++;
    if (!h.bx_chk) h.bxn = got[0][31:20];
    if (got[0] != {4'h5, 4'h0, h.l1a, h.bxn, 4'h1, board_id[7:0], 8'h00})
      fail($sformatf("H1 %h expected L1A %0d BXN %0d chk %0d", got[0], h.l1a, h.bxn, h.bx_chk));
    checks++; if (got[1] != 64'h8000_0001_8000_8000) fail("H2");
    checks++; if (got[2][31:0] != {16'(h.live), 12'h000, 4'($countones(h.live))}) fail($sformatf("H3 %h", got[2]));
    foreach (b[k]) begin
      checks++;
      if (got[3 + k] != b[k]) fail($sformatf("L1A %0d data word %0d", h.l1a, k));
    end
    checks++; if (got[got.size() - 3][31:0] != {16'(h.delivered), 12'h000, 4'(h.ndmb)}) fail($sformatf("T1 %h", got[got.size() - 3]));
    checks++; if (got[got.size() - 2] != 64'h8000_FFFF_8000_8000) fail("T2");
    c = 16'hFFFF;
    for (int k = 0; k < got.size() - 1; k++) c = crc16_ref(c, got[k]);
    checks++;
    if (got[$][63:60] != 4'hA || got[$][55:32] != 24'(got.size()) || got[$][31:16] != c)
      fail($sformatf("TR %h wc %0d crc %h", got[$], got.size(), c));
  endtask

  always @(posedge clk) if (!rst) begin
    if (slink_wen) begin
      checks++;
      if (!slink_ff_n) fail("write while the S-Link is full");
      if (!in_evt) begin
        checks++; if (!slink_ctrl || slink_data[63:60] != 4'h5) fail("first word");
        in_evt = 1;
      end
      got.push_back(slink_data);
      sl_stream.push_back({slink_data[63:60] == 4'hA && slink_ctrl, slink_data});
      if (slink_ctrl && slink_data[63:60] == 4'hA) begin
        check_event();
        got = {};
        in_evt = 0;
        built++;
      end
    end
    if (in_evt && !slink_ff_n) n_stall++;
  end

  // ---- GbE stream parser -------------------------------------------------------------------------
  logic [7:0] gb[$];
  logic g_in = 0;
  int g_pkts = 0;
  task automatic gbe_packet();
    int n, p, d;
    logic [31:0] r;
    n = gb.size();
    g_pkts++;
    checks++;
    if (n < 11 + 56 + 6 || gb[0] != 8'h55 || gb[6] != 8'hD5) begin fail($sformatf("GbE header/length %0d", n)); return; end
    r = '1;
    for (int k = 7; k < n; k++) r = crc32_byte(r, gb[k]);
    checks++; if (r != 32'hDEBB20E3) fail("GbE CRC");
    p = n - 11 - 6;   // payload bytes
    d = p;
    if (p == 64) begin
      for (int t = 8; t < 56; t += 8) begin
        logic ok;
        ok = ({gb[11 + t], gb[12 + t]} == 16'(t));
        for (int k = 11 + t + 2; k < 11 + 64; k++) if (gb[k] != 8'hFF) ok = 0;
        if (ok) d = t;
      end
    end
    if (d < 56) n_fill++;
    for (int w = 0; w < d / 8; w++) begin
      logic [63:0] v;
      logic [64:0] e;
      for (int b = 0; b < 8; b++) v[8*b +: 8] = gb[11 + 8*w + b];
      checks++;
      if (sl_stream.size() == 0) begin fail("GbE word not sent on S-Link"); return; end
      e = sl_stream.pop_front();
      n_gbe_words++;
      if (v != e[63:0]) fail($sformatf("GbE word %h expected %h", v, e[63:0]));
      if (w == d / 8 - 1 && !e[64] && d == MAXB) n_split++;
    end
  endtask
  always @(posedge rclk) if (!rst) begin
    if (!g_in) begin
      if (gbe_txcharisk == 2'b10 && gbe_txdata[15:8] == 8'hFB) begin g_in = 1; gb = {}; gb.push_back(gbe_txdata[7:0]); end
    end else if (gbe_txcharisk == 2'b11) begin
      g_in = 0; gbe_packet();
    end else begin
      gb.push_back(gbe_txdata[15:8]); gb.push_back(gbe_txdata[7:0]);
    end
  end

  // ---- FMM monitors -----------------------------------------------------------------------------
  always @(posedge clk) if (!rst) begin
    if (fmm[FMM_BUSY]) n_busy++;
    if (fmm[FMM_ERR]) n_err++;
  end

  // ---- DDR input: q = {value before the rising edge, value before the falling edge} -------------
  logic [39:0] d_f, d_r;
  int ddr_n = 0;
  always @(negedge clk) begin d_f = ddr_in; #2 ddr_in = {$urandom, $urandom}; end
  always @(posedge clk) begin
    d_r = ddr_in;
    #2;
    if (!rst && ddr_n < 200) begin
      checks++; ddr_n++;
      if (ddr_word != {d_r, d_f}) fail("DDR word");
    end
    ddr_in = {$urandom, $urandom};
  end

  // ---- JTAG ------------------------------------------------------------------------------------------
  task automatic set_instr(input jtag_op_e op);
    @(negedge clk); jtag_instr = 6'(op);
    @(negedge clk);
  endtask
  task automatic noop();
    set_instr(OP_NOOP);
  endtask
  // capture, shift w bits (LSB first) and optionally update
  task automatic scan(input jtag_op_e op, input int w, input logic [31:0] din, input logic upd,
                      output logic [31:0] dout);
    set_instr(op);
    jtag_sel = 1; jtag_shift = 0;
    @(negedge clk);
    jtag_shift = 1;
    dout = '0;
    for (int k = 0; k < w; k++) begin
      dout[k] = jtag_tdo;
      jtag_tdi = din[k];
      @(negedge clk);
    end
    jtag_shift = 0;
    if (upd) begin jtag_update = 1; @(negedge clk); jtag_update = 0; end
    jtag_sel = 0;
    set_instr(OP_NOOP);
  endtask

  // ---- stimulus ----------------------------------------------------------------------------------------
  logic [31:0] rd;
  int kinds[NF];

  task automatic wait_idle();
    int t;
    t = 0;
    while ((exp_h.size() != 0 || in_evt) && t < 20000) begin @(posedge clk); t++; end
    checks++; if (t >= 20000) fail("event never finished");
  endtask

  task automatic one_event(input logic stall);
    for (int i = 0; i < NF; i++) kinds[i] = $urandom_range(0, 11);
    l1a_cnt++;
    @(negedge clk);
    give_data(l1a_cnt, 12'h000, kinds);
    l1a = 1; @(negedge clk); l1a = 0;
    exp_h[$].bxn = 12'(l1a_bx);
    wait_idle();
  endtask

  // random S-Link full while enabled
  logic stall_en = 0, hold_full = 0;
  always @(negedge clk) slink_ff_n = !(hold_full || (stall_en && $urandom_range(0, 5) == 0));

  initial begin
    repeat (4) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    // board ID over JTAG, and the version on the LEDs
    noop();
    scan(OP_RD_BOARDID, 32, 0, 0, rd);
    checks++; if (rd != 32'(board_id)) fail($sformatf("board id %h", rd));
    version_sw = 1; #1;
    checks++; if (led_n != ~8'd28) fail("version LEDs");
    version_sw = 0;
    checks++; if (fok_led != '1) fail("fiber OK LEDs");
    // BX-per-orbit limit: default, then load 49 and measure the bc0 period
    repeat (1000) @(negedge clk);
    checks++; if (bx_period != 924) fail($sformatf("default BX period %0d", bx_period));
    scan(OP_LD_BXORB, 12, 32'd49, 1, rd);
    scan(OP_RD_BXORB, 12, 0, 0, rd);
    checks++; if (rd[11:0] != 12'd49) fail("BX limit read back");
    repeat (120) @(negedge clk);
    checks++; if (bx_period != 50) fail($sformatf("BX period %0d", bx_period)); else n_bxwrap++;
    // plain events with random data faults and S-Link stalls
    stall_en = 1;
    for (int e = 0; e < 20; e++) one_event(1);
    // kill fiber 2 over JTAG
    scan(OP_LD_KILL, 20, 32'hFFFFB, 1, rd);
    scan(OP_RD_KILL, 20, 0, 0, rd);
    checks++; if (rd[19:0] != 20'hFFFFB) fail($sformatf("kill read back %h", rd));
    kill_mask = 4'b1011;
    for (int e = 0; e < 10; e++) one_event(1);
    scan(OP_LD_KILL, 20, 32'hFFFFF, 1, rd);
    kill_mask = '1;
    stall_en = 0;
    // L1A read-back
    scan(OP_RD_L1A, 32, 0, 0, rd);
    checks++; if (rd[23:0] != l1a_cnt) fail($sformatf("L1A read back %0d exp %0d", rd, l1a_cnt));
    // special-bit errors: the count and the per-fiber DMB error register
    scan(OP_CRC_ERR, 32, 0, 0, rd);
    checks++; if (rd != 32'(n_sbad)) fail($sformatf("special-bit error count %0d exp %0d", rd, n_sbad));
    scan(OP_DMB_ERR, 32, 0, 0, rd);
    checks++; if (rd != 32'(exp_dmb_err)) fail($sformatf("DMB errors %b exp %b", rd, exp_dmb_err));
    // burst: hold the S-Link full, fill the L1A FIFO, lose one trigger
    hold_full = 1; stall_en = 0;
    @(negedge clk);
    for (int e = 0; e < L1D; e++) begin
      for (int i = 0; i < NF; i++) kinds[i] = 5;
      l1a_cnt++;
      @(negedge clk);
      give_data(l1a_cnt, 12'h000, kinds);
      l1a = 1; @(negedge clk); l1a = 0;
      exp_h[$].bxn = 12'(l1a_bx);
    end
    repeat (3) @(negedge clk);
    checks++; if (!fmm[FMM_SYNC] || !fmm[FMM_WARN]) fail($sformatf("FMM %b with full L1A FIFO", fmm));
    else begin n_l1full++; n_warn++; end
    begin
      int b0;
      b0 = n_busy;
      l1a_cnt++;                 // this trigger is lost: no data, no event
      pulse_l1a();
      repeat (3) @(negedge clk);
      checks++; if (n_busy == b0) fail("no FMM busy on a lost trigger");
    end
    hold_full = 0;
    wait_idle();
    repeat (5) @(negedge clk);
    checks++; if (fmm[FMM_SYNC] || fmm[FMM_BUSY]) fail($sformatf("FMM %b after draining", fmm));
    // read controllers' warning and the received TTS state
    rd_ctrl_stat[1][FMM_WARN] = 1'b1; real_fmm = 4'b0100;
    repeat (2) @(posedge clk); #1;
    checks++; if (!fmm[FMM_WARN] || tts_stat != 4'b0100) fail("FMM warning / TTS latency");
    else n_warn++;
    rd_ctrl_stat[1][FMM_WARN] = 1'b0;
    // VME L1A through JTAG (needs a NOOP first)
    for (int i = 0; i < NF; i++) kinds[i] = 5;
    l1a_cnt++;
    gd_bx_chk = 0;                // taken inside the FPGA at the decoder's pulse
    give_data(l1a_cnt, 12'h000, kinds);
    gd_bx_chk = 1;
    noop();
    @(negedge clk); jtag_instr = 6'(OP_VME_L1A);
    repeat (4) @(negedge clk);
    jtag_instr = 6'(OP_NOOP);
    n_vme++;
    wait_idle();
    // dump mode: events without triggers, numbered by the builder
    for (int e = 0; e < 3; e++) begin
      for (int i = 0; i < NF; i++) kinds[i] = 5;
      @(negedge clk);
      give_data(24'(built + 1), 12'h000, kinds);
      dump_mode = 1;
      wait_idle();
      dump_mode = 0;
      n_dump++;
    end
    // calibration toggle
    begin
      logic c0;
      c0 = cal_auto_l1;
      noop(); set_instr(OP_CAL_TOGGLE); repeat (3) @(negedge clk); noop();
      checks++; if (cal_auto_l1 == c0) fail("calibration toggle"); else n_cal++;
    end
    // soft reset: counters restart
    noop(); set_instr(OP_RESET); noop();
    l1a_cnt = 0; built = 0;
    n_softrst++;
    for (int e = 0; e < 3; e++) one_event(0);
    // GbE receive path: four 16-bit words become one 64-bit word
    begin
      logic [15:0] r[4];
      bit seen;
      seen = 0;
      for (int k = 0; k < 4; k++) r[k] = 16'($urandom);
      fork
        begin
          @(negedge rclk);
          for (int k = 0; k < 4; k++) begin gbe_rxdv = 1; gbe_rxdata = r[k]; @(negedge rclk); end
          gbe_rxdv = 0;
          repeat (4) @(negedge rclk);
        end
        begin
          repeat (10) begin
            @(posedge rclk); #1;
            if (gbe_rx_valid) begin
              seen = 1;
              checks++; if (gbe_rx_word != {r[3], r[2], r[1], r[0]}) fail("GbE receive word");
            end
          end
        end
      join
      checks++; if (!seen) fail("no GbE receive word");
    end
    // let the Ethernet side drain
    begin
      int t;
      t = 0;
      while ((sl_stream.size() != 0 || gq.size() != 0 || g_in) && t < 100000) begin @(posedge clk); t++; end
      checks++; if (t >= 100000) fail("GbE never drained");
    end
    if (fmm[FMM_ERR]) n_err++;
    $display("events=%0d gbe_packets=%0d gbe_words=%0d", n_events, g_pkts, n_gbe_words);
    $display("mechanisms: stall=%0d start_tmo=%0d end_tmo=%0d l1a_mism=%0d special_bit_err=%0d kill=%0d dump=%0d vme_l1a=%0d",
             n_stall, n_stmo, n_etmo, n_mism, n_sbad, n_kill, n_dump, n_vme);
    $display("            l1a_full=%0d fmm_busy=%0d fmm_warn=%0d fmm_err=%0d bx_wrap=%0d soft_rst=%0d cal=%0d split=%0d fill=%0d",
             n_l1full, n_busy, n_warn, n_err, n_bxwrap, n_softrst, n_cal, n_split, n_fill);
    checks++;
    if (n_stall == 0 || n_stmo == 0 || n_etmo == 0 || n_mism == 0 || n_kill == 0 || n_dump == 0 ||
        n_vme == 0 || n_l1full == 0 || n_busy == 0 || n_warn == 0 || n_err == 0 || n_bxwrap == 0 ||
        n_softrst == 0 || n_cal == 0 || n_split == 0 || n_fill == 0 || n_sbad == 0)
      fail("a mechanism never happened");
    checks++; if (n_events != 20 + 10 + L1D + 1 + 3 + 3) fail($sformatf("%0d events", n_events));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
