// tb_ddu_workloads: the event sizes of the DDU word-count rule, run through the DDU control FPGA
// at its default size.
//
// Word count = 6 + 25*Nts*nCFEB + 4*nDMB (64-bit words), with Nts time samples per CFEB and a DMB
// block of 4 + 25*Nts*nCFEB words. The events sent are: no data (6 words), 1 DMB with 1 CFEB
// (210), 1 DMB with 2 CFEBs (410), 2 DMBs with 1 CFEB each (414), 2 DMBs with 2 CFEBs each (814),
// 3, 4, 7, 8, 11, 12 and 15 DMBs with 1 CFEB each (618 to 3066 words), all with 8 samples, and the
// largest event, 15 DMBs with 5 CFEBs and 16 samples (30066 words, just under the 30070-word
// limit). For each event the trailer word count must equal the rule, the CRC-16 must match, every
// word must arrive unchanged, and the Ethernet side must carry 8 bytes per word: an event goes out
// in full 8960-byte packets and a remainder (1 packet up to 8960 bytes, 27 for the largest event).
// Only the fibers that carry a block are marked OK, so no start timeout stretches the stream.
module tb_ddu_workloads;
  import ddu_pkg::*;
  import ddu_tb_pkg::*;
  localparam int NF = 15;

  logic clk = 0, rclk = 0, rst = 1;
  always #5 clk = ~clk;
  always #7 rclk = ~rclk;

  logic l1a = 0, cal_auto_l1, bc0;
  logic [15:0] board_id = 16'h0042;
  logic [NF-1:0][63:0] fifo_data;
  logic [NF-1:0] fifo_empty, fifo_ren, fok_led, dav_led;
  logic [NF-1:0] fiber_ok = '0;
  logic [3:0] fmm, tts_stat;
  logic slink_wen, slink_ctrl, gfifo_wen, gfifo_ren, gfifo_empty, gfifo_pae_n, gbe_rx_valid, jtag_tdo;
  logic [63:0] slink_data, gbe_rx_word;
  logic [64:0] gfifo_wdata, gfifo_rdata;
  logic [15:0] gbe_txdata, la;
  logic [1:0] gbe_txcharisk;
  logic [79:0] ddr_word;
  logic [7:0] led_n;

  ddu_ctrl_top dut (
    .clk(clk), .rst(rst), .rclk(rclk), .l1a(l1a), .dump_mode(1'b0), .cal_mode(1'b0),
    .cal_auto_l1(cal_auto_l1), .bc0(bc0), .mode_sw(4'd0), .version_sw(1'b0), .board_id(board_id),
    .fifo_data(fifo_data), .fifo_empty(fifo_empty), .fifo_ren(fifo_ren), .fiber_ok(fiber_ok),
    .fiber_present('1), .in_fifo_afull(1'b0), .in_fifo_full(1'b0), .rd_ctrl_stat('0),
    .real_fmm(4'd0), .fmm(fmm), .tts_stat(tts_stat), .slink_ff_n(1'b1), .dcc_paf_n(1'b1),
    .slink_data(slink_data), .slink_wen(slink_wen), .slink_ctrl(slink_ctrl),
    .gfifo_wdata(gfifo_wdata), .gfifo_wen(gfifo_wen), .gfifo_paf_n(1'b1), .gfifo_rdata(gfifo_rdata),
    .gfifo_empty(gfifo_empty), .gfifo_pae_n(gfifo_pae_n), .gfifo_ren(gfifo_ren),
    .gbe_txdata(gbe_txdata), .gbe_txcharisk(gbe_txcharisk), .gbe_rxdv(1'b0), .gbe_rxdata(16'd0),
    .gbe_rx_word(gbe_rx_word), .gbe_rx_valid(gbe_rx_valid), .ddr_in(40'd0), .ddr_word(ddr_word),
    .jtag_instr(6'd0), .jtag_sel(1'b0), .jtag_shift(1'b0), .jtag_update(1'b0), .jtag_tdi(1'b0),
    .jtag_tdo(jtag_tdo), .fok_led(fok_led), .dav_led(dav_led), .led_n(led_n), .la(la)
  );

  int checks = 0, failures = 0;
  task automatic fail(input string s);
    failures++;
    $display("FAIL %0t: %s", $time, s);
  endtask
  initial begin
    #20_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input FIFOs
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

  // GbE FIFO
  logic [64:0] gq[$];
  function automatic void gfifo_upd();
    gfifo_empty = (gq.size() == 0);
    gfifo_rdata = gfifo_empty ? '0 : gq[0];
    gfifo_pae_n = (gq.size() > 1024);   // ~PAE high above 1024 words
  endfunction
  initial gfifo_upd();
  always @(posedge clk) if (gfifo_wen) begin
    logic [64:0] w;
    w = gfifo_wdata;
    #1; gq.push_back(w); gfifo_upd();
  end
  always @(posedge rclk) if (gfifo_ren && !gfifo_empty) begin #1; void'(gq.pop_front()); gfifo_upd(); end

  // bunch crossings
  int bx_m = 0, bx_period = 0, bc0_seen = 0, l1a_bx = 0;
  always @(posedge clk) begin
    if (rst) bx_m = 0;
    else if (bc0) begin
      if (bc0_seen > 0) bx_period = bx_m + 1;
      bc0_seen++; bx_m = 0;
    end else bx_m++;
    if (l1a) l1a_bx = bx_m;
  end

  // S-Link capture
  logic [63:0] got[$];
  logic done = 0;
  always @(posedge clk) if (!rst && slink_wen) begin
    got.push_back(slink_data);
    if (slink_ctrl && slink_data[63:60] == 4'hA) done = 1;
  end

  // GbE capture: every packet's CRC is checked and its data words are collected
  logic [7:0] gb[$];
  logic [63:0] gwords[$];
  logic g_in = 0;
  int g_pkts = 0;
  int pkt_bytes[$];
  task automatic gbe_packet();
    int n, d;
    logic [31:0] cr;
    n = gb.size();
    g_pkts++;
    cr = '1;
    for (int k = 7; k < n; k++) cr = crc32_byte(cr, gb[k]);
    checks++; if (cr != 32'hDEBB20E3 || gb[6] != 8'hD5) fail("GbE CRC or header");
    d = n - 11 - 6;
    if (d == 64)   // short packets are padded to 64 bytes after a 2-byte count of the real bytes
      for (int t = 8; t < 56; t += 8) begin
        logic ok;
        ok = ({gb[11 + t], gb[12 + t]} == 16'(t));
        for (int k = 13 + t; k < 11 + 64; k++) if (gb[k] != 8'hFF) ok = 0;
        if (ok) d = t;
      end
    pkt_bytes.push_back(d);
    for (int w = 0; w < d / 8; w++) begin
      logic [63:0] v;
      for (int b = 0; b < 8; b++) v[8*b +: 8] = gb[11 + 8*w + b];
      gwords.push_back(v);
    end
  endtask
  always @(posedge rclk) if (!rst) begin
    if (!g_in) begin
      if (gbe_txcharisk == 2'b10 && gbe_txdata[15:8] == 8'hFB) begin g_in = 1; gb = {}; gb.push_back(gbe_txdata[7:0]); end
    end else if (gbe_txcharisk == 2'b11) begin g_in = 0; gbe_packet(); end
    else begin gb.push_back(gbe_txdata[15:8]); gb.push_back(gbe_txdata[7:0]); end
  end

  task automatic run(input string name, input int ndmb, input int ncfeb, input int nts, input int exp_wc);
    word_q_t exp_q, blk;
    int wc, npk, t;
    logic [15:0] c;
    static logic [23:0] num = 0;
    num++;
    got = {}; gwords = {}; pkt_bytes = {}; done = 0;
    fiber_ok = '0;
    for (int i = 0; i < ndmb; i++) begin
      blk = dmb_block(num, 2 + 25 * nts * ncfeb, 32'(num) * 16 + i);
      foreach (blk[k]) begin fq[i].push_back(blk[k]); exp_q.push_back(blk[k]); end
      fiber_ok[i] = 1'b1;
    end
    fifo_upd();
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    wait (done);
    wc = got.size();
    checks++; if (wc != exp_wc || 6 + 25 * nts * ncfeb * ndmb + 4 * ndmb != exp_wc) fail($sformatf("%s: %0d words, expected %0d", name, wc, exp_wc));
    c = 16'hFFFF;
    for (int k = 0; k < wc - 1; k++) c = crc16_ref(c, got[k]);
    checks++; if (got[wc - 1][55:32] != 24'(exp_wc) || got[wc - 1][31:16] != c) fail($sformatf("%s: trailer %h", name, got[wc - 1]));
    checks++; if (got[0][55:32] != num) fail($sformatf("%s: L1A", name));
    for (int k = 0; k < exp_q.size() && k + 3 < wc; k++) begin checks++; if (got[3 + k] != exp_q[k]) begin fail($sformatf("%s: word %0d", name, k)); break; end end
    t = 0;
    while ((gwords.size() < wc || g_in) && t < 2_000_000) begin @(posedge clk); t++; end
    checks++; if (gwords.size() != wc) fail($sformatf("%s: GbE carried %0d words", name, gwords.size()));
    for (int k = 0; k < wc && k < gwords.size(); k++) begin checks++; if (gwords[k] != got[k]) begin fail($sformatf("%s: GbE word %0d", name, k)); break; end end
    npk = (8 * wc + 8959) / 8960;
    checks++; if (pkt_bytes.size() != npk) fail($sformatf("%s: %0d packets, expected %0d", name, pkt_bytes.size(), npk));
    for (int k = 0; k + 1 < pkt_bytes.size(); k++) begin checks++; if (pkt_bytes[k] != 8960) fail($sformatf("%s: packet %0d has %0d bytes", name, k, pkt_bytes[k])); end
    $display("%-28s WC=%0d (%0d bytes) GbE packets=%0d", name, wc, 8 * wc, pkt_bytes.size());
  endtask

  initial begin
    repeat (4) @(negedge clk); rst = 0;
    repeat (20) @(negedge clk);
    run("No Data",                 0, 1, 8, 6);
    run("1 DMB, 1 CFEB",           1, 1, 8, 210);
    run("1 DMB, 2 CFEB",           1, 2, 8, 410);
    run("2 DMB, 1 CFEB each",      2, 1, 8, 414);
    run("2 DMB, 2 CFEB each",      2, 2, 8, 814);
    run("3 DMB, 1 CFEB each",      3, 1, 8, 618);
    run("4 DMB, 1 CFEB each",      4, 1, 8, 822);
    run("7 DMB, 1 CFEB each",      7, 1, 8, 1434);
    run("8 DMB, 1 CFEB each",      8, 1, 8, 1638);
    run("11 DMB, 1 CFEB each",    11, 1, 8, 2250);
    run("12 DMB, 1 CFEB each",    12, 1, 8, 2454);
    run("15 DMB, 1 CFEB each",    15, 1, 8, 3066);
    run("15 DMB, 5 CFEB, 16 samples", 15, 5, 16, 30066);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
