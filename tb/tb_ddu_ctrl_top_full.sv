// tb_ddu_ctrl_top_full: the DDU control FPGA at its default size (15 fibers, 128/18945-cycle
// timeouts, 16-entry L1A FIFO, 8960-byte Ethernet packets, 1280-cycle packet wait).
//
// One trigger is sent; eleven fibers deliver a DMB block, two deliver nothing (start timeout after
// 128 cycles) and two are left dead by fiber_ok. The S-Link event is compared with one rebuilt here
// (header, H3 live mask, blocks in fiber order, trailer word count and CRC-16), the time from the
// trigger to the end of the event is checked against the start timeout, the bunch-crossing
// counter must wrap at the default 923, and the Ethernet packets that carry the event (a packet
// also ends when the GbE FIFO runs dry while the event waits for a slow fiber) must hold the same
// words, each packet with a good CRC-32.
module tb_ddu_ctrl_top_full;
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
  logic [NF-1:0] fiber_ok = 15'b111_1111_1101_1110;   // fibers 0 and 5 dead
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
    #2_000_000;
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
    gfifo_pae_n = 1'b0;
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

  word_q_t exp_q, blk;
  logic [NF-1:0] live, delivered;
  int ndmb = 0, t0, t1;
  logic [15:0] c;

  initial begin
    repeat (4) @(negedge clk); rst = 0;
    repeat (2000) @(negedge clk);
    checks++; if (bx_period != 924) fail($sformatf("BX period %0d, expected 924", bx_period));
    live = fiber_ok;
    delivered = '0;
    for (int i = 0; i < NF; i++) begin
      if (!live[i] || i == 3 || i == 11) continue;        // 3 and 11 send nothing
      blk = dmb_block(24'd1, $urandom_range(1, 20), i);
      foreach (blk[k]) begin fq[i].push_back(blk[k]); exp_q.push_back(blk[k]); end
      delivered[i] = 1'b1;
      ndmb++;
    end
    fifo_upd();
    l1a = 1; @(negedge clk); l1a = 0;
    t0 = $time / 10;
    wait (done);
    t1 = $time / 10;
    checks++;
    if (got.size() != exp_q.size() + 6) fail($sformatf("%0d words, expected %0d", got.size(), exp_q.size() + 6));
    else begin
      checks++; if (got[0] != {4'h5, 4'h0, 24'd1, 12'(l1a_bx), 4'h1, board_id[7:0], 8'h00}) fail($sformatf("H1 %h", got[0]));
      checks++; if (got[1] != DDU_H2) fail("H2");
      checks++; if (got[2][31:0] != {16'(live), 12'h000, 4'($countones(live))}) fail($sformatf("H3 %h", got[2]));
      foreach (exp_q[k]) begin checks++; if (got[3 + k] != exp_q[k]) fail($sformatf("word %0d", k)); end
      checks++; if (got[got.size() - 3][31:0] != {16'(delivered), 12'h000, 4'(ndmb)}) fail("T1");
      checks++; if (got[got.size() - 2] != DDU_T2) fail("T2");
      c = 16'hFFFF;
      for (int k = 0; k < got.size() - 1; k++) c = crc16_ref(c, got[k]);
      checks++;
      if (got[$][55:32] != 24'(got.size()) || got[$][31:16] != c) fail($sformatf("TR %h crc %h", got[$], c));
    end
    // two silent fibers: the event cannot end before the 128-cycle start timeout
    checks++; if (t1 - t0 < 128 || t1 - t0 > 128 + 4 * got.size() + 200) fail($sformatf("event took %0d cycles", t1 - t0));
    // Ethernet: the packets together carry the event (a packet also ends when the FIFO runs dry)
    wait (gwords.size() >= got.size() && !g_in);
    checks++; if (gwords.size() != got.size()) fail($sformatf("GbE carried %0d words", gwords.size()));
    foreach (got[w]) begin checks++; if (gwords[w] != got[w]) fail($sformatf("GbE word %0d", w)); end
    $display("event of %0d words in %0d cycles, %0d GbE packets", got.size(), t1 - t0, g_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
