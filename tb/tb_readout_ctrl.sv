// tb_readout_ctrl: event building with four fibers and short timeouts.
//
// Each event gets an L1A entry and, per fiber, a DMB block (or nothing, or a block cut short, or a
// block with a wrong L1A number), while fibers are killed at random and the output path is stopped
// at random. The expected event is rebuilt here: header words, the blocks of the fibers that
// delivered a complete or partial block in fiber order, trailer fields, a word count that includes
// the six DDU words, and a CRC-16 over every word before the last computed with the reference
// model. Some blocks carry one word whose four copies of the special bits disagree: each such word
// must be counted and its fiber flagged. Start timeouts, end timeouts, L1A mismatches, kills, output
// stops, special-bit errors and dump-mode events must each happen at least once. The CRC-16 and word-count rules are the ones of the DDU trailer.
module tb_readout_ctrl;
  import ddu_pkg::*;
  import ddu_tb_pkg::*;
  localparam int NF = 4;
  localparam int STMO = 16, ETMO = 40;

  logic clk = 0, rst = 1;
  logic l1a_empty, l1a_pop;
  logic [35:0] l1a_dout;
  logic [NF-1:0][63:0] fifo_data;
  logic [NF-1:0] fifo_empty, fifo_ren, kill_n, fiber_ok;
  logic cal_mode = 0, dump_mode = 0, out_stop = 0;
  logic [63:0] out_data;
  logic out_wen, out_boe, out_eoe;
  ctrl_bits_t ctrl;
  logic [NF-1:0] tmo_start, tmo_end, l1a_mism, first_err, dmb_err;
  logic [15:0] crc_err_cnt, evt_cnt;
  logic [31:0] ddu_status;
  logic busy, first_hdr, first_dat;

  readout_ctrl #(.NFIB(NF), .START_TMO(STMO), .CAL_START_TMO(2 * STMO), .END_TMO(ETMO)) dut (
    .clk(clk), .rst(rst), .l1a_empty(l1a_empty), .l1a_dout(l1a_dout), .l1a_pop(l1a_pop),
    .fifo_data(fifo_data), .fifo_empty(fifo_empty), .fifo_ren(fifo_ren), .kill_n(kill_n),
    .fiber_ok(fiber_ok), .board_id(8'h5A), .cal_mode(cal_mode), .dump_mode(dump_mode),
    .fifo_afull_in(1'b0), .fifo_full_in(1'b0), .fmm(4'h0), .out_stop(out_stop),
    .out_data(out_data), .out_wen(out_wen), .out_boe(out_boe), .out_eoe(out_eoe), .ctrl(ctrl),
    .tmo_start(tmo_start), .tmo_end(tmo_end), .l1a_mism(l1a_mism), .first_err(first_err),
    .crc_err_cnt(crc_err_cnt), .dmb_err(dmb_err), .ddu_status(ddu_status), .busy(busy), .evt_cnt(evt_cnt),
    .first_hdr(first_hdr), .first_dat(first_dat)
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_stmo = 0, n_etmo = 0, n_mism = 0, n_kill = 0, n_stop = 0, n_dump = 0, n_sbad = 0;
  logic [NF-1:0] exp_dmb_err = '0;

  initial begin
    #20_000_000;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- models of the L1A FIFO and the input FIFOs ------------------------------------------
  logic [35:0] l1q[$];
  logic [63:0] fq[NF][$];
  logic [NF-1:0] gap;
  assign l1a_empty = (l1q.size() == 0);
  assign l1a_dout  = l1a_empty ? '0 : l1q[0];
  always_comb for (int i = 0; i < NF; i++) begin
    fifo_empty[i] = (fq[i].size() == 0) || gap[i];
    fifo_data[i]  = (fq[i].size() == 0) ? 64'd0 : fq[i][0];
  end
  always @(posedge clk) begin
    if (l1a_pop) void'(l1q.pop_front());
    for (int i = 0; i < NF; i++) if (fifo_ren[i]) void'(fq[i].pop_front());
    for (int i = 0; i < NF; i++) gap[i] <= ($urandom_range(0, 7) == 0);
    out_stop <= ($urandom_range(0, 9) == 0);
    if (out_stop) n_stop++;
  end

  // ---- output capture ------------------------------------------------------------------------
  logic [63:0] got[$];
  always @(posedge clk) if (!rst && out_wen) got.push_back(out_data);

  task automatic run_event(input int ev, input logic dump);
    logic [23:0] l1a;
    logic [11:0] bxn;
    logic [63:0] exp_q[$];
    logic [NF-1:0] live, delivered;
    int ndmb, kind;
    word_q_t blk;
    logic [15:0] c;

    l1a = dump ? 24'(ev + 1) : 24'($urandom);   // dump mode numbers events itself
    bxn = 12'($urandom);
    kill_n = NF'($urandom) | NF'($urandom);   // mostly alive
    if (dump) kill_n[0] = 1'b1;
    fiber_ok = '1;
    live = kill_n & fiber_ok;
    n_kill += NF - $countones(kill_n);
    delivered = '0; ndmb = 0;
    exp_q = {};
    for (int i = 0; i < NF; i++) begin
      kind = $urandom_range(0, 9);             // 0: no data, 1: cut short, 2: wrong L1A,
                                               // 3: special bits disagree in one word, else good
      if (dump && i == 0) kind = 5;
      if (kind == 0) begin
        if (live[i]) n_stmo++;
        continue;
      end
      blk = dmb_block((kind == 2) ? l1a ^ 24'h000100 : l1a, $urandom_range(0, 12), ev * 16 + i);
      if (kind == 1) void'(blk.pop_back());     // no end word: end timeout
      if (kind == 3) begin                      // one copy of one special bit flipped: the vote holds
        int k, b;
        k = $urandom_range(1, blk.size() - 1);
        b = 16 * $urandom_range(0, 3) + 12 + $urandom_range(0, 3);
        blk[k][b] = !blk[k][b];
      end
      foreach (blk[k]) fq[i].push_back(blk[k]);
      if (!live[i]) continue;                   // killed: stays in its FIFO
      if (kind == 1) n_etmo++;
      if (kind == 2) n_mism++;
      if (kind == 3) begin n_sbad++; exp_dmb_err[i] = 1'b1; end
      delivered[i] = 1'b1;
      if (kind != 1) ndmb++;
      foreach (blk[k]) exp_q.push_back(blk[k]);
    end
    dump_mode = dump;
    if (dump) n_dump++;
    else l1q.push_back({l1a, bxn});
    got = {};
    wait (out_eoe && out_wen);
    @(posedge clk); #1;
    dump_mode = 0;
    // killed fibers' data is not read: clear it for the next event
    for (int i = 0; i < NF; i++) fq[i] = {};

    checks++;
    if (got.size() != exp_q.size() + 6) begin
      failures++; $display("ev %0d: %0d words, expected %0d", ev, got.size(), exp_q.size() + 6);
      return;
    end
    checks++;
    if (got[0] != {4'h5, 4'h0, l1a, dump ? 12'h000 : bxn, 4'h1, 8'h5A, 8'h00}) begin
      failures++; $display("ev %0d: H1 %h", ev, got[0]);
    end
    checks++; if (got[1] != 64'h8000_0001_8000_8000) failures++;
    checks++; if (got[2][31:0] != {16'(live), 12'h000, 4'($countones(live))}) begin failures++; $display("H3 %h", got[2]); end
    foreach (exp_q[k]) begin
      checks++;
      if (got[3 + k] != exp_q[k]) begin failures++; $display("ev %0d word %0d: %h exp %h", ev, k, got[3 + k], exp_q[k]); end
    end
    checks++;
    if (got[got.size() - 3][31:0] != {16'(delivered), 12'h000, 4'(ndmb)}) begin
      failures++; $display("ev %0d T1 %h exp deliv %b ndmb %0d", ev, got[got.size() - 3], delivered, ndmb);
    end
    checks++; if (got[got.size() - 2] != 64'h8000_FFFF_8000_8000) failures++;
    c = 16'hFFFF;
    for (int k = 0; k < got.size() - 1; k++) c = crc16_ref(c, got[k]);
    checks++;
    if (got[$][63:60] != 4'hA || got[$][55:32] != 24'(got.size()) || got[$][31:16] != c) begin
      failures++; $display("ev %0d TR %h: wc %0d crc %h", ev, got[$], got.size(), c);
    end
  endtask

  initial begin
    gap = '0; kill_n = '1; fiber_ok = '1;
    repeat (3) @(posedge clk); @(negedge clk); rst = 0;
    // an event with every fiber killed is the 6-word "no data" event
    kill_n = '0;
    l1q.push_back({24'd7, 12'd3});
    wait (out_eoe && out_wen); @(posedge clk); #1;
    checks++; if (got.size() != 6 || got[$][55:32] != 24'd6) begin failures++; $display("empty event %0d words", got.size()); end
    for (int ev = 1; ev <= 60; ev++) run_event(ev, (ev % 10) == 5);
    // flags seen
    checks++; if (tmo_start == '0) begin failures++; $display("no start timeout flag"); end
    checks++; if (tmo_end == '0) begin failures++; $display("no end timeout flag"); end
    checks++; if (l1a_mism == '0 || !ctrl.l1a_mismatch) begin failures++; $display("no l1a mismatch flag"); end
    checks++; if (!ctrl.critical_err) failures++;
    checks++; if (dmb_err != exp_dmb_err || crc_err_cnt != 16'(n_sbad)) begin
      failures++; $display("dmb_err %b exp %b, count %0d exp %0d", dmb_err, exp_dmb_err, crc_err_cnt, n_sbad);
    end
    checks++; if (evt_cnt != 16'd61) begin failures++; $display("evt_cnt %0d", evt_cnt); end
    $display("mechanisms: start_tmo=%0d end_tmo=%0d l1a_mism=%0d killed=%0d stop_cycles=%0d dump=%0d special_bit_err=%0d",
             n_stmo, n_etmo, n_mism, n_kill, n_stop, n_dump, n_sbad);
    checks++; if (n_stmo == 0 || n_etmo == 0 || n_mism == 0 || n_kill == 0 || n_stop == 0 || n_dump == 0 || n_sbad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
