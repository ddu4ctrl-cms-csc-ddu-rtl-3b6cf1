// tb_gbe_tx: GbE framer with a 64-byte packet limit and a 50-cycle inter-packet wait.
//
// A first-word-fall-through FIFO model is filled with events (64-bit words, the last one flagged
// end-of-event). The transmit stream is parsed here: sync words during reset, idles between
// packets, the /S/ + preamble + SFD header, four 0xFF destination bytes, the data bytes (byte 0 of
// each word first), the filler for short packets (2-byte real byte count then 0xFF up to 64
// payload bytes), the packet number, and the CRC-32, checked by running the reference CRC over
// destination..FCS and requiring the Ethernet residue; then /T/ /R/. Packets must split at the
// byte limit and at every event end, and end early when the FIFO runs empty. The idle gap must
// be at least the wait time while pae_n is low and may be shorter when it is high.
module tb_gbe_tx;
  import ddu_tb_pkg::*;
  localparam int MAXB = 64, WAITC = 50;
  logic clk = 0, rst = 1;
  logic [64:0] fq[$];
  logic [63:0] fifo_dout;
  logic fifo_eoe, fifo_empty, fifo_ren, pae_n = 0, pkt_end;
  logic [15:0] txdata, pkt_num;
  logic [1:0] txk;
  int checks = 0, failures = 0;
  int n_split = 0, n_fill = 0, n_mt_end = 0, n_short_gap = 0, n_pkts = 0;

  gbe_tx #(.MAX_DATA_BYTES(MAXB), .WAIT_CYC(WAITC)) dut (
    .clk(clk), .rst(rst), .fifo_dout(fifo_dout), .fifo_eoe(fifo_eoe), .fifo_empty(fifo_empty),
    .fifo_pae_n(pae_n), .fifo_ren(fifo_ren), .txdata(txdata), .txcharisk(txk), .pkt_num(pkt_num),
    .pkt_end(pkt_end)
  );
  always #4 clk = ~clk;
  initial begin #4_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // FIFO model outputs are refreshed explicitly after every push and pop
  function automatic void fifo_upd();
    fifo_empty = (fq.size() == 0);
    fifo_dout  = fifo_empty ? '0 : fq[0][63:0];
    fifo_eoe   = fifo_empty ? 1'b0 : fq[0][64];
  endfunction
  initial fifo_upd();
  always @(posedge clk) if (fifo_ren && !fifo_empty) begin #1; void'(fq.pop_front()); fifo_upd(); end

  // expected packets: lists of 64-bit words
  typedef logic [63:0] wl_t[$];
  wl_t exp_pk[$];
  wl_t cur_build;

  task automatic add_event(input int nwords, input logic with_eoe, input logic ends_on_empty);
    for (int k = 0; k < nwords; k++) begin
      logic [63:0] w;
      logic e;
      w = {$urandom, $urandom};
      e = with_eoe && (k == nwords - 1);
      fq.push_back({e, w});
      fifo_upd();
      cur_build.push_back(w);
      if (e || cur_build.size() * 8 >= MAXB || (ends_on_empty && k == nwords - 1)) begin
        if (!e && cur_build.size() * 8 >= MAXB) n_split++;
        exp_pk.push_back(cur_build);
        cur_build = {};
      end
    end
  endtask

  // ---- stream parser ---------------------------------------------------------------------------
  logic [7:0] bytes[$];
  logic in_pkt = 0;
  int idle_run = 0, last_gap = 0, sync_seen = 0, pk_idx = 0;
  logic [15:0] exp_num = 0;

  task automatic check_packet();
    int n, nd, pos;
    logic [31:0] r;
    wl_t ew;
    n = bytes.size();
    // header
    checks++;
    if (bytes[0] != 8'h55 || bytes[6] != 8'hD5) begin failures++; $display("preamble/SFD %h %h", bytes[0], bytes[6]); end
    for (int k = 1; k < 6; k++) if (bytes[k] != 8'h55) begin failures++; $display("preamble"); end
    for (int k = 7; k < 11; k++) begin checks++; if (bytes[k] != 8'hFF) failures++; end
    // CRC over destination .. FCS
    r = '1;
    for (int k = 7; k < n; k++) r = crc32_byte(r, bytes[k]);
    checks++; if (r != 32'hDEBB20E3) begin failures++; $display("pkt %0d CRC residue %h", pk_idx, r); end
    // data
    if (pk_idx >= exp_pk.size()) begin failures++; $display("unexpected packet"); return; end
    ew = exp_pk[pk_idx];
    nd = ew.size() * 8;
    pos = 11;
    foreach (ew[w]) for (int b = 0; b < 8; b++) begin
      checks++;
      if (bytes[pos] != ew[w][8*b +: 8]) begin failures++; $display("pkt %0d data byte %0d", pk_idx, pos - 11); end
      pos++;
    end
    if (nd < 56) begin
      n_fill++;
      checks++; if ({bytes[pos], bytes[pos + 1]} != 16'(nd)) begin failures++; $display("fill count"); end
      pos += 2;
      while (pos < 11 + 64) begin checks++; if (bytes[pos] != 8'hFF) failures++; pos++; end
    end
    checks++; if ({bytes[pos], bytes[pos + 1]} != exp_num) begin failures++; $display("pkt num %h", {bytes[pos], bytes[pos + 1]}); end
    pos += 2;
    checks++; if (pos + 4 != n) begin failures++; $display("pkt %0d length %0d exp %0d", pk_idx, n, pos + 4); end
    exp_num++;
    pk_idx++;
  endtask

  always @(posedge clk) begin
    if (rst) begin
      if ({txdata, txk} == {16'hBCB5, 2'b10} || {txdata, txk} == {16'hBC42, 2'b10}) sync_seen++;
    end else if (!in_pkt) begin
      if ({txdata, txk} == {16'hBC50, 2'b10}) idle_run++;
      else if (txk == 2'b10 && txdata[15:8] == 8'hFB) begin
        in_pkt <= 1'b1; bytes = {}; bytes.push_back(txdata[7:0]);
        last_gap = idle_run;
        if (n_pkts > 0) begin
          checks++;
          if (idle_run < 2) begin failures++; $display("gap %0d", idle_run); end
          if (!pae_n && idle_run < WAITC) begin failures++; $display("gap %0d with pae_n low", idle_run); end
          if (pae_n && idle_run < WAITC) n_short_gap++;
        end
        idle_run = 0;
      end else if (sync_seen > 0 && !({txdata, txk} == {16'hBCB5, 2'b10} || {txdata, txk} == {16'hBC42, 2'b10})) begin
        failures++; $display("bad idle %h k%b", txdata, txk);
      end
    end else begin
      if (txk == 2'b11) begin
        checks++; if (txdata != 16'hFDF7) failures++;
        in_pkt <= 1'b0; n_pkts++;
        check_packet();
      end else begin
        checks++; if (txk != 2'b00) failures++;
        bytes.push_back(txdata[15:8]); bytes.push_back(txdata[7:0]);
      end
    end
  end

  initial begin
    repeat (10) @(posedge clk); @(negedge clk); rst = 0;
    checks++; if (sync_seen < 8) begin failures++; $display("sync %0d", sync_seen); end
    // phase 1: whole events, long and short, pae_n low
    for (int e = 0; e < 12; e++) add_event($urandom_range(1, 20), 1'b1, 1'b0);
    wait (fq.size() == 0); wait (pk_idx == exp_pk.size());
    // phase 2: pae_n high allows short gaps
    pae_n = 1;
    for (int e = 0; e < 6; e++) add_event($urandom_range(1, 12), 1'b1, 1'b0);
    wait (fq.size() == 0); wait (pk_idx == exp_pk.size());
    pae_n = 0;
    // phase 3: part of an event, then the FIFO runs empty: the packet ends there
    repeat (200) @(posedge clk);
    add_event(3, 1'b0, 1'b1); n_mt_end++;
    wait (pk_idx == exp_pk.size());
    add_event(2, 1'b1, 1'b0);
    wait (pk_idx == exp_pk.size());
    repeat (100) @(posedge clk);
    checks++; if (in_pkt) failures++;
    $display("packets=%0d split=%0d filled=%0d empty_end=%0d short_gaps=%0d", n_pkts, n_split, n_fill, n_mt_end, n_short_gap);
    checks++; if (n_split == 0 || n_fill == 0 || n_short_gap == 0 || n_pkts != exp_pk.size()) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
