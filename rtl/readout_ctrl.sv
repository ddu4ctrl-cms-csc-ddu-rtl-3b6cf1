// readout_ctrl: event builder of the DDU central control FPGA.
//
// For every accepted trigger waiting in the L1A FIFO the controller writes one event to the output
// path (S-Link/DCC and the GbE FIFO), 64 bits per word:
//   H1  {0x5, 0x0, L1A number[23:0], BXN[11:0], source id[11:0], 0x00}
//   H2  0x8000_0001_8000_8000
//   H3  {DDU status[31:0], live-fiber mask[15:0], 12'h000, number of live fibers[3:0]}
//   the DMB block of every live fiber, fiber 0 first, copied word by word from its input FIFO
//   T-1 {DDU status[31:0], fibers that sent data[15:0], 12'h000, number of DMB blocks[3:0]}
//   T-2 0x8000_FFFF_8000_8000
//   TR  {0xA, 0x0, word count[23:0], CRC-16[15:0], status[7:0], FMM[3:0], 0x0}
// The word count includes the six DDU words, so an event without DMB data is 6 words long, and the
// CRC-16 covers every word before TR.
//
// A fiber is live when its kill-mask bit is 1 and its link is OK. For each live fiber the
// controller waits for its FIFO to become non-empty; if it stays empty for START_TMO cycles
// (CAL_START_TMO in calibration mode) the fiber gets a start timeout and is skipped. It then moves
// words while the FIFO is non-empty; the block ends with the word whose voted special bits
// (bits 15..12 of the four 16-bit words, 2 of 4) read 0xE. If the FIFO stays empty inside a
// block for END_TMO cycles the fiber gets an end timeout (critical) and is abandoned. The first
// word of a block must carry special code 0x9 and its L1A number {HDR3[11:0], HDR2[11:0]} must equal
// the DDU's; otherwise a first-word or L1A-mismatch error is flagged. Words whose four copies of
// the special bits disagree flag a DDU error, count in crc_err_cnt and mark the fiber in dmb_err
// (the "DMB errors" status register). A change of any fiber's link-OK flag is flagged too.
// While out_stop (DCC almost full or S-Link not ready) is high no word moves and no event starts.
// In dump mode the controller does not wait for the L1A FIFO: it starts an event whenever a live
// FIFO has data and numbers it from its own counter.
//
// Input FIFOs are read first-word-fall-through: fifo_data[i] is valid while fifo_empty[i] is low
// and fifo_ren[i] takes it. The header/trailer layout, the word-count rule, the timeouts, the
// control-bit list and the stop rule follow the documentation; the contents of the status fields,
// the last-word rule and the FWFT handshake are this design's reading of it.
module readout_ctrl
  import ddu_pkg::*;
#(
  parameter int NFIB          = 15,
  parameter int START_TMO     = 128,
  parameter int CAL_START_TMO = 256,
  parameter int END_TMO       = 18945
) (
  input  logic                  clk,
  input  logic                  rst,
  // L1A FIFO (first word fall through): {L1A number, BXN}
  input  logic                  l1a_empty,
  input  logic [35:0]           l1a_dout,
  output logic                  l1a_pop,
  // input FIFOs
  input  logic [NFIB-1:0][63:0] fifo_data,
  input  logic [NFIB-1:0]       fifo_empty,
  output logic [NFIB-1:0]       fifo_ren,
  // configuration and state
  input  logic [NFIB-1:0]       kill_n,
  input  logic [NFIB-1:0]       fiber_ok,
  input  logic [7:0]            board_id,
  input  logic                  cal_mode,
  input  logic                  dump_mode,
  input  logic                  fifo_afull_in,
  input  logic                  fifo_full_in,
  input  logic [3:0]            fmm,
  // output path
  input  logic                  out_stop,
  output logic [63:0]           out_data,
  output logic                  out_wen,
  output logic                  out_boe,
  output logic                  out_eoe,
  // status
  output ctrl_bits_t            ctrl,
  output logic [NFIB-1:0]       tmo_start,
  output logic [NFIB-1:0]       tmo_end,
  output logic [NFIB-1:0]       l1a_mism,
  output logic [NFIB-1:0]       first_err,
  output logic [15:0]           crc_err_cnt,   // words with inconsistent special bits
  output logic [NFIB-1:0]       dmb_err,       // fiber sent a word with inconsistent special bits
  output logic [31:0]           ddu_status,
  output logic                  busy,
  output logic [15:0]           evt_cnt,
  output logic                  first_hdr,
  output logic                  first_dat
);
  localparam int FW = (NFIB > 1) ? $clog2(NFIB) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_H1, S_H2, S_H3, S_SEL, S_WSTART, S_DATA, S_T1, S_T2, S_TR
  } state_e;

  state_e        st;
  logic [FW-1:0] fib;
  logic [15:0]   timer;
  logic [23:0]   ev_l1a;
  logic [11:0]   ev_bxn;
  logic [23:0]   wc;
  logic [23:0]   own_l1a;
  logic [NFIB-1:0] live, got_data, fok_q;
  logic [3:0]    ndmb;
  logic          first_word;
  logic          ev_err, ev_crit, ev_mism;
  logic [63:0]   cur;
  logic          cur_mt;
  logic [15:0]   crc;
  logic          crc_init, crc_en;
  logic [3:0]    vb, notall, lvb;
  logic          lnotall;
  logic          xfer;      // a DMB word moves this cycle
  logic          emit;      // any word is written this cycle
  logic [63:0]   word;

  assign live   = kill_n & fiber_ok;
  assign cur    = fifo_data[fib];
  assign cur_mt = fifo_empty[fib];

  function automatic logic [3:0] popcount4(input logic [NFIB-1:0] v);
    logic [4:0] n;
    n = '0;
    for (int k = 0; k < NFIB; k++) n += {4'd0, v[k]};
    return n[3:0];
  endfunction

  special_word_check u_swc (
    .clk(clk), .rst(rst), .en(xfer), .data(cur),
    .vb(vb), .notall(notall), .lvb(lvb), .lnotall(lnotall)
  );

  ddu_crc16 u_crc (
    .clk(clk), .rst(rst), .init(crc_init), .en(crc_en), .data(word), .crc(crc)
  );

  // ---- output word of the current state ---------------------------------------------------
  logic [7:0] tr_status;
  assign tr_status = {ev_crit, ev_err, ev_mism, |(tmo_start & live), |(tmo_end & live),
                      fifo_full_in, fifo_afull_in, ctrl.link_changed};
  assign ddu_status = {ctrl, 16'(tmo_start) | 16'(tmo_end) | 16'(l1a_mism) | 16'(first_err)};

  always_comb begin
    unique case (st)
      S_H1:    word = {BOE_NIBBLE, 4'h0, ev_l1a, ev_bxn, 4'h1, board_id, 8'h00};
      S_H2:    word = DDU_H2;
      S_H3:    word = {ddu_status, 16'(live), 12'h000, popcount4(live)};
      S_T1:    word = {ddu_status, 16'(got_data), 12'h000, ndmb};
      S_T2:    word = DDU_T2;
      S_TR:    word = {EOE_NIBBLE, 4'h0, wc + 24'd1, crc, tr_status, fmm, 4'h0};
      default: word = cur;
    endcase
  end

  logic hdr_tr_state;
  assign hdr_tr_state = (st == S_H1) || (st == S_H2) || (st == S_H3) ||
                        (st == S_T1) || (st == S_T2) || (st == S_TR);
  assign xfer     = (st == S_DATA) && !cur_mt && !out_stop;
  assign emit     = (hdr_tr_state && !out_stop) || xfer;
  assign crc_en   = emit && (st != S_TR);
  assign crc_init = (st == S_IDLE);

  always_comb begin
    fifo_ren = '0;
    if (xfer) fifo_ren[fib] = 1'b1;
  end

  assign out_data = word;
  assign out_wen  = emit;
  assign out_boe  = emit && (st == S_H1);
  assign out_eoe  = emit && (st == S_TR);
  assign busy     = (st != S_IDLE);
  assign first_hdr = emit && (st == S_H1);
  assign first_dat = xfer && first_word;

  logic start_ok;
  assign start_ok = !out_stop && (dump_mode ? |(~fifo_empty & live) : !l1a_empty);
  assign l1a_pop  = (st == S_IDLE) && start_ok && !dump_mode;

  // ---- next fiber helper ------------------------------------------------------------------
  logic last_fib;
  assign last_fib = (fib == FW'(NFIB-1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st <= S_IDLE; fib <= '0; timer <= '0; ev_l1a <= '0; ev_bxn <= '0; wc <= '0;
      own_l1a <= '0; got_data <= '0; ndmb <= '0; first_word <= 1'b0;
      ev_err <= 1'b0; ev_crit <= 1'b0; ev_mism <= 1'b0;
      tmo_start <= '0; tmo_end <= '0; l1a_mism <= '0; first_err <= '0; crc_err_cnt <= '0; dmb_err <= '0;
      evt_cnt <= '0; fok_q <= '0; ctrl <= '0;
    end else begin
      fok_q <= fiber_ok;
      // control word: per-cycle bits
      ctrl.gold_data    <= xfer;
      ctrl.first_word   <= xfer && first_word;
      ctrl.voted_sb     <= lvb;
      ctrl.do_header    <= (st == S_H1) || (st == S_H2) || (st == S_H3);
      ctrl.wc_enable    <= emit;
      ctrl.end_of_event <= emit && (st == S_TR);
      ctrl.fifo_afull   <= ctrl.fifo_afull | fifo_afull_in;
      ctrl.fifo_full    <= ctrl.fifo_full | fifo_full_in;
      ctrl.link_changed <= ctrl.link_changed | (st != S_IDLE && fok_q != fiber_ok);
      ctrl.ddu_err      <= ctrl.ddu_err | ev_err;
      ctrl.critical_err <= ctrl.critical_err | ev_crit;
      ctrl.l1a_mismatch <= ctrl.l1a_mismatch | ev_mism;
      ctrl.wc_crc_mismatch <= 1'b0;

      if (emit) wc <= wc + 24'd1;

      unique case (st)
        S_IDLE: begin
          wc <= '0; got_data <= '0; ndmb <= '0;
          ev_err <= 1'b0; ev_crit <= 1'b0; ev_mism <= 1'b0;
          if (start_ok) begin
            own_l1a <= own_l1a + 24'd1;
            if (dump_mode) begin
              ev_l1a <= own_l1a + 24'd1; ev_bxn <= '0;
            end else begin
              ev_l1a <= l1a_dout[35:12]; ev_bxn <= l1a_dout[11:0];
            end
            st <= S_H1;
          end
        end
        S_H1: if (!out_stop) st <= S_H2;
        S_H2: if (!out_stop) st <= S_H3;
        S_H3: if (!out_stop) begin st <= S_SEL; fib <= '0; end
        S_SEL: begin
          timer <= '0;
          first_word <= 1'b1;
          if (live[fib]) st <= S_WSTART;
          else if (last_fib) st <= S_T1;
          else fib <= fib + 1'b1;
        end
        S_WSTART: begin
          if (!cur_mt) begin
            st <= S_DATA; timer <= '0;
          end else if (32'(timer) >= (cal_mode ? CAL_START_TMO : START_TMO) - 1) begin
            tmo_start[fib] <= 1'b1;
            ev_err <= 1'b1;
            if (last_fib) st <= S_T1; else begin fib <= fib + 1'b1; st <= S_SEL; end
          end else timer <= timer + 16'd1;
        end
        S_DATA: begin
          if (xfer) begin
            timer <= '0;
            first_word <= 1'b0;
            got_data[fib] <= 1'b1;
            if (|notall) begin
              ev_err <= 1'b1;
              crc_err_cnt <= crc_err_cnt + 16'd1;
              dmb_err[fib] <= 1'b1;
            end
            if (first_word) begin
              if (vb != 4'h9) begin first_err[fib] <= 1'b1; ev_err <= 1'b1; end
              if ({cur[43:32], cur[27:16]} != ev_l1a) begin
                l1a_mism[fib] <= 1'b1; ev_mism <= 1'b1; ev_err <= 1'b1;
              end
            end
            if (vb == 4'hE) begin
              ndmb <= ndmb + 4'd1;
              if (last_fib) st <= S_T1; else begin fib <= fib + 1'b1; st <= S_SEL; end
            end
          end else if (cur_mt) begin
            if (32'(timer) >= END_TMO - 1) begin
              tmo_end[fib] <= 1'b1;
              ev_err <= 1'b1; ev_crit <= 1'b1;
              if (last_fib) st <= S_T1; else begin fib <= fib + 1'b1; st <= S_SEL; end
            end else timer <= timer + 16'd1;
          end
        end
        S_T1: if (!out_stop) st <= S_T2;
        S_T2: if (!out_stop) st <= S_TR;
        S_TR: if (!out_stop) begin st <= S_IDLE; evt_cnt <= evt_cnt + 16'd1; end
        default: st <= S_IDLE;
      endcase
    end
  end

  // The output path must never be written while it asked to stop.
  assert property (@(posedge clk) disable iff (rst) out_stop |-> !out_wen);
endmodule
