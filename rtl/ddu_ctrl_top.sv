// ddu_ctrl_top: central control FPGA of the CMS CSC Detector-Dependent Unit (DDU).
//
// The DDU collects the data of up to 15 DMB (DAQ motherboard) fibers for each Level-1 Accept and
// ships one event per trigger to the S-Link/DCC path and, through an external FIFO, to a
// Gigabit-Ethernet spy link. This FPGA is the central controller:
//   - l1a_counter, bxn_counter and bx_orbit_reg number each trigger and bunch crossing; each
//     trigger pushes {L1A number, BXN} into the L1A FIFO (sync_fifo).
//   - readout_ctrl builds the event: DDU header, the DMB block of every live fiber read from the
//     external input FIFOs, DDU trailer with word count and CRC-16, writing it to the S-Link port
//     and to the GbE FIFO's write port. It stops while the S-Link or DCC is full.
//   - fmm_ctrl reports BUSY / Warning / Lost Sync / Error to the trigger throttling system.
//   - a JTAG user-instruction decoder (jtag_decode) selects the read-out registers: one capture-
//     and-shift status register (jtag_status_sr) multiplexed over the status words, the kill
//     register (which readout paths are alive) and the BX-per-orbit register.
//   - gbe_tx frames the GbE FIFO's contents into Ethernet packets on the transceiver's 16-bit
//     interface (its own clock, rclk); gbe_rx captures the receive side.
//   - iddr40 captures a 40-bit double-data-rate input bus into 80-bit words; fiber_led and
//     led_debug_mux drive the front-panel LEDs and the logic-analyser header.
// The external parts (input FIFOs, GbE FIFO, transceiver, S-Link card) are reached through ports.
//
// Clocks: clk is the readout/control clock (the JTAG user-register strobes are taken as
// synchronous to it); rclk is the GbE transmit clock, with the dual-clock GbE FIFO between the
// two. rst is the asynchronous board reset; JTAG opcode 1 gives a soft reset of one cycle that
// acts as a sync reset (counters, FMM).
//
// The block set, the opcode table, the FMM bits, the kill-mask layout and the S-Link/DCC stop
// follow the documentation. The mapping of status words to JTAG opcodes where the documentation
// gives only a title, the bits taken from the read controllers' status, the debug signal choice and
// the single control clock are this design's choices.
module ddu_ctrl_top
  import ddu_pkg::*;
#(
  parameter int NFIB          = 15,
  parameter int START_TMO     = 128,
  parameter int CAL_START_TMO = 256,
  parameter int END_TMO       = 18945,
  parameter int L1A_DEPTH     = 16,
  parameter int MAX_DATA_BYTES = 8960,
  parameter int GBE_WAIT_CYC  = 1280,
  parameter int BLINK_BITS    = 24
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  rclk,
  // trigger
  input  logic                  l1a,
  input  logic                  dump_mode,
  input  logic                  cal_mode,
  output logic                  cal_auto_l1,  // CFEB calibration auto-L1A enable (JTAG toggle)
  output logic                  bc0,          // BX number is 0
  // switches: mode bits [3:0] select the LED mode, version_sw shows the firmware version
  input  logic [3:0]            mode_sw,
  input  logic                  version_sw,
  input  logic [15:0]           board_id,
  // input FIFOs (external), first word fall through
  input  logic [NFIB-1:0][63:0] fifo_data,
  input  logic [NFIB-1:0]       fifo_empty,
  output logic [NFIB-1:0]       fifo_ren,
  input  logic [NFIB-1:0]       fiber_ok,
  input  logic [NFIB-1:0]       fiber_present,
  input  logic                  in_fifo_afull,
  input  logic                  in_fifo_full,
  // input read controllers' FMM-coded status and the received FMM state
  input  logic [3:0][3:0]       rd_ctrl_stat,
  input  logic [3:0]            real_fmm,
  output logic [3:0]            fmm,
  output logic [3:0]            tts_stat,
  // S-Link / DCC output path
  input  logic                  slink_ff_n,   // S-Link not full
  input  logic                  dcc_paf_n,    // DCC not almost full
  output logic [63:0]           slink_data,
  output logic                  slink_wen,
  output logic                  slink_ctrl,   // high on the first and last word of an event
  // GbE FIFO (external, dual clock): write side on clk, read side on rclk
  output logic [64:0]           gfifo_wdata,  // {end of event, data}
  output logic                  gfifo_wen,
  input  logic                  gfifo_paf_n,
  input  logic [64:0]           gfifo_rdata,
  input  logic                  gfifo_empty,
  input  logic                  gfifo_pae_n,
  output logic                  gfifo_ren,
  // GbE transceiver parallel interface (rclk)
  output logic [15:0]           gbe_txdata,
  output logic [1:0]            gbe_txcharisk,
  input  logic                  gbe_rxdv,
  input  logic [15:0]           gbe_rxdata,
  output logic [63:0]           gbe_rx_word,
  output logic                  gbe_rx_valid,
  // 40-bit DDR input bus
  input  logic [39:0]           ddr_in,
  output logic [79:0]           ddr_word,
  // JTAG user data path (SEL2, shift, update strobes, instruction register contents)
  input  logic [5:0]            jtag_instr,
  input  logic                  jtag_sel,
  input  logic                  jtag_shift,
  input  logic                  jtag_update,
  input  logic                  jtag_tdi,
  output logic                  jtag_tdo,
  // front panel
  output logic [NFIB-1:0]       fok_led,
  output logic [NFIB-1:0]       dav_led,
  output logic [7:0]            led_n,
  output logic [15:0]           la
);
  // ---- resets -----------------------------------------------------------------------------------
  logic soft_rst, vme_l1a, ctl_rst;
  logic [NUM_OPS-1:0] fsel;
  assign ctl_rst = rst | soft_rst;

  jtag_decode u_dec (
    .clk(clk), .rst(rst), .instr(jtag_instr), .fsel(fsel),
    .soft_rst_pulse(soft_rst), .vme_l1a_pulse(vme_l1a), .cal_auto_l1(cal_auto_l1)
  );

  // ---- trigger numbering ----------------------------------------------------------------------
  logic [23:0] l1a_num;
  logic        l1a_strobe;
  logic [11:0] bxn, bx_lim;
  logic        bxo_tdo, kill_tdo, stat_tdo;

  l1a_counter #(.W(24)) u_l1a (
    .clk(clk), .rst(rst), .sync_rst(soft_rst), .l1a(l1a), .vme_l1a(vme_l1a),
    .l1a_num(l1a_num), .l1a_strobe(l1a_strobe)
  );

  bx_orbit_reg u_bxo (
    .clk(clk), .rst(rst), .sel(jtag_sel), .load(fsel[OP_LD_BXORB]), .read(fsel[OP_RD_BXORB]),
    .shift(jtag_shift), .update(jtag_update), .tdi(jtag_tdi), .tdo(bxo_tdo), .bx_lim(bx_lim)
  );

  bxn_counter u_bxn (
    .clk(clk), .rst(rst), .clr(soft_rst), .bx_lim(bx_lim), .bxn(bxn), .bc0(bc0)
  );

  // ---- L1A FIFO ---------------------------------------------------------------------------------
  logic [35:0] l1f_dout;
  logic        l1f_empty, l1f_full, l1f_afull, l1f_ovf, l1f_pop;
  logic [$clog2(L1A_DEPTH+1)-1:0] l1f_count;

  sync_fifo #(.W(36), .DEPTH(L1A_DEPTH)) u_l1f (
    .clk(clk), .rst(ctl_rst), .push(l1a_strobe), .din({l1a_num + 24'd1, bxn}),
    .pop(l1f_pop), .dout(l1f_dout), .empty(l1f_empty), .full(l1f_full), .afull(l1f_afull),
    .overflow(l1f_ovf), .count(l1f_count)
  );

  // ---- kill register ----------------------------------------------------------------------------
  logic [19:0] kill_n;
  kill_register #(.W(20)) u_kill (
    .clk(clk), .rst(rst), .sel(jtag_sel), .load(fsel[OP_LD_KILL]), .check(fsel[OP_RD_KILL]),
    .shift(jtag_shift), .update(jtag_update), .tdi(jtag_tdi), .tdo(kill_tdo), .kill_n(kill_n)
  );

  // ---- event builder ----------------------------------------------------------------------------
  ctrl_bits_t      ctrl;
  logic [NFIB-1:0] tmo_start, tmo_end, l1a_mism, first_err, dmb_err;
  logic [15:0]     crc_err_cnt, evt_cnt;
  logic [31:0]     ddu_status;
  logic            busy, first_hdr, first_dat, out_stop, out_wen, out_boe, out_eoe;
  logic [63:0]     out_data;

  assign out_stop = !slink_ff_n || !dcc_paf_n || !gfifo_paf_n;

  readout_ctrl #(
    .NFIB(NFIB), .START_TMO(START_TMO), .CAL_START_TMO(CAL_START_TMO), .END_TMO(END_TMO)
  ) u_ro (
    .clk(clk), .rst(ctl_rst),
    .l1a_empty(l1f_empty), .l1a_dout(l1f_dout), .l1a_pop(l1f_pop),
    .fifo_data(fifo_data), .fifo_empty(fifo_empty), .fifo_ren(fifo_ren),
    .kill_n(kill_n[NFIB-1:0]), .fiber_ok(fiber_ok), .board_id(board_id[7:0]),
    .cal_mode(cal_mode), .dump_mode(dump_mode),
    .fifo_afull_in(in_fifo_afull), .fifo_full_in(in_fifo_full), .fmm(fmm),
    .out_stop(out_stop), .out_data(out_data), .out_wen(out_wen), .out_boe(out_boe),
    .out_eoe(out_eoe),
    .ctrl(ctrl), .tmo_start(tmo_start), .tmo_end(tmo_end), .l1a_mism(l1a_mism),
    .first_err(first_err), .dmb_err(dmb_err), .crc_err_cnt(crc_err_cnt), .ddu_status(ddu_status), .busy(busy),
    .evt_cnt(evt_cnt), .first_hdr(first_hdr), .first_dat(first_dat)
  );

  assign slink_data  = out_data;
  assign slink_wen   = out_wen;
  assign slink_ctrl  = out_boe | out_eoe;
  assign gfifo_wdata = {out_eoe, out_data};
  assign gfifo_wen   = out_wen;

  // ---- FMM ----------------------------------------------------------------------------------------
  logic [3:0] rdc_full, rdc_warn;
  logic [5:0] in_rd_full, in_rd_warn;
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      rdc_full[k] = rd_ctrl_stat[k][FMM_SYNC];
      rdc_warn[k] = rd_ctrl_stat[k][FMM_WARN];
    end
  end

  fmm_ctrl u_fmm (
    .clk(clk), .softrst(ctl_rst), .busy_in(l1f_ovf), .rd_ctrl_full(rdc_full),
    .l1a_ff(l1f_full), .ff(in_fifo_full), .rd_ctrl_warn(rdc_warn), .l1a_af(l1f_afull),
    .paf(!gfifo_paf_n), .crit_err(ctrl.critical_err), .real_fmm(real_fmm),
    .in_rd_full(in_rd_full), .in_rd_warn(in_rd_warn), .fmm(fmm), .tts_stat(tts_stat)
  );

  // ---- JTAG status read-out -----------------------------------------------------------------------
  logic [31:0] stat_word;
  logic        stat_sel;
  always_comb begin
    stat_sel  = 1'b1;
    stat_word = '0;
    unique case (jtag_op_e'(jtag_instr))
      OP_RD_L1A:      stat_word = 32'(l1a_num);
      OP_STAT32:      stat_word = ddu_status;
      OP_STAT_LO:     stat_word = 32'(ddu_status[15:0]);
      OP_STAT_HI:     stat_word = 32'(ddu_status[31:16]);
      OP_OUT_STAT:    stat_word = 32'({busy, out_stop, !slink_ff_n, !dcc_paf_n, !gfifo_paf_n,
                                       l1f_empty, l1f_full, l1f_afull, fmm, tts_stat});
      OP_FOK:         stat_word = 32'(fiber_ok);
      OP_L1A_MISM:    stat_word = 32'(l1a_mism);
      OP_FIFO_ERR:    stat_word = 32'(first_err);
      OP_DMB_ERR:     stat_word = 32'(dmb_err);
      OP_TMO_START:   stat_word = 32'(tmo_start);
      OP_TMO_ENDWAIT: stat_word = 32'(tmo_end);
      OP_AFULL:       stat_word = 32'(in_rd_warn);
      OP_FULL:        stat_word = 32'(in_rd_full);
      OP_EMPTY:       stat_word = 32'(fifo_empty);
      OP_CRC_ERR:     stat_word = 32'(crc_err_cnt);
      OP_ERR_A:       stat_word = 32'(ctrl);
      OP_ERR_B:       stat_word = 32'({fmm, tts_stat, 2'b00, in_rd_full});
      OP_ERR_C:       stat_word = 32'(evt_cnt);
      OP_RD_BOARDID:  stat_word = 32'(board_id);
      default:        stat_sel  = 1'b0;
    endcase
  end

  jtag_status_sr #(.W(32)) u_stat (
    .clk(clk), .rst(rst), .dvcenb(stat_sel), .sel(jtag_sel), .shift(jtag_shift),
    .tdi(jtag_tdi), .status(stat_word), .tdo(stat_tdo)
  );

  always_comb begin
    if (fsel[OP_LD_BXORB] || fsel[OP_RD_BXORB])    jtag_tdo = bxo_tdo;
    else if (fsel[OP_LD_KILL] || fsel[OP_RD_KILL]) jtag_tdo = kill_tdo;
    else                                           jtag_tdo = stat_tdo;
  end

  // ---- GbE side (rclk) ----------------------------------------------------------------------------
  logic [1:0] rrst_sync;
  logic       rrst;
  always_ff @(posedge rclk or posedge rst) begin
    if (rst) rrst_sync <= 2'b11;
    else     rrst_sync <= {rrst_sync[0], 1'b0};
  end
  assign rrst = rrst_sync[1];

  logic [15:0] pkt_num;
  logic        pkt_end;
  gbe_tx #(.MAX_DATA_BYTES(MAX_DATA_BYTES), .WAIT_CYC(GBE_WAIT_CYC)) u_gtx (
    .clk(rclk), .rst(rrst), .fifo_dout(gfifo_rdata[63:0]), .fifo_eoe(gfifo_rdata[64]),
    .fifo_empty(gfifo_empty), .fifo_pae_n(gfifo_pae_n), .fifo_ren(gfifo_ren),
    .txdata(gbe_txdata), .txcharisk(gbe_txcharisk), .pkt_num(pkt_num), .pkt_end(pkt_end)
  );

  logic        lrxdv;
  logic [15:0] rx_do;
  gbe_rx u_grx (
    .clk(rclk), .rst(rrst), .rxdv(gbe_rxdv), .rx_dout(gbe_rxdata), .lrxdv(lrxdv), .rx_do(rx_do),
    .word(gbe_rx_word), .word_valid(gbe_rx_valid)
  );

  // ---- DDR input bus ------------------------------------------------------------------------------
  iddr40 #(.W(40)) u_ddr (.clk(clk), .clr(rst), .din(ddr_in), .q(ddr_word));

  // ---- front panel --------------------------------------------------------------------------------
  for (genvar i = 0; i < NFIB; i++) begin : g_led
    fiber_led #(.BLINK_BITS(BLINK_BITS)) u_fl (
      .clk(clk), .rst(rst), .present(fiber_present[i]), .fok(fiber_ok[i]), .dav(!fifo_empty[i]),
      .fok_led(fok_led[i]), .dav_led(dav_led[i])
    );
  end

  logic ldofw2;
  always_ff @(posedge clk) ldofw2 <= ctrl.first_word;   // first-word flag, two stages late

  led_debug_mux u_dbg (
    .led_mode(mode_sw), .show_version(version_sw),
    .we_n(!out_wen), .l1a_push(l1a_strobe), .l1a_pop(l1f_pop), .l1a_mt(l1f_empty),
    .sd_shift(kill_n[15:0]),
    .first_dat(first_dat), .first_hdr(first_hdr), .lsecond_hdr(ctrl.do_header),
    .stat_code(|ctrl.voted_sb), .golddat(ctrl.gold_data), .firstdat_err(|first_err),
    .second_hdr_first(1'b0), .lvb15(ctrl.voted_sb[3]), .ldofw2(ldofw2),
    .lgoodfw(ctrl.first_word), .dlfifo_mt(&fifo_empty), .moredata(busy),
    .linl1err(|l1a_mism), .l1a_error(ctrl.l1a_mismatch), .single_error(ctrl.ddu_err),
    .led_n(led_n), .la(la)
  );
endmodule
