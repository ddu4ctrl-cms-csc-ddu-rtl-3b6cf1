// fmm_ctrl: FMM (trigger throttling) state of the DDU.
//
// Produces the 4-bit FMM word sent to the trigger system: bit 0 BUSY (not ready), bit 1 Warning
// (near full), bit 2 Lost Sync (a sync reset is needed), bit 3 Error (a hard reset is needed).
// Inputs are gathered as in the documentation: IN_RD_FULL[3:0] from the four input read
// controllers plus the L1A FIFO full and the output FIFO full make IN_RD_FULL[5:0], which is read
// as Lost Sync; IN_RD_WARN[5:0] (controller warnings, L1A FIFO almost full, output FIFO
// programmable almost full) make Warning. BUSY is high during reset and while busy_in is high;
// Error is set by a critical error and held until reset. The received REAL_FMM bits pass two
// registers (REAL_TTS, TTS_STAT) cleared by SOFTRST. The output register, the stickiness of Error
// and the use of SOFTRST also for the FMM word are this design's choice.
module fmm_ctrl
  import ddu_pkg::*;
(
  input  logic       clk,
  input  logic       softrst,      // asynchronous, active high
  input  logic       busy_in,
  input  logic [3:0] rd_ctrl_full, // IN_RD_FULL[3:0]
  input  logic       l1a_ff,
  input  logic       ff,
  input  logic [3:0] rd_ctrl_warn, // IN_RD_WARN[3:0]
  input  logic       l1a_af,
  input  logic       paf,
  input  logic       crit_err,
  input  logic [3:0] real_fmm,
  output logic [5:0] in_rd_full,
  output logic [5:0] in_rd_warn,
  output logic [3:0] fmm,
  output logic [3:0] tts_stat
);
  logic [3:0] real_tts;
  logic       err_latch;

  assign in_rd_full = {ff, l1a_ff, rd_ctrl_full};
  assign in_rd_warn = {paf, l1a_af, rd_ctrl_warn};

  always_ff @(posedge clk or posedge softrst) begin
    if (softrst) begin
      real_tts <= '0;
      tts_stat <= '0;
    end else begin
      real_tts <= real_fmm;
      tts_stat <= real_tts;
    end
  end

  always_ff @(posedge clk or posedge softrst) begin
    if (softrst) begin
      err_latch <= 1'b0;
      fmm       <= 4'b0001;   // BUSY during reset
    end else begin
      if (crit_err) err_latch <= 1'b1;
      fmm[FMM_BUSY] <= busy_in;
      fmm[FMM_WARN] <= |in_rd_warn;
      fmm[FMM_SYNC] <= |in_rd_full;
      fmm[FMM_ERR]  <= err_latch | crit_err;
    end
  end
endmodule
