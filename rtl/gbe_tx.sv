// gbe_tx: Gigabit-Ethernet transmit framer for the DDU's spy/readout link.
//
// Runs on the transceiver's 16-bit transmit clock (two 8b/10b characters per cycle; the upper
// byte of txdata is the earlier one on the wire, txcharisk marks K characters). It reads 64-bit
// DDU words, each tagged with an end-of-event flag, from an external first-word-fall-through FIFO
// and wraps them into Ethernet frames:
//   reset   : configuration words {K28.5,D21.5} and {K28.5,D2.2}, alternating (link sync)
//   idle    : {K28.5,D16.2}
//   header  : 8 bytes, /S/ (K27.7) then six 0x55 preamble bytes and the 0xD5 frame delimiter
//   dest    : 4 bytes 0xFF (broadcast destination)
//   data    : each FIFO word as 8 bytes, byte 0 (bits 7:0) first; the FIFO is read on the last
//             pair of bytes of a word. A four-stage one-hot shift register steps the byte pairs.
//   filler  : if fewer than FILL_BELOW data bytes were sent, a 2-byte count of the real data bytes
//             and then 0xFF bytes up to MIN_BYTES bytes of payload
//   pkt num : 2-byte packet number, counting from 0
//   CRC32   : 4 bytes, IEEE 802.3 frame check sequence over dest..pkt num, lowest byte first
//   trailer : /T/ (K29.7), /R/ (K23.7)
// A frame ends after the FIFO word carrying end-of-event, when MAX_DATA_BYTES data bytes have been
// sent, or when the FIFO runs empty between words, so an event end always ends a frame. Between
// frames at least two idle words are sent, and a new frame starts only WAIT_CYC cycles after the
// previous one ended (20.48 us at 62.5 MHz) unless the FIFO's programmable-almost-empty output
// pae_n is high (more than about 1k words stored).
//
// The sequence (sync in reset, idle, header, 4 destination bytes, data, filler, packet number,
// CRC32, 2-byte trailer, idles), the 8960-byte limit, the 20.48 us wait and the ~PAE override
// follow the documentation. The documentation gives the filler threshold once as 56 and once as
// 48 bytes; this design fills below 56. The K-codes of the start and end delimiters, the preamble
// bytes, the byte order of a 64-bit word and the first-word-fall-through FIFO are this design's
// choices. Reset is synchronous.
module gbe_tx
  import ddu_pkg::*;
#(
  parameter int MAX_DATA_BYTES = 8960,
  parameter int WAIT_CYC       = 1280,
  parameter int MIN_BYTES      = 64,
  parameter int FILL_BELOW     = 56
) (
  input  logic        clk,
  input  logic        rst,          // synchronous
  input  logic [63:0] fifo_dout,
  input  logic        fifo_eoe,
  input  logic        fifo_empty,
  input  logic        fifo_pae_n,
  output logic        fifo_ren,
  output logic [15:0] txdata,
  output logic [1:0]  txcharisk,
  output logic [15:0] pkt_num,
  output logic        pkt_end       // pulses as the trailer word goes out
);
  typedef enum logic [2:0] { S_SYNC, S_IDLE, S_HDR, S_DEST, S_DATA, S_TAIL } state_e;

  state_e      st;
  logic [2:0]  cnt;
  logic [3:0]  lane_oh;   // one-hot byte-pair lane of the current FIFO word
  logic [1:0]  lane;
  logic [5:0]  tcnt;
  logic [15:0] data_bytes;
  logic [15:0] gap;
  logic [1:0]  idle_n;
  logic        ph;
  logic [31:0] crc, fcs;

  logic [15:0] nxt_d;
  logic [1:0]  nxt_k;
  logic        content;     // nxt word goes into the CRC
  logic        tail_now;    // FIFO empty at a word boundary: tail starts this cycle
  logic [5:0]  tpos;        // tail position of the word being produced
  logic        fill;
  logic [5:0]  nfill;       // words of filler incl. the byte-count word
  logic        go;

  // Lane sequencer: a single one circulating through four stages, restarted outside the data phase.
  one_hot_sr #(.W(4)) u_lane (
    .clk(clk), .arst(1'b0), .srst(rst || st != S_DATA), .ce((st == S_DATA) && !tail_now),
    .sli(lane_oh[3]), .q(lane_oh)
  );
  always_comb begin
    lane = 2'd0;
    for (int k = 0; k < 4; k++) if (lane_oh[k]) lane = 2'(k);
  end

  assign fill     = (data_bytes < 16'(FILL_BELOW));
  assign nfill    = fill ? 6'((MIN_BYTES - 32'(data_bytes)) / 2) : 6'd0;
  assign tail_now = (st == S_DATA) && (lane == 2'd0) && fifo_empty;
  assign tpos     = tail_now ? 6'd0 : tcnt;
  assign go       = !fifo_empty && (idle_n == 2'd2) && ((32'(gap) >= WAIT_CYC) || fifo_pae_n);
  assign fifo_ren = (st == S_DATA) && (lane == 2'd3);

  function automatic logic [15:0] sub_word(input logic [63:0] w, input logic [1:0] l);
    return {w[16*l +: 8], w[16*l + 8 +: 8]};
  endfunction

  always_comb begin
    nxt_d   = {K28_5[7:0], D16_2[7:0]};
    nxt_k   = 2'b10;
    content = 1'b0;
    unique case (st)
      S_SYNC: begin
        nxt_d = ph ? {K28_5[7:0], D2_2[7:0]} : {K28_5[7:0], D21_5[7:0]};
        nxt_k = 2'b10;
      end
      S_IDLE: begin
        if (go) begin
          nxt_d = {K27_7[7:0], 8'h55};
          nxt_k = 2'b10;
        end
      end
      S_HDR: begin
        nxt_d = (cnt == 3'd3) ? 16'h55D5 : 16'h5555;
        nxt_k = 2'b00;
      end
      S_DEST: begin
        nxt_d = 16'hFFFF; nxt_k = 2'b00; content = 1'b1;
      end
      S_DATA, S_TAIL: begin
        nxt_k   = 2'b00;
        content = 1'b1;
        if (st == S_DATA && !tail_now) nxt_d = sub_word(fifo_dout, lane);
        else if (tpos < nfill)         nxt_d = (tpos == 6'd0) ? data_bytes : 16'hFFFF;
        else if (tpos == nfill)        nxt_d = pkt_num;
        else if (tpos == nfill + 6'd1) begin nxt_d = {fcs[7:0],   fcs[15:8]};  content = 1'b0; end
        else if (tpos == nfill + 6'd2) begin nxt_d = {fcs[23:16], fcs[31:24]}; content = 1'b0; end
        else begin nxt_d = {K29_7[7:0], K23_7[7:0]}; nxt_k = 2'b11; content = 1'b0; end
      end
      default: ;
    endcase
  end

  eth_crc32 u_crc (
    .clk(clk), .rst(rst), .init(st == S_IDLE), .en(content), .data(nxt_d), .crc(crc), .fcs(fcs)
  );

  logic tail_last;
  assign tail_last = (st == S_TAIL || tail_now) && (tpos == nfill + 6'd3);
  assign pkt_end   = tail_last;

  always_ff @(posedge clk) begin
    txdata    <= nxt_d;
    txcharisk <= nxt_k;
    if (rst) begin
      st <= S_SYNC; ph <= ~ph; cnt <= '0; tcnt <= '0; data_bytes <= '0;
      gap <= 16'(WAIT_CYC); idle_n <= '0; pkt_num <= '0;
    end else begin
      ph <= ~ph;
      unique case (st)
        S_SYNC: begin st <= S_IDLE; idle_n <= '0; end
        S_IDLE: begin
          if (32'(gap) < WAIT_CYC) gap <= gap + 16'd1;
          if (idle_n != 2'd2) idle_n <= idle_n + 2'd1;
          if (go) begin st <= S_HDR; cnt <= 3'd1; end
        end
        S_HDR:  begin
          if (cnt == 3'd3) begin st <= S_DEST; cnt <= '0; end
          else cnt <= cnt + 3'd1;
        end
        S_DEST: begin
          if (cnt == 3'd1) begin st <= S_DATA; data_bytes <= '0; end
          else cnt <= cnt + 3'd1;
        end
        S_DATA: begin
          if (tail_now) begin
            st <= S_TAIL; tcnt <= 6'd1;
          end else begin
            if (lane == 2'd3) begin
              data_bytes <= data_bytes + 16'd8;
              if (fifo_eoe || (32'(data_bytes) + 8 >= MAX_DATA_BYTES)) begin
                st <= S_TAIL; tcnt <= '0;
              end
            end
          end
        end
        S_TAIL: tcnt <= tcnt + 6'd1;
        default: st <= S_IDLE;
      endcase
      if (tail_last) begin
        st <= S_IDLE; gap <= '0; idle_n <= '0; pkt_num <= pkt_num + 16'd1;
      end
    end
  end
endmodule
