// fragment_processor: parses, checks and decodes one Star Switch (SSW)
// fragment at a time (four of these run in parallel in the ROD).
//
// A fragment arrives as a stream of 16-bit FE-link words from the
// SelectLink receiver after `start` (which gives the FE channel, word count
// and the flags the RX FPGA stored with it).  One word is consumed per
// clock.  32-bit words (event header, SLB headers, event trailer) are
// assembled from two 16-bit halves, high half first.  Checks made, each
// reported as an exception message: first word is not the event header;
// record type is not 01; SSW ID differs from the one configured for the
// channel; cell data before any SLB header; SLB L1ID (low 4 bits) differs
// from the event's; RX ID disabled in the header's RX mask or duplicated;
// cell address beyond 24; end marker not 0xFCA; SSW trailer flags (T1C, NRC,
// T2C, G-link) set; SLB trailer error bits (SEU, overflow, LVDS links, RX
// error state); fragment XOR not zero; words after the trailer; no trailer;
// plus the RX-side flags (overflow/too long, XOR, link error) and a
// SelectLink check-word error.
// Each set bit of a cell bitmap becomes one 32-bit hit word:
//   [31:30] BC (0 previous, 1 current, 2 next)  [29:26] FE channel
//   [25:21] RX ID   [20:16] SLB ID   [15:8] bit number 0..199 (cell*8+bit)
//   [7:0]   0
// Cells 0..19 (the 160 wire/strip hit bits) go to the hit pipe, cells
// 20..24 (the 40 coincidence-output bits) to the tracklet pipe, one hit per
// clock, at most MAX_HITS per event ("too many hits").  With `include_raw`
// every input word is also written to the raw pipe as {4'h0, channel,
// 8'h0, word}.  On `ev_close` the three pipes' records for the event are
// closed.  Words, hits and exceptions stall while a pipe is full or the
// exception port is busy.  `ev_err` summarises the event's errors.
// The checks, the bitmap decoding and the split into raw/hit/tracklet
// outputs follow the design description; field positions inside the
// 32-bit headers, the hit word layout and MAX_HITS are this design's own.
module fragment_processor
  import rod_pkg::*;
#(
  parameter int unsigned MAX_HITS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        include_raw,
  input  logic [3:0]  sswid_tab [N_FE],
  // event control
  input  logic        ev_start,
  input  logic [23:0] ev_l1id,
  input  logic        ev_close,
  output logic [15:0] ev_err,
  // fragment control from the scheduler
  input  logic        start,
  input  logic [3:0]  ch,
  input  logic [11:0] wc,
  input  frag_flags_t flags,
  output logic        idle,
  output logic        done,
  // word stream from the SelectLink receiver
  input  logic        in_empty,
  input  logic [15:0] in_data,
  output logic        in_rd,
  input  logic        xfer_done,
  input  logic        xfer_err,
  // output pipes
  output logic        hit_wr,
  output logic        trk_wr,
  output logic        raw_wr,
  output logic [31:0] hit_data,
  output logic [31:0] raw_data,
  input  logic        hit_full,
  input  logic        trk_full,
  input  logic        raw_full,
  output logic        pipes_close,
  // exceptions
  output logic        exc_valid,
  output exc_msg_t    exc_msg,
  input  logic        exc_ready,
  // statistics
  output logic [31:0] n_hits,
  output logic [31:0] n_frags
);
  // pending-exception slots, emitted lowest index first
  localparam int unsigned NP = 27;
  localparam exc_id_e PIDS [NP] = '{
    EX_FIRST_NOT_HDR, EX_BAD_RECTYPE, EX_BAD_SSWID, EX_OUT_OF_ORDER, EX_SB_L1ID,
    EX_DISABLED_RXID, EX_RXID_DUP, EX_BAD_CELL, EX_BAD_EOE, EX_SSW_FLAGS,
    EX_XOR, EX_WC_AFTER_EOE, EX_SSW_SEU, EX_SSW_RXOVF, EX_SSW_LVDS_NEW,
    EX_SSW_LVDS_OLD, EX_SSW_RXERR, EX_TOO_MANY_HITS, EX_NO_EOE, EX_XMIT_ERR,
    EX_TOO_LONG_OVF, EX_MEZZ_XOR, EX_GLINK_ERR, EX_BAD_WC, EX_FRAMING,
    EX_FE_TIMEOUT, EX_RXREQ_ERR};

  function automatic logic [15:0] err_bit(exc_id_e id);
    unique case (id)
      EX_GLINK_ERR, EX_FRAMING, EX_TOO_LONG_OVF, EX_XMIT_ERR: return 16'(1) << ERR_LINK;
      EX_XOR, EX_MEZZ_XOR:                                     return 16'(1) << ERR_XOR;
      EX_FE_TIMEOUT:                                           return 16'(1) << ERR_TIMEOUT;
      EX_TOO_MANY_HITS:                                        return 16'(1) << ERR_HITS;
      EX_SB_L1ID:                                              return 16'(1) << ERR_ID;
      EX_SSW_FLAGS, EX_SSW_SEU, EX_SSW_RXOVF, EX_SSW_LVDS_NEW,
      EX_SSW_LVDS_OLD, EX_SSW_RXERR:                           return 16'(1) << ERR_SSW;
      default:                                                 return 16'(1) << ERR_FORMAT;
    endcase
  endfunction

  function automatic int pidx(exc_id_e id);
    for (int i = 0; i < int'(NP); i++) if (PIDS[i] == id) return i;
    return 0;
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_END, S_FIN} state_e;
  state_e      state;
  logic [3:0]  f_ch;
  logic [11:0] left, idx;
  frag_flags_t f_flags;
  logic [15:0] xsum, hi_word;
  logic        need_lo, slb_seen, seen_trl, after_flagged, too_many;
  logic [4:0]  slbid, rxid, hcell;
  logic [22:0] rxmask, rx_seen;
  logic [7:0]  bm;
  logic [1:0]  bc;
  logic [NP-1:0] pend, pend_set;
  logic [23:0] ctx;
  logic [$clog2(MAX_HITS+1)-1:0] ev_hits;

  // current exception: lowest pending slot
  int unsigned pi;
  always_comb begin
    pi = 0;
    for (int i = NP - 1; i >= 0; i--) if (pend[i]) pi = i;
  end
  assign exc_valid     = (pend != '0);
  assign exc_msg.mtype = (PIDS[pi] == EX_XMIT_ERR) ? MT_SYS_ERR : MT_EVT_ERR;
  assign exc_msg.id    = PIDS[pi];
  assign exc_msg.ctx   = ctx;

  // current hit: lowest set bitmap bit
  logic [2:0] hb;
  always_comb begin
    hb = '0;
    for (int i = 7; i >= 0; i--) if (bm[i]) hb = 3'(i);
  end
  logic [7:0] bitnum;
  logic       to_trk, hit_go, hit_drop, word_go;
  assign bitnum   = {hcell, 3'b000} + 8'(hb);
  assign to_trk   = (32'(hcell) >= N_HIT_CELLS);
  assign hit_data = {bc, f_ch, rxid, slbid, bitnum, 8'h00};
  assign hit_drop = (pend == '0) && (bm != '0) && (32'(ev_hits) >= MAX_HITS);
  assign hit_go   = (pend == '0) && (bm != '0) && !hit_drop && !(to_trk ? trk_full : hit_full);
  assign hit_wr   = (state == S_RUN) && hit_go && !to_trk;
  assign trk_wr   = (state == S_RUN) && hit_go && to_trk;
  assign word_go  = (state == S_RUN) && (pend == '0) && (bm == '0) && (left != 0) &&
                    !in_empty && !(include_raw && raw_full);
  assign in_rd    = word_go;
  assign raw_wr   = word_go && include_raw;
  assign raw_data = {4'h0, f_ch, 8'h00, in_data};
  assign idle     = (state == S_IDLE) && !start;
  assign pipes_close = ev_close;

  // decode of the word being consumed
  word_type_e  wt, hwt;
  logic [31:0] full32;
  assign wt     = word_type_e'(in_data[15:13]);
  assign hwt    = word_type_e'(hi_word[15:13]);
  assign full32 = {hi_word, in_data};

  always_comb begin
    pend_set = '0;
    if (word_go) begin
      if (seen_trl && !after_flagged) pend_set[pidx(EX_WC_AFTER_EOE)] = 1'b1;
      if (need_lo) begin
        unique case (hwt)
          WT_EVHDR: begin
            if (full32[28:27] != REC_TYPE)           pend_set[pidx(EX_BAD_RECTYPE)] = 1'b1;
            if (full32[26:23] != sswid_tab[f_ch])    pend_set[pidx(EX_BAD_SSWID)]   = 1'b1;
          end
          WT_SLBHDR:
            if (full32[15:12] != ev_l1id[3:0])       pend_set[pidx(EX_SB_L1ID)]     = 1'b1;
          WT_SLBX: begin
            if (full32[26:22] > 5'd22 || !rxmask[full32[26:22]])
                                                     pend_set[pidx(EX_DISABLED_RXID)] = 1'b1;
            else if (rx_seen[full32[26:22]])         pend_set[pidx(EX_RXID_DUP)]    = 1'b1;
          end
          WT_EVTRL: begin
            if (full32[31:20] != EOE_MARK)           pend_set[pidx(EX_BAD_EOE)]     = 1'b1;
            if (full32[19:16] != 4'h0)               pend_set[pidx(EX_SSW_FLAGS)]   = 1'b1;
            if ((xsum ^ in_data) != 16'h0)           pend_set[pidx(EX_XOR)]         = 1'b1;
          end
          default: ;
        endcase
      end else begin
        if (idx == 0 && wt != WT_EVHDR)              pend_set[pidx(EX_FIRST_NOT_HDR)] = 1'b1;
        unique case (wt)
          WT_SLBX: if (in_data[12]) begin
            if (in_data[11])                         pend_set[pidx(EX_SSW_SEU)]      = 1'b1;
            if (in_data[10])                         pend_set[pidx(EX_SSW_RXOVF)]    = 1'b1;
            if (in_data[9])                          pend_set[pidx(EX_SSW_LVDS_NEW)] = 1'b1;
            if (in_data[8])                          pend_set[pidx(EX_SSW_LVDS_OLD)] = 1'b1;
            if (in_data[7:0] != 8'h0)                pend_set[pidx(EX_SSW_RXERR)]    = 1'b1;
          end
          WT_DCUR, WT_DPREV, WT_DNEXT: if (in_data != PAD_WORD) begin
            if (!slb_seen)                           pend_set[pidx(EX_OUT_OF_ORDER)] = 1'b1;
            else if (32'(in_data[12:8]) >= N_CELLS)  pend_set[pidx(EX_BAD_CELL)]     = 1'b1;
          end
          WT_EVHDR, WT_SLBHDR, WT_EVTRL: ;
          default:                                   pend_set[pidx(EX_BAD_RECTYPE)]  = 1'b1;
        endcase
      end
    end
    if (hit_drop && !too_many)                       pend_set[pidx(EX_TOO_MANY_HITS)] = 1'b1;
    if (state == S_END && xfer_done) begin
      if (!seen_trl)                                 pend_set[pidx(EX_NO_EOE)]        = 1'b1;
      if (xfer_err)                                  pend_set[pidx(EX_XMIT_ERR)]      = 1'b1;
      if (f_flags.overflow || f_flags.too_long)      pend_set[pidx(EX_TOO_LONG_OVF)]  = 1'b1;
      if (f_flags.xor_err)                           pend_set[pidx(EX_MEZZ_XOR)]      = 1'b1;
      if (f_flags.link_err)                          pend_set[pidx(EX_GLINK_ERR)]     = 1'b1;
    end
  end

  logic [15:0] set_err;
  always_comb begin
    set_err = '0;
    for (int i = 0; i < int'(NP); i++) if (pend_set[i]) set_err = set_err | err_bit(PIDS[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      f_ch <= '0; left <= '0; idx <= '0; f_flags <= '0;
      xsum <= '0; hi_word <= '0; need_lo <= 1'b0; slb_seen <= 1'b0;
      seen_trl <= 1'b0; after_flagged <= 1'b0; too_many <= 1'b0;
      slbid <= '0; rxid <= '0; hcell <= '0; rxmask <= '0; rx_seen <= '0;
      bm <= '0; bc <= '0; pend <= '0; ctx <= '0; ev_hits <= '0; ev_err <= '0;
      done <= 1'b0; n_hits <= '0; n_frags <= '0;
    end else begin
      done <= 1'b0;
      // exceptions: hand over the current one, collect new ones
      if (exc_valid && exc_ready) pend[pi] <= 1'b0;
      if (pend_set != '0) begin
        pend <= (exc_valid && exc_ready) ? ((pend & ~(NP'(1) << pi)) | pend_set) : (pend | pend_set);
        ctx  <= word_go ? {f_ch, 4'h0, in_data} : {f_ch, 8'h0, idx};
        ev_err <= ev_err | set_err;
      end
      if (ev_start) begin
        ev_hits  <= '0;
        too_many <= 1'b0;
        ev_err   <= '0;
      end
      if (hit_drop) too_many <= 1'b1;
      if (hit_go) begin
        bm      <= bm & ~(8'(1) << hb);
        ev_hits <= ev_hits + 1'b1;
        n_hits  <= n_hits + 1'b1;
      end else if (hit_drop) begin
        bm <= '0;
      end

      unique case (state)
        S_IDLE: if (start) begin
          f_ch <= ch; left <= wc; idx <= '0; f_flags <= flags;
          xsum <= '0; need_lo <= 1'b0; slb_seen <= 1'b0; seen_trl <= 1'b0;
          after_flagged <= 1'b0; rxmask <= '0; rx_seen <= '0; slbid <= '0; rxid <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (word_go) begin
            left <= left - 1'b1;
            idx  <= idx + 1'b1;
            xsum <= xsum ^ in_data;
            if (seen_trl) after_flagged <= 1'b1;
            if (need_lo) begin
              need_lo <= 1'b0;
              unique case (hwt)
                WT_EVHDR:  rxmask <= full32[22:0];
                WT_SLBHDR: begin slbid <= full32[28:24]; slb_seen <= 1'b1; end
                WT_SLBX:   begin
                  rxid <= full32[26:22];
                  if (full32[26:22] <= 5'd22) rx_seen[full32[26:22]] <= 1'b1;
                end
                WT_EVTRL:  seen_trl <= 1'b1;
                default: ;
              endcase
            end else begin
              unique case (wt)
                WT_EVHDR, WT_SLBHDR, WT_EVTRL: begin hi_word <= in_data; need_lo <= 1'b1; end
                WT_SLBX: if (!in_data[12]) begin hi_word <= in_data; need_lo <= 1'b1; end
                WT_DCUR, WT_DPREV, WT_DNEXT:
                  if (in_data != PAD_WORD && slb_seen && 32'(in_data[12:8]) < N_CELLS) begin
                    bm   <= in_data[7:0];
                    hcell <= in_data[12:8];
                    bc   <= (wt == WT_DPREV) ? 2'd0 : (wt == WT_DCUR) ? 2'd1 : 2'd2;
                  end
                default: ;
              endcase
            end
          end
          if (pend == '0 && bm == '0 && left == 0 && !word_go) state <= S_END;
        end
        S_END: if (xfer_done) state <= S_FIN;
        S_FIN: if (pend == '0) begin
          done    <= 1'b1;
          n_frags <= n_frags + 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
