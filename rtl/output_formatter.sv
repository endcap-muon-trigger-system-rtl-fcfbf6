// output_formatter: builds the output event record and samples events for
// monitoring.
//
// Driven by the header pipe: once a header record and the control words of
// all NQ data pipes (hits, tracklets and raw, one of each per fragment
// processor; pipe q = kind*NFP + processor) are available, it knows every
// block size in advance and writes, one 32-bit word per clock:
//   S-Link begin control word 0xB0F00000
//   9-word event header: 0xEE1234EE, header size 9, format version,
//     source ID {8'h00, sub-detector 0x67/0x68 from the RODID side bit,
//     8'h00, RODID[7:0]}, run number, {EVIDext, L1ID}, BCID, trigger type,
//     ORBIT count
//   per pipe: block header {kind, processor, 8'h00, word count} then the
//     words (raw blocks only with CR1_INCLUDE_SSW)
//   one status word {16'h0, error summary}
//   trailer: number of status words (1), number of data words, status
//     position (1 = after the data)
//   S-Link end control word 0xE0F00000
// to the output event FIFO (33 bits: control flag and word).  The sampler
// copies the same event (control words excluded) to the VME event pipe if
// CR1_ALLFMT, CR1_ERRFMT with an error bit not muted by `err_mute`, or CR1_FLTFMT with
// the trigger type matching `ttacc`; and to the gigabit event pipe if
// CR1_GIGA_SAMPLE (and the filter, with CR1_FLTFMT_GIGA).  A monitoring copy
// is only made when that pipe is not almost full, except that CR1_ALLFMT
// forces VME copies; so the S-Link output is never blocked by the monitoring
// pipes otherwise.  Output stalls while a destination is full.
// Header-pipe-driven formatting, blocks, sampling conditions and the
// almost-full rule follow the design description; the word-level layout is
// the ATLAS ROD format as this design implements it.
module output_formatter
  import rod_pkg::*;
#(
  parameter int unsigned NFP = N_RX,
  parameter int unsigned NQ  = 3 * N_RX
) (
  input  logic        clk,
  input  logic        rst,
  input  fcr1_t       fcr1,
  input  logic [31:0] run_number,
  input  logic [7:0]  rod_id,
  input  logic [7:0]  ttacc,
  input  logic [15:0] err_mute,      // EMUTE: error bits ignored by CR1_ERRFMT
  // header pipe
  input  evhdr_t      hdr,
  input  logic        hdr_empty,
  output logic        hdr_rd,
  // data pipes
  input  logic        q_ctrl_empty [NQ],
  input  logic [11:0] q_ctrl_cnt   [NQ],
  output logic        q_ctrl_rd    [NQ],
  input  logic [31:0] q_data       [NQ],
  output logic        q_data_rd    [NQ],
  // output event FIFO (to the S-Link manager)
  output logic        ev_wr,
  output logic [32:0] ev_data,
  input  logic        ev_full,
  // monitoring event pipes
  output logic        vme_wr,
  output logic        giga_wr,
  output logic [31:0] mon_data,
  input  logic        vme_full,
  input  logic        vme_afull,
  input  logic        giga_full,
  input  logic        giga_afull,
  // statistics
  output logic [31:0] n_events,
  output logic [31:0] n_vme,
  output logic [31:0] n_giga
);
  typedef enum logic [2:0] {S_IDLE, S_BOF, S_HDR, S_BLKH, S_BLKD, S_STAT, S_TRL, S_EOF} state_e;
  state_e      state;
  evhdr_t      h;
  logic [11:0] cnt [NQ];
  logic [11:0] left;
  logic [$clog2(NQ+1)-1:0] q;
  logic [3:0]  widx;
  logic [31:0] ndata;
  logic        vme_sel, giga_sel;
  logic        all_ctrl, emit, can, is_ctrl, skip;
  logic [31:0] w;

  always_comb begin
    all_ctrl = 1'b1;
    for (int i = 0; i < int'(NQ); i++) all_ctrl = all_ctrl && !q_ctrl_empty[i];
  end

  wire start  = (state == S_IDLE) && !hdr_empty && all_ctrl;
  wire filt   = (hdr.ttype & ttacc) != 8'h0;
  wire q_kind_raw = (32'(q) >= 2 * NFP);
  assign skip = q_kind_raw && !fcr1.include_ssw;  // raw block not included

  // word to be emitted in the current state
  always_comb begin
    emit    = 1'b1;
    is_ctrl = 1'b0;
    w       = '0;
    unique case (state)
      S_BOF: begin w = SLINK_BOF; is_ctrl = 1'b1; end
      S_HDR:
        unique case (widx)
          4'd0: w = ROD_HDR_MARK;
          4'd1: w = ROD_HDR_SIZE;
          4'd2: w = ROD_FMT_VER;
          4'd3: w = {8'h00, rod_id[7] ? SUBDET_TGC_C : SUBDET_TGC_A, 8'h00, rod_id};
          4'd4: w = run_number;
          4'd5: w = {h.evid.evidext, h.evid.l1id};
          4'd6: w = {20'h0, h.evid.bcid};
          4'd7: w = {24'h0, h.ttype};
          default: w = h.evid.orbit;
        endcase
      S_BLKH: begin
        w    = {(32'(q) < NFP) ? BLK_HITS : (32'(q) < 2 * NFP) ? BLK_TRACKLETS : BLK_RAW,
                4'(32'(q) % NFP), 8'h00, cnt[q]};
        emit = !skip;
      end
      S_BLKD: begin w = q_data[q]; emit = !skip && left != 0; end
      S_STAT: w = {16'h0, h.err};
      S_TRL:
        unique case (widx)
          4'd0:    w = 32'd1;
          4'd1:    w = ndata;
          default: w = 32'd1;
        endcase
      S_EOF: begin w = SLINK_EOF; is_ctrl = 1'b1; end
      default: emit = 1'b0;
    endcase
  end

  // a word can move when every selected destination has room
  assign can = (state != S_IDLE) &&
               (!emit || (!ev_full && !(vme_sel && !is_ctrl && vme_full) &&
                          !(giga_sel && !is_ctrl && giga_full)));
  assign ev_wr    = can && emit;
  assign ev_data  = {is_ctrl, w};
  assign mon_data = w;
  assign vme_wr   = can && emit && !is_ctrl && vme_sel;
  assign giga_wr  = can && emit && !is_ctrl && giga_sel;
  assign hdr_rd   = start;

  always_comb
    for (int i = 0; i < int'(NQ); i++) begin
      q_ctrl_rd[i] = start;
      q_data_rd[i] = can && (state == S_BLKD) && (q == ($clog2(NQ+1))'(i)) && (left != 0);
    end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      h        <= '0;
      left     <= '0;
      q        <= '0;
      widx     <= '0;
      ndata    <= '0;
      vme_sel  <= 1'b0;
      giga_sel <= 1'b0;
      n_events <= '0;
      n_vme    <= '0;
      n_giga   <= '0;
      for (int i = 0; i < int'(NQ); i++) cnt[i] <= '0;
    end else if (start) begin
      h        <= hdr;
      for (int i = 0; i < int'(NQ); i++) cnt[i] <= q_ctrl_cnt[i];
      vme_sel  <= (fcr1.allfmt || (fcr1.errfmt && (hdr.err & ~err_mute) != 16'h0) || (fcr1.fltfmt && filt)) &&
                  (fcr1.allfmt || !vme_afull);
      giga_sel <= fcr1.giga_sample && (!fcr1.fltfmt_giga || filt) && !giga_afull;
      ndata    <= '0;
      state    <= S_BOF;
    end else if (can) begin
      unique case (state)
        S_BOF: begin widx <= '0; state <= S_HDR; end
        S_HDR: if (widx == 4'd8) begin q <= '0; state <= S_BLKH; end
               else widx <= widx + 1'b1;
        S_BLKH: begin
          if (emit) ndata <= ndata + 1'b1;
          left  <= cnt[q];
          state <= S_BLKD;
        end
        S_BLKD: begin
          if (left != 0) begin
            left <= left - 1'b1;
            if (emit) ndata <= ndata + 1'b1;
          end else if (32'(q) == NQ - 1) state <= S_STAT;
          else begin
            q     <= q + 1'b1;
            state <= S_BLKH;
          end
        end
        S_STAT: begin widx <= '0; state <= S_TRL; end
        S_TRL: if (widx == 4'd2) state <= S_EOF; else widx <= widx + 1'b1;
        S_EOF: begin
          n_events <= n_events + 1'b1;
          if (vme_sel)  n_vme  <= n_vme + 1'b1;
          if (giga_sel) n_giga <= n_giga + 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
