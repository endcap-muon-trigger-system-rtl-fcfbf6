// fe_link_rx: one Front End (FE) link handler of an RX FPGA.
//
// Receives the 16-bit words delivered by the G-link receiver chip, finds
// event boundaries from the control-mode framing words (0x0B0F begins an
// event, 0x0E0F ends it; the 0x0000 halves of the 32-bit framing words are
// ignored), and buffers each fragment as one record of a rod_pipe.  While a
// fragment streams in, the 16-bit XOR of all its words (header through the
// checksum word) is accumulated and must be zero at the end; the word count
// is kept by the pipe.  The fragment's control word carries the word count
// (12 bits) and four flags (frag_flags_t): link error (G-link error or bad
// framing), XOR error, too long (words beyond MAX_WC are dropped), overflow
// (the buffer filled, words were dropped).  A fragment that starts while the
// control FIFO is full is dropped whole.  Overflow is sticky until
// `clr_ovf` (the clear_overflows command).  `busy` is the buffer's
// almost-full flag, which feeds RODBUSY.  The link is ignored unless
// `enable` is set (enable_links command).
//
// Framing, XOR rule, word count, buffering, overflow and busy follow the
// design description.  The buffer size, the maximum word count, and the
// choice to truncate rather than discard over-long fragments are this
// design's own.  One word per clock in; the G-link clock domain is taken to
// be the same as the RX FPGA design clock in this RTL.
module fe_link_rx
  import rod_pkg::*;
#(
  parameter int unsigned DEPTH  = 8192,  // fragment buffer, 16-bit words
  parameter int unsigned CDEPTH = 512,   // fragments buffered
  parameter int unsigned MAX_WC = 1024,  // longest accepted fragment
  parameter int unsigned AF_MARGIN = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        clr_ovf,
  // from the G-link receiver
  input  logic        gl_dv,      // a word is present
  input  logic        gl_cntl,    // word was sent in control mode
  input  logic        gl_err,     // G-link reported an error
  input  logic [15:0] gl_data,
  // fragment read-out (to the command-response / SelectLink logic)
  input  logic        data_rd,
  output logic [15:0] data_out,
  output logic        data_empty,
  input  logic        ctrl_rd,
  output frag_flags_t ctrl_flags,
  output logic [11:0] ctrl_wc,
  output logic        ctrl_empty,
  // status
  output logic        busy,
  output logic        ovf_sticky,
  output logic [15:0] occupancy
);
  logic        in_evt, dropping, stray, ctrl_afull;
  logic [15:0] xsum;
  logic [11:0] wc;
  frag_flags_t flags;

  logic        p_wr, p_end, data_full, ctrl_full;
  logic [15:0] p_wdata;
  frag_flags_t p_status;
  logic [$clog2(DEPTH+1)-1:0] occ;

  wire is_boe  = gl_dv && gl_cntl && gl_data == BOE_WORD;
  wire is_eoe  = gl_dv && gl_cntl && gl_data == EOE_WORD;
  wire is_data = gl_dv && !gl_cntl;

  rod_pipe #(.DW(16), .DEPTH(DEPTH), .CDEPTH(CDEPTH), .SW(4), .CW(12), .AF_MARGIN(AF_MARGIN)) u_pipe (
    .clk, .rst,
    .wr(p_wr), .wdata(p_wdata), .rec_end(p_end), .rec_status(p_status),
    .data_full, .ctrl_full, .ctrl_afull, .almost_full(busy), .occupancy(occ),
    .data_rd, .data_out, .data_empty,
    .ctrl_rd, .ctrl_status(ctrl_flags), .ctrl_cnt(ctrl_wc), .ctrl_empty);

  assign occupancy = 16'(occ);

  // Close the open record: at end of event, or when a new begin-of-event
  // arrives inside an event (framing error on the open one).
  always_comb begin
    p_wr     = 1'b0;
    p_wdata  = gl_data;
    p_end    = 1'b0;
    p_status = flags;
    if (enable && in_evt && !dropping) begin
      if (is_data && wc < 12'(MAX_WC) && !data_full) p_wr = 1'b1;
      if (is_eoe) begin
        p_end = 1'b1;
        p_status.xor_err = (xsum != 16'h0);
      end
      if (is_boe) begin
        p_end = 1'b1;
        p_status.link_err = 1'b1;
      end
      if (gl_dv && gl_err) p_status.link_err = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_evt     <= 1'b0;
      dropping   <= 1'b0;
      stray      <= 1'b0;
      xsum       <= '0;
      wc         <= '0;
      flags      <= '0;
      ovf_sticky <= 1'b0;
    end else begin
      if (clr_ovf) ovf_sticky <= 1'b0;
      if (enable) begin
        if (is_boe) begin
          in_evt   <= 1'b1;
          // no room for another control word: drop the whole fragment
          dropping <= ctrl_full || (in_evt && !dropping && ctrl_afull);
          if (ctrl_full || (in_evt && !dropping && ctrl_afull)) ovf_sticky <= 1'b1;
          xsum     <= '0;
          wc       <= '0;
          flags    <= '0;
          // stray words seen outside an event mark the next fragment
          flags.link_err <= stray;
          stray    <= 1'b0;
        end else if (is_eoe) begin
          in_evt   <= 1'b0;
          dropping <= 1'b0;
          if (!in_evt) stray <= 1'b1;
        end else if (is_data) begin
          if (in_evt) begin
            xsum <= xsum ^ gl_data;
            if (wc >= 12'(MAX_WC)) flags.too_long <= 1'b1;
            else if (data_full) begin
              flags.overflow <= 1'b1;
              ovf_sticky     <= 1'b1;
            end else wc <= wc + 1'b1;
          end else begin
            stray <= 1'b1;
          end
        end
        if (gl_dv && gl_err) flags.link_err <= 1'b1;
      end
    end
  end
endmodule
