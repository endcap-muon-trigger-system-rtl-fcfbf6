// fragment_scheduler: marshals fragment transfers over one board-to-board
// link (one per RX FPGA, four in the ROD).
//
// For each event (`ev_start`) it visits the enabled FE links of its RX FPGA
// in turn.  For each link it first makes sure a fragment is buffered: if the
// RX FPGA's all-links-ready line is high it goes straight on, otherwise it
// polls with get_status until the link's control FIFO is non-empty, and
// after TIMEOUT_POLLS empty polls it abandons the link for this event
// (exception "FE link timed out", `timedout` bit).  It then waits until
// its fragment processor is idle, issues send_event, and from the response
// learns the fragment's word count and flags.  It passes the FE channel
// number, word count and flags to the processor and the SelectLink receiver
// (`fp_start`) and waits for `fp_done` before moving to the next link.
// A zero word count is reported as "error in request to send an event".
// `done` is high once all links of the event are handled.  After reset
// the scheduler first sends enable_links with `ch_enable`, and sends it
// again whenever `ch_enable` changes while idle; `clr_ovf_req` (while idle)
// sends clear_overflows for the enabled links.  An `ev_start` that arrives
// while such a command is in progress is held and served afterwards.
// Command/response framing: two nibbles out with `cmd_stb`, four nibbles
// back with `rsp_ack` (see cmd_resp_slave).
// Polling, the all-links-ready shortcut, the processor-ready condition and
// the one-event-at-a-time order follow the design description; the timeout
// value and link visiting order are this design's own choices.
module fragment_scheduler
  import rod_pkg::*;
#(
  parameter int unsigned LINK          = 0,
  parameter int unsigned TIMEOUT_POLLS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ev_start,
  input  logic        clr_ovf_req,
  input  logic [CH_PER_RX-1:0] ch_enable,
  output logic        done,
  output logic [CH_PER_RX-1:0] timedout,
  // command-response channel master
  output logic        cmd_stb,
  output logic [3:0]  cmd_nib,
  input  logic        rsp_ack,
  input  logic [3:0]  rsp_nib,
  input  logic        all_ready,
  // fragment processor / SelectLink receiver
  input  logic        fp_idle,
  output logic        fp_start,
  output logic [3:0]  fp_ch,
  output logic [11:0] fp_wc,
  output frag_flags_t fp_flags,
  input  logic        fp_done,
  // exceptions
  output logic        exc_valid,
  output exc_msg_t    exc_msg,
  input  logic        exc_ready,
  // statistics
  output logic [15:0] n_polls,
  output logic [15:0] n_fast
);
  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_NEXT, S_CHECK, S_CMD0, S_CMD1, S_RSP, S_WAITFP, S_WAITDONE, S_EXC
  } state_e;
  state_e      state;
  rx_cmd_e     op;
  logic [3:0]  arg;
  logic [1:0]  ch, nibcnt;
  logic [15:0] rsp;
  logic [$clog2(TIMEOUT_POLLS+1)-1:0] polls;
  logic [15:0] rsp_full;
  logic        ev_pend;                    // ev_start seen while busy
  logic [CH_PER_RX-1:0] ena_sent;          // link set last sent with enable_links

  assign rsp_full = {rsp[11:0], rsp_nib};
  assign done     = (state == S_IDLE) && !ev_pend;
  assign cmd_stb  = (state == S_CMD0) || (state == S_CMD1);
  assign cmd_nib  = (state == S_CMD0) ? op : arg;
  assign exc_valid = (state == S_EXC);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_INIT;
      op       <= CMD_NOP;
      arg      <= '0;
      ch       <= '0;
      nibcnt   <= '0;
      rsp      <= '0;
      polls    <= '0;
      timedout <= '0;
      fp_start <= 1'b0;
      fp_ch    <= '0;
      fp_wc    <= '0;
      fp_flags <= '0;
      exc_msg  <= '0;
      n_polls  <= '0;
      n_fast   <= '0;
      ev_pend  <= 1'b0;
      ena_sent <= '0;
    end else begin
      fp_start <= 1'b0;
      if (ev_start && state != S_IDLE) ev_pend <= 1'b1;
      unique case (state)
        S_INIT: begin                        // enable the links at start-up
          op       <= CMD_ENA_LINKS;
          arg      <= 4'(ch_enable);
          ena_sent <= ch_enable;
          state    <= S_CMD0;
        end
        S_IDLE: if (ev_start || ev_pend) begin
          ch       <= '0;
          timedout <= '0;
          ev_pend  <= 1'b0;
          state    <= S_NEXT;
        end else if (clr_ovf_req) begin      // overflow recovery
          op    <= CMD_CLR_OVF;
          arg   <= 4'(ch_enable);
          state <= S_CMD0;
        end else if (ch_enable != ena_sent) begin  // link set reconfigured
          op       <= CMD_ENA_LINKS;
          arg      <= 4'(ch_enable);
          ena_sent <= ch_enable;
          state    <= S_CMD0;
        end
        S_NEXT: begin
          polls <= '0;
          if (32'(ch) >= CH_PER_RX) state <= S_IDLE;
          else if (!ch_enable[ch])  ch <= ch + 1'b1;
          else                      state <= S_CHECK;
        end
        S_CHECK: begin
          if (all_ready) begin
            n_fast <= n_fast + 1'b1;
            state  <= S_WAITFP;
          end else begin
            op      <= CMD_GET_STATUS;
            arg     <= '0;
            n_polls <= n_polls + 1'b1;
            state   <= S_CMD0;
          end
        end
        S_WAITFP: if (fp_idle) begin
          op    <= CMD_SEND_EVENT;
          arg   <= {2'b00, ch};
          state <= S_CMD0;
        end
        S_CMD0: state <= S_CMD1;
        S_CMD1: begin nibcnt <= '0; state <= S_RSP; end
        S_RSP: if (rsp_ack) begin
          rsp    <= rsp_full;
          nibcnt <= nibcnt + 1'b1;
          if (nibcnt == 2'd3) begin
            if (op == CMD_ENA_LINKS || op == CMD_CLR_OVF) begin
              state <= S_IDLE;
            end else if (op == CMD_GET_STATUS) begin
              if (!rsp_full[4*ch + 2]) state <= S_WAITFP;           // fragment buffered
              else if (32'(polls) + 1 >= TIMEOUT_POLLS) begin
                timedout[ch] <= 1'b1;
                exc_msg      <= '{mtype: MT_EVT_ERR, id: EX_FE_TIMEOUT,
                                  ctx: {16'h0, 4'(LINK), 2'b00, ch}};
                state        <= S_EXC;
              end else begin
                polls <= polls + 1'b1;
                state <= S_CHECK;
              end
            end else begin  // send_event response
              if (rsp_full[11:0] == 12'h0) begin
                exc_msg <= '{mtype: MT_SYS_ERR, id: EX_RXREQ_ERR,
                             ctx: {16'h0, 4'(LINK), 2'b00, ch}};
                state   <= S_EXC;
              end else begin
                fp_start <= 1'b1;
                fp_ch    <= 4'(LINK * CH_PER_RX + 32'(ch));
                fp_wc    <= rsp_full[11:0];
                fp_flags <= frag_flags_t'(rsp_full[15:12]);
                state    <= S_WAITDONE;
              end
            end
          end
        end
        S_WAITDONE: if (fp_done) begin
          ch    <= ch + 1'b1;
          state <= S_NEXT;
        end
        S_EXC: if (exc_ready) begin
          ch    <= ch + 1'b1;
          state <= S_NEXT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
