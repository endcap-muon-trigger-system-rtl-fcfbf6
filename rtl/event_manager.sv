// event_manager: starts and closes events in the main FPGA.
//
// When the EVENT ID FIFO holds a Level-1 Accept (and, if CR1_TRIGGER_TYPE_
// INCLUDE is set, its trigger type has also arrived) it takes the event ID
// and trigger type and pulses `ev_start`, which sends every fragment
// scheduler off to fetch that event's fragments.  Only one event is in
// fragment processing at a time.  When all schedulers report `sched_done`,
// and the header pipe and all processor output pipes have room for one more
// control word (`pipes_ready`), it pulses `ev_close` (the processors close
// their pipe records) and writes the header record {event ID, trigger type,
// error summary} to the header pipe.  The error summary is the OR of the
// processors' summaries plus the timeout bit if a scheduler abandoned a link.
// Behaviour follows the design description (event manager, header pipe,
// all fragments of one event before the next); the handshake signals are
// this design's own.
module event_manager
  import rod_pkg::*;
#(
  parameter int unsigned NSCHED = N_RX
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tt_include,
  // TTC FIFOs
  input  evid_t       evid,
  input  logic        evid_empty,
  output logic        evid_rd,
  input  logic [7:0]  tt,
  input  logic        tt_empty,
  output logic        tt_rd,
  // schedulers / processors
  output logic        ev_start,
  output logic [23:0] ev_l1id,
  input  logic        sched_done [NSCHED],
  input  logic        sched_tmo  [NSCHED],
  input  logic [15:0] fp_err     [NSCHED],
  input  logic        pipes_ready,
  output logic        ev_close,
  // header pipe
  output logic        hdr_wr,
  output evhdr_t      hdr,
  // status
  output logic        busy_processing,
  output logic [31:0] n_events
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT} state_e;
  state_e     state;
  evid_t      cur;
  logic [7:0] cur_tt;
  logic       all_done, any_tmo;
  logic [15:0] err_or;

  always_comb begin
    all_done = 1'b1;
    any_tmo  = 1'b0;
    err_or   = '0;
    for (int s = 0; s < int'(NSCHED); s++) begin
      all_done = all_done && sched_done[s];
      any_tmo  = any_tmo || sched_tmo[s];
      err_or   = err_or | fp_err[s];
    end
  end

  wire can_start = (state == S_IDLE) && !evid_empty && (!tt_include || !tt_empty);
  assign evid_rd  = can_start;
  assign tt_rd    = can_start && tt_include;
  assign ev_close = (state == S_WAIT) && all_done && pipes_ready;
  assign hdr_wr   = ev_close;
  assign ev_l1id  = cur.l1id;
  assign busy_processing = (state != S_IDLE);

  always_comb begin
    hdr.evid  = cur;
    hdr.ttype = cur_tt;
    hdr.err   = err_or | (any_tmo ? (16'(1) << ERR_TIMEOUT) : 16'h0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      cur      <= '0;
      cur_tt   <= '0;
      ev_start <= 1'b0;
      n_events <= '0;
    end else begin
      ev_start <= 1'b0;
      unique case (state)
        S_IDLE: if (can_start) begin
          cur      <= evid;
          cur_tt   <= tt_include ? tt : 8'h00;
          ev_start <= 1'b1;
          state    <= S_START;
        end
        S_START: state <= S_WAIT;  // schedulers leave their idle state
        S_WAIT: if (ev_close) begin
          n_events <= n_events + 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
