// tb_event_manager: checks the event manager against the event flow it must
// follow.  Event IDs and trigger types come from queues acting as the TTC
// FIFOs; four scheduler stand-ins drop their `done` for a random time after
// each `ev_start` and report a random error summary and, sometimes, a
// timeout.  `pipes_ready` is dropped at random.  The bench checks that
//   - events are started in FIFO order, one at a time,
//   - an event is closed only when every scheduler is done and the pipes
//     have room, and the header record then carries that event's ID, its
//     trigger type (or zero when trigger types are not included) and the OR
//     of the error summaries plus the timeout bit,
//   - with trigger types included, no event starts before its type arrives.
// Inputs are driven 1 ns after the rising edge and outputs sampled on it.
module tb_event_manager;
  import rod_pkg::*;
  localparam int NS = 4, NEV = 200;
  logic clk = 0, rst = 1;
  logic tt_include = 0;
  evid_t evid; logic evid_empty = 1, evid_rd;
  logic [7:0] tt = 0; logic tt_empty = 1, tt_rd;
  logic ev_start, ev_close, pipes_ready = 1, hdr_wr, busy_processing;
  logic [23:0] ev_l1id;
  logic sched_done [NS];
  logic sched_tmo  [NS];
  logic [15:0] fp_err [NS];
  evhdr_t hdr;
  logic [31:0] n_events;
  int checks = 0, failures = 0;

  evid_t ev_q[$];
  logic [7:0] tt_q[$];
  evid_t started_q[$];
  logic [7:0] started_tt[$];
  int busy_cnt [NS];
  bit open_ev = 0, went_busy = 0;
  int n_closed = 0, n_tmo = 0, n_wait_tt = 0, n_wait_pipes = 0;

  event_manager #(.NSCHED(NS)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO fronts follow the queues
  always @(negedge clk) begin
    evid_empty = (ev_q.size() == 0);
    evid = evid_empty ? '0 : ev_q[0];
    tt_empty = (tt_q.size() == 0);
    tt = tt_empty ? 8'h0 : tt_q[0];
  end

  // scheduler stand-ins and checks, sampled on the rising edge
  always @(posedge clk) if (!rst) begin
    bit all_done;
    logic [15:0] exp_err;
    all_done = 1;
    exp_err = 0;
    for (int s = 0; s < NS; s++) begin
      all_done = all_done && sched_done[s];
      exp_err |= fp_err[s];
      if (sched_tmo[s]) exp_err |= 16'(1) << ERR_TIMEOUT;
    end
    if (evid_rd) begin
      chk(!evid_empty, "read from an empty event ID FIFO");
      chk(!open_ev, "new event started while one is open");
      chk(tt_rd == tt_include, "trigger type read together with the event ID");
      if (tt_include) chk(!tt_empty, "trigger type present when read");
      started_q.push_back(ev_q.pop_front());
      started_tt.push_back(tt_include ? tt_q.pop_front() : 8'h0);
      open_ev = 1;
    end else if (tt_include && !evid_empty && tt_empty && !open_ev)
      n_wait_tt++;
    if (open_ev && went_busy && all_done && !pipes_ready) n_wait_pipes++;
    if (hdr_wr) begin
      chk(ev_close, "header written only at close");
      chk(all_done, "close only when every scheduler is done");
      chk(pipes_ready, "close only when the pipes have room");
      chk(started_q.size() == 1, "close matches an open event");
      if (started_q.size() != 0) begin
        chk(hdr.evid == started_q[0], "header event ID");
        chk(hdr.ttype == started_tt[0], "header trigger type");
        chk(hdr.err == exp_err, "header error summary");
        chk(ev_l1id == started_q[0].l1id, "current L1ID");
        void'(started_q.pop_front());
        void'(started_tt.pop_front());
      end
      open_ev = 0;
      n_closed++;
    end
    if (open_ev && went_busy && all_done && pipes_ready)
      chk(ev_close, "close as soon as the event is complete");
    if (hdr_wr) went_busy = 0;
  end

  // schedulers: leave idle one clock after ev_start, stay busy a random time
  always @(posedge clk) begin
    bit st;
    st = ev_start;
    #1;
    for (int s = 0; s < NS; s++) begin
      if (rst) begin
        sched_done[s] = 1; sched_tmo[s] = 0; fp_err[s] = 0; busy_cnt[s] = -1;
      end else if (st) begin
        sched_done[s] = 0; busy_cnt[s] = $urandom_range(0, 12); went_busy = 1;
        sched_tmo[s] = ($urandom_range(0, 9) == 0);
        fp_err[s] = ($urandom_range(0, 2) == 0) ? 16'(1 << $urandom_range(0, 6)) : 16'h0;
        if (sched_tmo[s]) n_tmo++;
      end else if (busy_cnt[s] > 0) busy_cnt[s]--;
      else if (busy_cnt[s] == 0) begin sched_done[s] = 1; busy_cnt[s] = -1; end
    end
    pipes_ready = ($urandom_range(0, 3) != 0);
  end

  initial begin
    for (int s = 0; s < NS; s++) begin sched_done[s] = 1; sched_tmo[s] = 0; fp_err[s] = 0; end
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int e = 0; e < NEV; e++) begin
      evid_t v;
      if (e == NEV / 2) begin
        // drain, then switch trigger types on
        wait (ev_q.size() == 0 && !open_ev);
        repeat (3) @(posedge clk);
        #1 tt_include = 1;
      end
      v.evidext = 8'(e / 64);
      v.l1id = 24'(e);
      v.bcid = 12'($urandom_range(0, 3563));
      v.orbit = 32'(e * 7);
      repeat ($urandom_range(0, 6)) @(posedge clk);
      // every eighth event with trigger types: let the manager go idle
      // first, so the type is sure to arrive after its event ID
      if (tt_include && e % 8 == 0) wait (ev_q.size() == 0 && !open_ev);
      #1 ev_q.push_back(v);
      if (tt_include) begin
        logic [7:0] t;
        t = 8'($urandom);
        repeat ((e % 8 == 0) ? 5 : $urandom_range(0, 4)) @(posedge clk);
        #1 tt_q.push_back(t);
      end
    end
    wait (ev_q.size() == 0 && !open_ev);
    repeat (20) @(posedge clk);
    chk(n_closed == NEV, "every event closed");
    chk(n_events == 32'(NEV), "event counter");
    chk(started_q.size() == 0, "no event left open");
    chk(n_tmo > 0, "timeouts exercised");
    chk(n_wait_tt > 0, "waited for a late trigger type");
    chk(n_wait_pipes > 0, "waited for pipe room");
    $display("events %0d  timeouts %0d  waits for trigger type %0d", n_closed, n_tmo, n_wait_tt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
