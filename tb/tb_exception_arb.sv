// tb_exception_arb: four message sources, each with its own queue of
// messages (source number and sequence number carried in the context
// field), write into the exception pipe while a reader drains it at random.
// Checks that every event- and system-error message arrives once and in its
// source's order, that info messages are dropped only while `info_off` is
// set, that `svc_req` follows the pipe's not-empty state, that with all
// sources waiting the grants rotate, that the pipe filling up stalls the
// sources, and the message counter.
module tb_exception_arb;
  import rod_pkg::*;
  localparam int NS = 4, DEPTH = 8;
  logic clk = 0, rst = 1, info_off = 0;
  logic valid [NS];
  exc_msg_t msg [NS];
  logic ready [NS];
  logic rd = 0, empty, svc_req;
  exc_msg_t dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [31:0] n_msgs;
  int checks = 0, failures = 0;

  exception_arb #(.NSRC(NS), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  exc_msg_t src_q [NS][$];
  exc_msg_t exp_q [NS][$];     // expected at the reader, per source
  int n_sent = 0, n_got = 0, n_full_stall = 0, n_rot = 0, last_grant = -1;
  bit reading = 1;

  always @(posedge clk) begin
    bit g [NS]; bit r, all_v;
    exc_msg_t d;
    for (int s = 0; s < NS; s++) g[s] = valid[s] && ready[s];
    r = rd && !empty; d = dout;
    all_v = 1;
    for (int s = 0; s < NS; s++) all_v = all_v && valid[s];
    if (!rst) chk(svc_req == !empty, "service request follows the pipe");
    if (!rst && count == DEPTH && valid[0]) n_full_stall++;
    #1;
    for (int s = 0; s < NS; s++) if (g[s]) begin
      exc_msg_t m;
      m = src_q[s].pop_front();
      if (!(info_off && m.mtype == MT_INFO)) exp_q[s].push_back(m);
      if (all_v && last_grant >= 0) begin
        chk(s == (last_grant + 1) % NS, "round-robin grant order");
        n_rot++;
      end
      last_grant = s;
    end
    if (r) begin
      int s;
      s = int'(d.ctx[23:20]);
      n_got++;
      chk(s < NS && exp_q[s].size() != 0 && d == exp_q[s][0], "message order per source");
      if (s < NS && exp_q[s].size() != 0) void'(exp_q[s].pop_front());
    end
    for (int s = 0; s < NS; s++) begin
      valid[s] = (src_q[s].size() != 0);
      msg[s] = valid[s] ? src_q[s][0] : '0;
    end
    rd = reading && ($urandom_range(0, 2) == 0);
  end

  task automatic load(input int per_src, input bit with_info);
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < per_src; k++) begin
        exc_msg_t m;
        m.mtype = with_info && ($urandom_range(0, 2) == 0) ? MT_INFO :
                  ($urandom_range(0, 1) == 0) ? MT_EVT_ERR : MT_SYS_ERR;
        m.id  = ($urandom_range(0, 1) == 0) ? EX_XOR : EX_BAD_CELL;
        m.ctx = {4'(s), 4'h0, 16'(n_sent)};
        n_sent++;
        src_q[s].push_back(m);
      end
  endtask

  task automatic drain();
    int n = 0;
    bit busy = 1;
    while (busy && n < 20000) begin
      @(posedge clk); n++;
      busy = !empty;
      for (int s = 0; s < NS; s++) busy = busy || src_q[s].size() != 0 || exp_q[s].size() != 0;
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    for (int s = 0; s < NS; s++) begin valid[s] = 0; msg[s] = '0; end
    repeat (3) @(posedge clk); #1 rst = 0;
    // info messages kept
    @(posedge clk); #2 load(30, 1);
    drain();
    // info messages dropped; reader paused first so the pipe fills
    @(posedge clk); #2 info_off = 1; reading = 0; load(30, 1);
    repeat (60) @(posedge clk); #2 reading = 1;
    drain();
    chk(n_msgs == 32'(n_got), "message counter");
    for (int s = 0; s < NS; s++) chk(exp_q[s].size() == 0, "every message delivered");
    chk(n_full_stall > 0, "full pipe stalls the sources");
    chk(n_rot > 10, "round robin exercised");
    chk(n_got < n_sent && n_got > n_sent / 2, "info messages dropped only with info_off");
    $display("sent %0d received %0d rotations %0d", n_sent, n_got, n_rot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
