// tb_slink_mgr: an event FIFO (a queue of 33-bit words, bit 32 marking the
// begin/end control words) feeds the S-Link manager while the link's
// `lff` (XOFF) and `ldown` flags toggle at random.  Checks that the words
// come out unchanged and in order with `uctrl` set on the control words,
// that no word is taken from the FIFO while `lff` or `ldown` is high or
// the output is disabled, that the force bit overrides the flow control,
// and the event and XOFF counters.
module tb_slink_mgr;
  import rod_pkg::*;
  logic clk = 0, rst = 1;
  logic enable = 0, force_wr = 0, ev_empty = 1, ev_rd, lff = 0, ldown = 0;
  logic [32:0] ev_data = 0;
  logic [31:0] ud, n_events, n_xoff;
  logic uctrl, uwen;
  int checks = 0, failures = 0;

  slink_mgr dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [32:0] fifo_q[$], exp_q[$];
  int n_eof = 0, m_xoff = 0, n_forced = 0, n_held = 0;

  always @(posedge clk) begin
    bit r, w;
    r = ev_rd; w = uwen;
    if (!rst) begin
      if (r) begin
        chk(enable && !ev_empty, "read only when enabled and not empty");
        chk(force_wr || (!lff && !ldown), "no read while the link is full or down");
        if (force_wr && (lff || ldown)) n_forced++;
      end
      if (enable && !ev_empty && !force_wr && lff) m_xoff++;
      if (enable && !ev_empty && !force_wr && (lff || ldown)) n_held++;
      if (w) begin
        chk(exp_q.size() != 0 && {uctrl, ud} == exp_q[0], "S-Link word");
        if (exp_q.size() != 0) void'(exp_q.pop_front());
      end
    end
    #1;
    if (r) exp_q.push_back(fifo_q.pop_front());
    ev_empty = (fifo_q.size() == 0);
    ev_data  = ev_empty ? 33'h0 : fifo_q[0];
    lff   = ($urandom_range(0, 3) == 0);
    ldown = ($urandom_range(0, 15) == 0);
  end

  task automatic add_event(input int n);
    fifo_q.push_back({1'b1, SLINK_BOF});
    for (int i = 0; i < n; i++) fifo_q.push_back({1'b0, 32'($urandom)});
    fifo_q.push_back({1'b1, SLINK_EOF});
    n_eof++;
  endtask

  initial begin
    repeat (3) @(posedge clk); #2 rst = 0;
    for (int e = 0; e < 20; e++) add_event($urandom_range(12, 1));
    repeat (50) @(posedge clk);
    chk(exp_q.size() == 0 && n_events == 0, "nothing sent while disabled");
    #2 enable = 1;
    repeat (600) @(posedge clk);
    #2 force_wr = 1;
    for (int e = 0; e < 10; e++) add_event($urandom_range(12, 1));
    repeat (300) @(posedge clk);
    #2 force_wr = 0;
    repeat (10) @(posedge clk);
    chk(fifo_q.size() == 0 && exp_q.size() == 0, "every word sent");
    chk(n_events == 32'(n_eof), "event counter");
    chk(n_xoff == 32'(m_xoff), "XOFF counter");
    chk(n_forced > 0, "force bit exercised");
    chk(n_held > 0, "flow control exercised");
    $display("events %0d xoff clocks %0d forced %0d", n_events, n_xoff, n_forced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
