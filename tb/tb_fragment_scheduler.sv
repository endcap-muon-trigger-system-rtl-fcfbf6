// tb_fragment_scheduler: one fragment scheduler driving a real RX FPGA over
// the command-response channel, with a stand-in for the fragment processor
// that swallows the SelectLink bytes of each fragment and then pulses
// `fp_done`.  Scenarios, one event each:
//   0. every link holds its fragment before the event starts (all-links-
//      ready shortcut),
//   1. one fragment arrives late (the scheduler polls with get_status),
//   2. one link never sends (the scheduler gives up after TIMEOUT_POLLS
//      polls, raises `timedout` and an "FE link timed out" exception),
//   3. as 0 but with a link disabled just before the event: the scheduler
//      resends enable_links, holds the event start meanwhile, then skips
//      the disabled link,
// plus a clear_overflows request while idle.  For every transfer the bench
// checks the channel number, word count, flags and every word received,
// and it checks the command sequence seen on the channel.
module tb_fragment_scheduler;
  import rod_pkg::*;
  import tb_frag_pkg::*;
  localparam int LINK = 2, TMO = 8;
  logic clk = 0, rst = 1;
  logic gl_lock [CH_PER_RX], gl_dv [CH_PER_RX], gl_cntl [CH_PER_RX], gl_err [CH_PER_RX];
  logic [15:0] gl_data [CH_PER_RX];
  logic cmd_stb, rsp_ack, all_ready, sl_valid, sl_ready, rx_busy;
  logic [3:0] cmd_nib, rsp_nib;
  logic [7:0] sl_byte;
  logic [CH_PER_RX-1:0] link_busy, link_ovf, timedout;
  logic [CH_PER_RX-1:0] ch_enable = 3'b111;
  logic ev_start = 0, clr_ovf_req = 0, done;
  logic fp_idle, fp_start, fp_done = 0;
  logic [3:0] fp_ch; logic [11:0] fp_wc; frag_flags_t fp_flags;
  logic exc_valid, exc_ready = 0; exc_msg_t exc_msg;
  logic [15:0] n_polls, n_fast;
  int checks = 0, failures = 0;

  rx_fpga #(.DEPTH(512), .CDEPTH(8), .MAX_WC(256), .AF_MARGIN(64)) rx (.*);
  fragment_scheduler #(.LINK(LINK), .TIMEOUT_POLLS(TMO)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #4000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // command monitor: pairs of nibbles while cmd_stb
  rx_cmd_e cmd_log[$];
  bit second = 0;
  always @(posedge clk) if (!rst) begin
    if (cmd_stb && !second) cmd_log.push_back(rx_cmd_e'(cmd_nib));
    second = cmd_stb && !second;
  end

  // fragment processor stand-in
  wq_t expect_q[$];        // fragments in the order they must arrive
  int  expect_ch[$];
  int  n_xfer = 0, n_exc = 0;
  bit  busy = 0;
  int  want = 0;
  logic [7:0] got[$];
  assign fp_idle = !busy;
  always @(posedge clk) begin
    bit st, v;
    logic [7:0] b;
    st = fp_start; v = sl_valid && sl_ready; b = sl_byte;
    #1;
    fp_done = 0;
    sl_ready = busy && ($urandom_range(0, 3) != 0);
    exc_ready = ($urandom_range(0, 1) != 0);
    if (st) begin
      chk(!busy, "start only when the processor is idle");
      busy = 1; want = 2 * int'(fp_wc) + 2; got = {};
      chk(expect_q.size() != 0, "transfer expected");
      if (expect_q.size() != 0) begin
        chk(int'(fp_ch) == LINK * CH_PER_RX + expect_ch[0], "global channel number");
        chk(int'(fp_wc) == expect_q[0].size(), "word count from send_event");
        chk(fp_flags == '0, "no flags on a clean fragment");
      end
    end else if (busy && v) begin
      got.push_back(b);
      if (got.size() == want) begin
        logic [15:0] x;
        wq_t w;
        x = 0;
        w = expect_q.pop_front();
        void'(expect_ch.pop_front());
        for (int i = 0; i < w.size(); i++) begin
          chk({got[2*i], got[2*i+1]} == w[i], "fragment word");
          x ^= w[i];
        end
        chk({got[want-2], got[want-1]} == x, "check word");
        busy = 0; fp_done = 1; n_xfer++;
      end
    end
  end

  always @(posedge clk) if (exc_valid && exc_ready) begin
    n_exc++;
    chk(exc_msg.id == EX_FE_TIMEOUT && exc_msg.ctx[7:0] == 8'({4'(LINK), 4'd2}), "timeout exception names the link");
  end

  task automatic put(input int c, input logic [15:0] d, input bit cntl);
    @(negedge clk); gl_dv[c] = 1; gl_cntl[c] = cntl; gl_data[c] = d;
    @(posedge clk); #1; gl_dv[c] = 0;
  endtask

  task automatic send(input int c, input wq_t w);
    put(c, BOE_WORD, 1);
    foreach (w[i]) put(c, w[i], 0);
    put(c, EOE_WORD, 1);
  endtask

  task automatic start_event();
    @(negedge clk); ev_start = 1; @(negedge clk); ev_start = 0;
  endtask

  task automatic wait_done();
    int n = 0;
    @(negedge clk);
    while (!done && n < 20000) begin @(negedge clk); n++; end
    chk(done, "event finished");
  endtask

  initial begin
    wq_t w; hq_t h, t;
    for (int c = 0; c < CH_PER_RX; c++) begin gl_lock[c] = 1; gl_dv[c] = 0; gl_cntl[c] = 0; gl_err[c] = 0; gl_data[c] = 0; end
    repeat (3) @(posedge clk); #1 rst = 0;
    wait_done();  // enable_links after reset
    // 0: all fragments present
    for (int c = 0; c < CH_PER_RX; c++) begin
      make_frag(c, 2, 0, 1 + c, 4, w, h, t); send(c, w);
      expect_q.push_back(w); expect_ch.push_back(c);
    end
    repeat (4) @(posedge clk);
    start_event(); wait_done();
    chk(n_fast != 0, "all-links-ready shortcut taken");
    chk(timedout == '0, "no timeout in event 0");
    // 1: link 1 late
    make_frag(0, 2, 1, 2, 4, w, h, t); send(0, w); expect_q.push_back(w); expect_ch.push_back(0);
    make_frag(1, 2, 1, 3, 4, w, h, t); expect_q.push_back(w); expect_ch.push_back(1);
    fork
      begin start_event(); end
      begin repeat (60) @(posedge clk); send(1, w); end
    join
    make_frag(2, 2, 1, 1, 4, w, h, t); send(2, w); expect_q.push_back(w); expect_ch.push_back(2);
    wait_done();
    chk(n_polls > 2, "polled for a late fragment");
    chk(timedout == '0, "no timeout in event 1");
    // 2: link 2 silent
    for (int c = 0; c < 2; c++) begin
      make_frag(c, 2, 2, 2, 4, w, h, t); send(c, w);
      expect_q.push_back(w); expect_ch.push_back(c);
    end
    start_event(); wait_done();
    chk(timedout == 3'b100, "link 2 timed out");
    chk(n_exc == 1, "one timeout exception");
    // 3: link 2 disabled
    ch_enable = 3'b011;
    for (int c = 0; c < 2; c++) begin
      make_frag(c, 2, 3, 3, 4, w, h, t); send(c, w);
      expect_q.push_back(w); expect_ch.push_back(c);
    end
    start_event(); wait_done();
    chk(timedout == 3'b000, "disabled link skipped without timeout");
    // overflow recovery command
    @(negedge clk); clr_ovf_req = 1; @(negedge clk); clr_ovf_req = 0;
    wait_done();
    repeat (5) @(posedge clk);
    chk(expect_q.size() == 0, "every fragment transferred");
    chk(n_xfer == 10, "ten transfers");
    chk(cmd_log.size() != 0 && cmd_log[0] == CMD_ENA_LINKS, "enable_links first after reset");
    chk(cmd_log.size() != 0 && cmd_log[cmd_log.size()-1] == CMD_CLR_OVF, "clear_overflows on request");
    begin
      int nsend = 0;
      foreach (cmd_log[i]) if (cmd_log[i] == CMD_SEND_EVENT) nsend++;
      chk(nsend == 10, "one send_event per transfer");
      nsend = 0;
      foreach (cmd_log[i]) if (cmd_log[i] == CMD_ENA_LINKS) nsend++;
      chk(nsend == 2, "enable_links sent again when the link set changed");
    end
    $display("transfers %0d polls %0d shortcuts %0d", n_xfer, n_polls, n_fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
