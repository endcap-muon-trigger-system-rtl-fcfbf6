// tb_fragment_processor: feeds fragments built by tb_frag_pkg into the
// fragment processor, one fragment per event, with random gaps in the input
// stream and random back-pressure from the three pipes and the exception
// port.  Every hit and tracklet word is compared, in order, with the words
// the fragment generator predicts; raw words are compared with the input.
// Error cases, each in its own event, check that the matching exception is
// raised and the event error summary carries the matching bit:
//   clean, wrong SSW ID, wrong SLB L1ID, corrupted XOR, bad end marker,
//   RX overflow flag, SelectLink check-word error, missing trailer and too
//   many hits (MAX_HITS is reduced to 200 here).
module tb_fragment_processor;
  import rod_pkg::*;
  import tb_frag_pkg::*;
  localparam int MAXH = 200;
  logic clk = 0, rst = 1;
  logic include_raw = 1;
  logic [3:0] sswid_tab [N_FE];
  logic ev_start = 0, ev_close = 0;
  logic [23:0] ev_l1id = 0;
  logic [15:0] ev_err;
  logic start = 0; logic [3:0] ch = 0; logic [11:0] wc = 0; frag_flags_t flags = '0;
  logic idle, done;
  logic in_empty = 1, in_rd, xfer_done = 0, xfer_err = 0;
  logic [15:0] in_data = 0;
  logic hit_wr, trk_wr, raw_wr, pipes_close;
  logic [31:0] hit_data, raw_data;
  logic hit_full = 0, trk_full = 0, raw_full = 0;
  logic exc_valid, exc_ready = 0; exc_msg_t exc_msg;
  logic [31:0] n_hits, n_frags;
  int checks = 0, failures = 0;

  fragment_processor #(.MAX_HITS(MAXH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  wq_t in_q;            // words still to deliver
  wq_t raw_q;           // words expected on the raw pipe
  hq_t hit_q, trk_q;    // expected hits and tracklets
  bit  prefix_only = 0; // too-many-hits case: any prefix is fine
  int  n_hit_seen = 0, n_trk_seen = 0, n_raw_seen = 0;
  exc_id_e exc_seen[$];
  int  n_stall = 0;

  // stream source, sinks and monitors: sample on the edge, drive 1 ns later
  always @(posedge clk) begin
    bit rd, hw, tw, rw, ex;
    logic [31:0] hd, rdw; exc_msg_t em;
    rd = in_rd; hw = hit_wr; tw = trk_wr; rw = raw_wr; hd = hit_data; rdw = raw_data;
    ex = exc_valid && exc_ready; em = exc_msg;
    if (!rst && !in_empty && !rd && (hit_full || trk_full || raw_full)) n_stall++;
    #1;
    if (rd) begin
      chk(!in_empty, "read from an empty stream");
      void'(in_q.pop_front());
    end
    if (hw) begin
      n_hit_seen++;
      chk(hit_q.size() != 0 && hd == hit_q[0], "hit word");
      if (hit_q.size() != 0) void'(hit_q.pop_front());
    end
    if (tw) begin
      n_trk_seen++;
      chk(trk_q.size() != 0 && hd == trk_q[0], "tracklet word");
      if (trk_q.size() != 0) void'(trk_q.pop_front());
    end
    if (rw) begin
      n_raw_seen++;
      chk(raw_q.size() != 0 && rdw == {4'h0, ch, 8'h00, raw_q[0]}, "raw word");
      if (raw_q.size() != 0) void'(raw_q.pop_front());
    end
    if (ex) exc_seen.push_back(exc_id_e'(em.id));
    in_empty = (in_q.size() == 0) || ($urandom_range(0, 3) == 0);
    in_data  = (in_q.size() == 0) ? 16'h0 : in_q[0];
    hit_full = ($urandom_range(0, 4) == 0);
    trk_full = ($urandom_range(0, 4) == 0);
    raw_full = ($urandom_range(0, 6) == 0);
    exc_ready = ($urandom_range(0, 1) == 0);
    if (start) start = 0;
    if (ev_start) ev_start = 0;
    if (ev_close) ev_close = 0;
  end

  // one event holding one fragment
  task automatic run(input string name, input wq_t w, input hq_t h, input hq_t t,
                     input int chn, input frag_flags_t fl, input bit xerr,
                     input int want, input int err_bit);
    int n = 0;
    bit found = (want < 0);
    bit fin = 0;
    @(posedge clk); #2;
    ev_l1id = 24'(5); ev_start = 1;
    @(posedge clk); #2;
    exc_seen = {};
    hit_q = h; trk_q = t; raw_q = w; in_q = w;
    ch = 4'(chn); wc = 12'(w.size()); flags = fl; xfer_err = xerr; xfer_done = 0;
    start = 1;
    while (in_q.size() != 0 && n < 100000) begin @(posedge clk); n++; end
    #2 xfer_done = 1;
    while (!fin && n < 100000) begin @(posedge clk); fin = done; n++; end
    #2 xfer_done = 0;
    chk(fin, {name, ": fragment finished"});
    chk(in_q.size() == 0, {name, ": all words consumed"});
    if (prefix_only) begin
      chk(n_hit_seen + n_trk_seen == MAXH, {name, ": hits cut at the limit"});
      hit_q = {}; trk_q = {};
    end
    chk(hit_q.size() == 0 && trk_q.size() == 0, {name, ": every hit decoded"});
    chk(raw_q.size() == 0, {name, ": every raw word copied"});
    repeat (2) @(posedge clk);
    #2 ev_close = 1;
    @(posedge clk);
    chk(pipes_close, {name, ": pipes closed with the event"});
    if (want < 0) chk(exc_seen.size() == 0, {name, ": no exception"});
    foreach (exc_seen[i]) if (want < 0) $display("  unexpected exception %0d", exc_seen[i]);
    foreach (exc_seen[i]) if (int'(exc_seen[i]) == want) found = 1;
    chk(found, {name, ": expected exception"});
    if (err_bit < 0) chk(ev_err == 16'h0, {name, ": clean error summary"});
    else chk(ev_err[err_bit], {name, ": error summary bit"});
  endtask

  initial begin
    wq_t w; hq_t h, t;
    frag_flags_t fl;
    for (int i = 0; i < N_FE; i++) sswid_tab[i] = 4'(i % 3 + 1);
    repeat (3) @(posedge clk); #1 rst = 0;
    // clean fragments on several channels
    for (int k = 0; k < 12; k++) begin
      make_frag(k, k % 3 + 1, 5, 1 + k % 4, 6, w, h, t);
      run("clean", w, h, t, k, '0, 0, -1, -1);
      n_hit_seen = 0; n_trk_seen = 0;
    end
    // wrong SSW ID
    make_frag(4, 3, 5, 2, 3, w, h, t);
    run("sswid", w, h, t, 4, '0, 0, int'(EX_BAD_SSWID), ERR_FORMAT);
    // wrong SLB L1ID
    make_frag(2, 3, 6, 2, 3, w, h, t);
    run("l1id", w, h, t, 2, '0, 0, EX_SB_L1ID, ERR_ID);
    // XOR corrupted in the trailer's low half
    make_frag(1, 2, 5, 2, 3, w, h, t);
    w[w.size()-1] ^= 16'h0100;
    run("xor", w, h, t, 1, '0, 0, int'(EX_XOR), ERR_XOR);
    // bad end marker (XOR kept right)
    make_frag(0, 1, 5, 1, 3, w, h, t);
    w[w.size()-2] ^= 16'h0010; w[w.size()-1] ^= 16'h0010;
    run("eoe", w, h, t, 0, '0, 0, int'(EX_BAD_EOE), ERR_FORMAT);
    // RX overflow flag
    make_frag(3, 1, 5, 1, 3, w, h, t);
    fl = '0; fl.overflow = 1;
    run("overflow", w, h, t, 3, fl, 0, int'(EX_TOO_LONG_OVF), ERR_LINK);
    // SelectLink check-word error
    make_frag(5, 3, 5, 1, 3, w, h, t);
    run("xmit", w, h, t, 5, '0, 1, int'(EX_XMIT_ERR), ERR_LINK);
    // missing trailer
    make_frag(6, 1, 5, 1, 3, w, h, t);
    void'(w.pop_back()); void'(w.pop_back());
    run("no eoe", w, h, t, 6, '0, 0, int'(EX_NO_EOE), ERR_FORMAT);
    // too many hits
    make_frag(7, 2, 5, 8, 25, w, h, t);
    prefix_only = 1; n_hit_seen = 0; n_trk_seen = 0;
    if (h.size() + t.size() <= MAXH) $display("note: too-many-hits fragment is small");
    run("too many hits", w, h, t, 7, '0, 0, int'(EX_TOO_MANY_HITS), ERR_HITS);
    prefix_only = 0;
    chk(n_frags == 20, "fragment counter");
    chk(n_stall > 0, "pipe back-pressure exercised");
    $display("hits %0d fragments %0d stalls %0d", n_hits, n_frags, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
