// tb_rod_top: end-to-end test of the whole ROD at its default sizes.
//
// Twelve Front End link drivers send Star Switch fragments (built by
// tb_frag_pkg) with random delays relative to the Level-1 Accepts, so some
// events find every fragment already buffered (all-links-ready shortcut)
// and others make the schedulers poll.  The S-Link output is collected and
// each event is compared word for word with the event the bench predicts:
// header (except the BCID and ORBIT words, which depend on bunch timing),
// hit, tracklet and raw blocks in processor and link order, status word
// and trailer.  XOFF (`lff`) toggles at random throughout.  Later phases
// make each remaining mechanism happen and check its visible effect:
//   raw blocks included and excluded, VME and gigabit sampling, an XOR
//   error, too many hits, an FE link time-out, a fake L1A, exceptions read
//   from the exception pipe, an FE buffer filled until RODBUSY and overflow,
//   the overflow cleared by command, and the RODBUSY force bit.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_rod_top;
  import rod_pkg::*;
  import tb_frag_pkg::*;
  logic clk = 0, rst = 1;
  logic gl_lock [N_FE], gl_dv [N_FE], gl_cntl [N_FE], gl_err [N_FE];
  logic [15:0] gl_data [N_FE];
  logic l1a = 0, bcr = 0, ecr = 0, tt_stb = 0;
  logic [7:0] tt = 0;
  fcr1_t fcr1 = '0;
  logic ttc_ena = 1, outl_ena = 1;
  logic [31:0] run_number = 32'd4711;
  logic [7:0] rod_id = 8'h05, ttacc = 8'hFF;
  logic [11:0] bc_offset = 12'd0;
  logic [3:0] sswid_tab [N_FE];
  logic [N_FE-1:0] ch_enable = '1;
  logic force_busy = 0, clr_ovf_req = 0;
  logic [19:0] reg_addr = 0; logic reg_wr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic lff = 0, ldown = 0;
  logic [31:0] ud; logic uctrl, uwen;
  logic rodbusy; logic [31:0] btime_us;
  logic exc_rd = 0, exc_svc, first_l1a; exc_msg_t exc_dout;
  logic vme_rd = 0, vme_empty, giga_rd = 0, giga_empty;
  logic [31:0] vme_dout, giga_dout;
  logic [31:0] n_events_built, n_events_sent, n_vme_events, n_giga_events;
  logic [31:0] n_hits_total, n_exc_total, n_fast_total, n_polls_total, n_xoff;
  logic [N_FE-1:0] fe_ovf;
  int checks = 0, failures = 0;

  rod_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #40000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- register bus ----------------
  task automatic write_reg(input logic [19:0] a, input logic [31:0] d);
    @(posedge clk); #2 reg_addr = a; reg_wdata = d; reg_wr = 1;
    @(posedge clk); #2 reg_wr = 0; reg_addr = 0;
  endtask

  task automatic read_reg(input logic [19:0] a, output logic [31:0] d);
    @(posedge clk); #2 reg_addr = a;
    #1 d = reg_rdata;
    reg_addr = 0;
  endtask

  // the bench's configuration variables, packed into FCR1 bit positions
  function automatic logic [31:0] fcr1_word();
    logic [31:0] v;
    v = '0;
    v[0] = fcr1.allfmt; v[1] = fcr1.errfmt; v[2] = fcr1.fltfmt;
    v[3] = fcr1.giga_sample; v[4] = fcr1.fltfmt_giga; v[5] = fcr1.include_ssw;
    v[7] = fcr1.info_off; v[9] = fcr1.tt_include; v[13] = fcr1.slink_force;
    v[19] = fcr1.fake_l1a; v[21] = outl_ena; v[22] = ttc_ena;
    return v;
  endfunction

  task automatic apply_cfg();
    logic [31:0] g0, g1, r;
    g0 = '0; g1 = '0;
    for (int c = 0; c < N_FE; c++)
      if (c < 8) g0[4*c +: 4] = ch_enable[c] ? sswid_tab[c] : 4'h0;
      else       g1[4*(c-8) +: 4] = ch_enable[c] ? sswid_tab[c] : 4'h0;
    write_reg(20'h00214, run_number);
    write_reg(20'h00234, {24'h0, rod_id});
    write_reg(20'h00240, {24'h0, ttacc});
    write_reg(20'h00210, {20'h0, bc_offset});
    write_reg(20'h00220, g0);
    write_reg(20'h00224, g1);
    write_reg(20'h00200, fcr1_word());
    read_reg(20'h00200, r);
    chk(r == fcr1_word(), "FCR1 reads back");
    read_reg(20'h00214, r);
    chk(r == run_number, "RUN reads back");
  endtask

  // ---------------- FE link drivers ----------------
  typedef struct { longint t; logic [16:0] w; } item_t;   // {control, word}
  item_t link_q [N_FE][$];
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    #1;
    for (int c = 0; c < N_FE; c++) begin
      if (link_q[c].size() != 0 && link_q[c][0].t <= cyc) begin
        item_t it;
        it = link_q[c].pop_front();
        gl_dv[c] = 1; gl_cntl[c] = it.w[16]; gl_data[c] = it.w[15:0];
      end else begin
        gl_dv[c] = 0; gl_cntl[c] = 0;
      end
    end
  end

  task automatic queue_frag(input int c, input wq_t w, input int delay);
    item_t it;
    longint t0;
    t0 = cyc + delay;
    if (link_q[c].size() != 0 && link_q[c][link_q[c].size()-1].t > t0) t0 = link_q[c][link_q[c].size()-1].t;
    it.t = t0; it.w = {1'b1, BOE_WORD}; link_q[c].push_back(it);
    foreach (w[i]) begin it.w = {1'b0, w[i]}; link_q[c].push_back(it); end
    it.w = {1'b1, EOE_WORD}; link_q[c].push_back(it);
  endtask

  // ---------------- S-Link collector ----------------
  typedef logic [31:0] ev_t[$];
  ev_t got_q[$];          // complete events received
  ev_t cur;
  bit in_ev = 0;
  int n_xoff_seen = 0;
  always @(posedge clk) if (!rst) begin
    if (uwen) begin
      if (uctrl && ud == SLINK_BOF) begin
        chk(!in_ev, "begin word only between events");
        cur = {}; in_ev = 1;
      end else if (uctrl && ud == SLINK_EOF) begin
        chk(in_ev, "end word closes an event");
        got_q.push_back(cur); in_ev = 0;
      end else begin
        chk(!uctrl && in_ev, "data word inside an event");
        cur.push_back(ud);
      end
    end
    if (lff && in_ev) n_xoff_seen++;
  end

  // lff toggles: short XOFF bursts
  always @(posedge clk) begin
    #1;
    if ($urandom_range(0, 19) == 0) lff = !lff;
    if (lff && $urandom_range(0, 3) == 0) lff = 0;
  end

  // monitoring and exception readers
  int vme_words = 0, giga_words = 0;
  exc_id_e exc_log[$];
  always @(posedge clk) begin
    bit vr, gr, er; exc_msg_t em;
    vr = vme_rd && !vme_empty; gr = giga_rd && !giga_empty; er = exc_rd && exc_svc; em = exc_dout;
    #1;
    if (vr) vme_words++;
    if (gr) giga_words++;
    if (er) exc_log.push_back(exc_id_e'(em.id));
    vme_rd = ($urandom_range(0, 1) == 0);
    giga_rd = ($urandom_range(0, 1) == 0);
    exc_rd = ($urandom_range(0, 3) == 0);
  end

  // ---------------- expected events ----------------
  typedef struct {
    ev_t words;       // expected words (strict events)
    bit  strict;
    int  l1id;
    int  err_bit;     // loose events: status bit that must be set
  } exp_t;
  exp_t exp_q[$];
  int l1id_next = 0;
  int n_fast0, n_polls0;
  int m_strict = 0, m_loose = 0, m_raw = 0, m_noraw = 0;

  // build the fragments of one event on the enabled links, queue them and
  // return the expected event
  task automatic make_event(input int l1, input int maxdelay, input int skip_link,
                            input int big_link, input int xor_link, output exp_t e);
    hq_t hits [N_RX], trks [N_RX];
    logic [31:0] raw [N_RX][$];
    int nd = 0;
    for (int p = 0; p < N_RX; p++) begin hits[p] = {}; trks[p] = {}; raw[p] = {}; end
    for (int c = 0; c < N_FE; c++) begin
      wq_t w; hq_t h, t;
      int p = c / CH_PER_RX;
      if (c == big_link) make_frag(c, int'(sswid_tab[c]), l1 % 16, 20, 25, w, h, t);
      else make_frag(c, int'(sswid_tab[c]), l1 % 16, 1, 2, w, h, t);
      if (c == xor_link) w[w.size()-1] ^= 16'h0040;
      if (c != skip_link) queue_frag(c, w, $urandom_range(0, maxdelay));
      foreach (h[i]) hits[p].push_back(h[i]);
      foreach (t[i]) trks[p].push_back(t[i]);
      foreach (w[i]) raw[p].push_back({4'h0, 4'(c), 8'h00, w[i]});
    end
    e.words = {};
    e.words.push_back(ROD_HDR_MARK);
    e.words.push_back(ROD_HDR_SIZE);
    e.words.push_back(ROD_FMT_VER);
    e.words.push_back({8'h00, SUBDET_TGC_A, 8'h00, rod_id});
    e.words.push_back(run_number);
    e.words.push_back({8'h00, 24'(l1)});
    e.words.push_back(32'h0);                  // BCID, not compared
    e.words.push_back(32'h0);                  // trigger type
    e.words.push_back(32'h0);                  // ORBIT, not compared
    for (int p = 0; p < N_RX; p++) begin
      e.words.push_back({BLK_HITS, 4'(p), 8'h00, 12'(hits[p].size())}); nd++;
      foreach (hits[p][i]) begin e.words.push_back(hits[p][i]); nd++; end
    end
    for (int p = 0; p < N_RX; p++) begin
      e.words.push_back({BLK_TRACKLETS, 4'(p), 8'h00, 12'(trks[p].size())}); nd++;
      foreach (trks[p][i]) begin e.words.push_back(trks[p][i]); nd++; end
    end
    if (fcr1.include_ssw)
      for (int p = 0; p < N_RX; p++) begin
        e.words.push_back({BLK_RAW, 4'(p), 8'h00, 12'(raw[p].size())}); nd++;
        foreach (raw[p][i]) begin e.words.push_back(raw[p][i]); nd++; end
      end
    e.words.push_back(32'h0);                  // status
    e.words.push_back(32'd1);
    e.words.push_back(32'(nd));
    e.words.push_back(32'd1);
    e.strict = 1;
    e.l1id = l1;
    e.err_bit = -1;
  endtask

  task automatic pulse_l1a();
    @(posedge clk); #2 l1a = 1;
    @(posedge clk); #2 l1a = 0;
  endtask

  // compare received events with the expected ones
  task automatic check_events();
    int n = 0;
    while (got_q.size() < exp_q.size() && n < 400000) begin @(posedge clk); n++; end
    chk(got_q.size() == exp_q.size(), "every event reached the S-Link");
    while (got_q.size() != 0 && exp_q.size() != 0) begin
      ev_t g;
      exp_t e;
      bit ok;
      g = got_q.pop_front();
      e = exp_q.pop_front();
      chk(g.size() > 12 && g[5] == {8'h00, 24'(e.l1id)}, "event order (L1ID)");
      if (e.strict) begin
        ok = (g.size() == e.words.size());
        for (int i = 0; i < g.size() && ok; i++)
          if (i != 6 && i != 8 && g[i] != e.words[i]) begin
            ok = 0;
            $display("  event %0d word %0d got %h exp %h", e.l1id, i, g[i], e.words[i]);
          end
        if (g.size() != e.words.size()) $display("  event %0d size %0d exp %0d", e.l1id, g.size(), e.words.size());
        chk(ok, "event record matches");
        m_strict++;
      end else begin
        chk(g.size() > 12 && g[g.size()-4][e.err_bit], "status word flags the error");
        m_loose++;
      end
    end
  endtask

  int n_busy_seen = 0;
  always @(posedge clk) if (rodbusy) n_busy_seen++;

  initial begin
    exp_t e;
    int n;
    for (int c = 0; c < N_FE; c++) begin
      gl_lock[c] = 1; gl_dv[c] = 0; gl_cntl[c] = 0; gl_err[c] = 0; gl_data[c] = 0;
      sswid_tab[c] = 4'(c % 4 + 1);
    end
    repeat (5) @(posedge clk); #2 rst = 0;
    apply_cfg();
    repeat (100) @(posedge clk);   // enable_links
    // BCR now and then
    fork
      forever begin repeat (3564) @(posedge clk); #2 bcr = 1; @(posedge clk); #2 bcr = 0; end
    join_none

    // phase 1: clean events, raw blocks included, all events sampled
    fcr1.include_ssw = 1; fcr1.allfmt = 1; fcr1.giga_sample = 1;
    apply_cfg();
    for (int k = 0; k < 12; k++) begin
      // even events: fragments well before the L1A; odd: spread after it
      make_event(l1id_next, (k % 2 == 0) ? 0 : 400, -1, -1, -1, e);
      if (k % 2 == 0) repeat (60) @(posedge clk);
      exp_q.push_back(e); l1id_next++;
      pulse_l1a();
      check_events();
    end
    m_raw = m_strict;
    chk(n_fast_total != 0, "all-links-ready shortcut taken");
    chk(n_polls_total != 0, "schedulers polled for late fragments");
    // phase 2: raw blocks excluded, back-to-back triggers, no VME sampling
    fcr1.include_ssw = 0; fcr1.allfmt = 0; fcr1.giga_sample = 1; fcr1.fltfmt_giga = 0;
    apply_cfg();
    for (int k = 0; k < 8; k++) begin
      make_event(l1id_next, 50, -1, -1, -1, e);
      exp_q.push_back(e); l1id_next++;
      pulse_l1a();
    end
    check_events();
    m_noraw = m_strict - m_raw;
    // phase 3: error events
    fcr1.errfmt = 1;
    apply_cfg();
    make_event(l1id_next, 20, -1, -1, 4, e);          // XOR error on link 4
    e.strict = 0; e.err_bit = ERR_XOR; exp_q.push_back(e); l1id_next++;
    pulse_l1a(); check_events();
    make_event(l1id_next, 20, -1, 0, -1, e);           // big fragment on link 0
    begin
      wq_t w; hq_t h, t;
      make_frag(1, int'(sswid_tab[1]), l1id_next % 16, 20, 25, w, h, t);
      // link 1 gets a second big fragment instead of its small one
      void'(link_q[1].pop_back());
      while (link_q[1].size() != 0 && link_q[1][link_q[1].size()-1].w != {1'b1, BOE_WORD})
        void'(link_q[1].pop_back());
      void'(link_q[1].pop_back());
      queue_frag(1, w, 0);
    end
    e.strict = 0; e.err_bit = ERR_HITS; exp_q.push_back(e); l1id_next++;
    pulse_l1a(); check_events();
    make_event(l1id_next, 20, 7, -1, -1, e);           // link 7 silent
    e.strict = 0; e.err_bit = ERR_TIMEOUT; exp_q.push_back(e); l1id_next++;
    pulse_l1a(); check_events();
    begin
      logic [31:0] r;
      read_reg(20'h00028, r);
      chk(r[11:0] == 12'h080, "FEOUT shows link 7 timed out");
      read_reg(20'h00008, r);
      chk(r[ERR_TIMEOUT], "ERRS shows the time-out");
    end
    // fake L1A (single shot) on a clean event
    make_event(l1id_next, 20, -1, -1, -1, e);
    exp_q.push_back(e); l1id_next++;
    write_reg(20'h00204, 32'h20);   // CMR1 fake L1A
    check_events();
    repeat (200) @(posedge clk);
    begin
      bit s_xor = 0, s_hits = 0, s_tmo = 0;
      foreach (exc_log[i]) begin
        if (exc_log[i] == EX_XOR) s_xor = 1;
        if (exc_log[i] == EX_TOO_MANY_HITS) s_hits = 1;
        if (exc_log[i] == EX_FE_TIMEOUT) s_tmo = 1;
      end
      chk(s_xor, "XOR exception read from the exception pipe");
      chk(s_hits, "too-many-hits exception read");
      chk(s_tmo, "FE link time-out exception read");
      chk(n_exc_total >= 3, "exception counter");
    end
    // phase 4: fill FE link 9 without triggers until RODBUSY and overflow
    n = 0;
    while (!fe_ovf[9] && n < 40) begin
      wq_t w; hq_t h, t;
      make_frag(9, int'(sswid_tab[9]), 0, 20, 25, w, h, t);
      queue_frag(9, w, 0);
      while (link_q[9].size() != 0) @(posedge clk);
      repeat (4) @(posedge clk);
      n++;
    end
    chk(n_busy_seen > 0, "RODBUSY raised by a filling FE buffer");
    chk(fe_ovf[9], "FE buffer overflow flagged");
    begin
      logic [31:0] r;
      read_reg(20'h00004, r);
      chk(r[16 + 9] && r[9], "FFR shows link 9 overflow and busy");
    end
    @(posedge clk); #2 clr_ovf_req = 1; @(posedge clk); #2 clr_ovf_req = 0;
    repeat (200) @(posedge clk);
    chk(!fe_ovf[9], "overflow cleared by clear_overflows");
    // RODBUSY force bit
    @(posedge clk); #2 force_busy = 1;
    repeat (3) @(posedge clk);
    chk(rodbusy, "RODBUSY forced");
    #2 force_busy = 0;

    chk(n_events_sent == n_events_built, "every built event sent");
    begin
      logic [31:0] r;
      read_reg(20'h00110, r);
      chk(r == n_events_built, "NEVS register");
      read_reg(20'h0010C, r);
      chk(r == n_giga_events, "NGIG register");
      read_reg(20'h0001C, r);
      chk(r == btime_us && r != 0, "BTIME register");
      read_reg(20'h00220, r);
      chk(r == 32'h4321_4321, "TGCC0 register");
    end
    chk(n_vme_events >= 12 && vme_words > 0, "VME sampling");
    chk(n_giga_events >= 20 && giga_words > 0, "gigabit sampling");
    chk(n_xoff != 0 && n_xoff_seen != 0, "S-Link XOFF stalls");
    chk(m_raw > 0 && m_noraw > 0, "raw blocks both included and excluded");
    chk(m_loose == 3, "error events checked");
    $display("mechanisms: shortcut %0d polls %0d xoff %0d vme %0d giga %0d raw %0d noraw %0d",
             n_fast_total, n_polls_total, n_xoff, n_vme_events, n_giga_events, m_raw, m_noraw);
    $display("            errors %0d exceptions %0d busy clocks %0d hits %0d events %0d",
             m_loose, n_exc_total, n_busy_seen, n_hits_total, n_events_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
