// tb_output_formatter: gives the output formatter events made of a header
// record and one record per data pipe (two fragment processors here, so six
// pipes: hits, tracklets, raw), with random block sizes, random control
// register settings and random back-pressure on the output event FIFO and
// the monitoring pipes.  A reference model builds the expected S-Link word
// stream (begin word, 9-word header, block headers and data, raw blocks
// only when included, status word, 3-word trailer with the data word
// count, end word) and the expected sampling decision for the VME and
// gigabit pipes, and every written word is compared.
module tb_output_formatter;
  import rod_pkg::*;
  localparam int NFP = 2, NQ = 3 * NFP, NEV = 120;
  logic clk = 0, rst = 1;
  fcr1_t fcr1 = '0;
  logic [31:0] run_number = 32'h0001_2345;
  logic [7:0] rod_id = 8'h83, ttacc = 8'h0F;
  evhdr_t hdr; logic hdr_empty = 1, hdr_rd;
  logic q_ctrl_empty [NQ], q_ctrl_rd [NQ], q_data_rd [NQ];
  logic [11:0] q_ctrl_cnt [NQ];
  logic [31:0] q_data [NQ];
  logic ev_wr, ev_full = 0, vme_wr, giga_wr;
  logic [32:0] ev_data;
  logic [31:0] mon_data;
  logic vme_full = 0, vme_afull = 0, giga_full = 0, giga_afull = 0;
  logic [31:0] n_events, n_vme, n_giga;
  logic [15:0] err_mute = 0;
  int checks = 0, failures = 0;

  output_formatter #(.NFP(NFP), .NQ(NQ)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  evhdr_t hdr_q[$];
  logic [11:0] cnt_q [NQ][$];
  logic [31:0] dat_q [NQ][$];
  logic [32:0] exp_ev[$];
  logic [31:0] exp_vme[$], exp_giga[$];
  int n_eof = 0, m_vme = 0, m_giga = 0, n_stall = 0;

  always @(posedge clk) begin
    bit hr, ew, vw, gw; bit cr [NQ]; bit dr [NQ];
    logic [32:0] ed; logic [31:0] md;
    hr = hdr_rd; ew = ev_wr; vw = vme_wr; gw = giga_wr; ed = ev_data; md = mon_data;
    for (int i = 0; i < NQ; i++) begin cr[i] = q_ctrl_rd[i]; dr[i] = q_data_rd[i]; end
    if (!rst && ev_full) n_stall++;
    if (!rst) begin
      if (ew) begin
        chk(!ev_full, "no write to a full event FIFO");
        chk(exp_ev.size() != 0 && ed == exp_ev[0], "S-Link word");
        if (exp_ev.size() != 0) void'(exp_ev.pop_front());
        if (ed == {1'b1, SLINK_EOF}) n_eof++;
      end
      if (vw) begin
        chk(!vme_full && exp_vme.size() != 0 && md == exp_vme[0], "VME sample word");
        if (exp_vme.size() != 0) void'(exp_vme.pop_front());
      end
      if (gw) begin
        chk(!giga_full && exp_giga.size() != 0 && md == exp_giga[0], "gigabit sample word");
        if (exp_giga.size() != 0) void'(exp_giga.pop_front());
      end
    end
    #1;
    if (hr) void'(hdr_q.pop_front());
    for (int i = 0; i < NQ; i++) begin
      if (cr[i]) void'(cnt_q[i].pop_front());
      if (dr[i]) void'(dat_q[i].pop_front());
    end
    hdr_empty = (hdr_q.size() == 0);
    hdr = hdr_empty ? '0 : hdr_q[0];
    for (int i = 0; i < NQ; i++) begin
      q_ctrl_empty[i] = (cnt_q[i].size() == 0);
      q_ctrl_cnt[i] = q_ctrl_empty[i] ? 12'h0 : cnt_q[i][0];
      q_data[i] = (dat_q[i].size() == 0) ? 32'hDEAD_BEEF : dat_q[i][0];
    end
    ev_full = ($urandom_range(0, 4) == 0);
    vme_full = ($urandom_range(0, 6) == 0);
    giga_full = ($urandom_range(0, 6) == 0);
  end

  // build one event and the words expected from it
  task automatic one_event(input int e);
    evhdr_t h;
    int nd = 0;
    bit filt, vsel, gsel;
    logic [31:0] words[$];
    h.evid.evidext = 8'(e / 50); h.evid.l1id = 24'(e); h.evid.bcid = 12'($urandom_range(0, 3563));
    h.evid.orbit = 32'(e * 3);
    h.ttype = 8'($urandom);
    h.err = ($urandom_range(0, 2) == 0) ? 16'(1 << $urandom_range(0, 6)) : 16'h0;
    fcr1 = '0;
    err_mute = ($urandom_range(0, 2) == 0) ? 16'($urandom) : 16'h0;
    fcr1.include_ssw = $urandom_range(0, 1);
    fcr1.allfmt = ($urandom_range(0, 3) == 0);
    fcr1.errfmt = $urandom_range(0, 1);
    fcr1.fltfmt = $urandom_range(0, 1);
    fcr1.giga_sample = $urandom_range(0, 1);
    fcr1.fltfmt_giga = $urandom_range(0, 1);
    vme_afull = ($urandom_range(0, 3) == 0);
    giga_afull = ($urandom_range(0, 3) == 0);
    filt = (h.ttype & ttacc) != 0;
    vsel = (fcr1.allfmt || (fcr1.errfmt && (h.err & ~err_mute) != 0) || (fcr1.fltfmt && filt)) &&
           (fcr1.allfmt || !vme_afull);
    gsel = fcr1.giga_sample && (!fcr1.fltfmt_giga || filt) && !giga_afull;
    words = {};
    words.push_back(32'hEE12_34EE);
    words.push_back(32'd9);
    words.push_back(32'h0301_0000);
    words.push_back({8'h00, 8'h68, 8'h00, rod_id});
    words.push_back(run_number);
    words.push_back({h.evid.evidext, h.evid.l1id});
    words.push_back({20'h0, h.evid.bcid});
    words.push_back({24'h0, h.ttype});
    words.push_back(h.evid.orbit);
    for (int q = 0; q < NQ; q++) begin
      int n = $urandom_range(0, 5);
      bit inc = (q < 2 * NFP) || fcr1.include_ssw;
      logic [7:0] kind = (q < NFP) ? 8'h01 : (q < 2 * NFP) ? 8'h02 : 8'h03;
      cnt_q[q].push_back(12'(n));
      if (inc) begin words.push_back({kind, 4'(q % NFP), 8'h00, 12'(n)}); nd++; end
      for (int k = 0; k < n; k++) begin
        logic [31:0] d = $urandom;
        dat_q[q].push_back(d);
        if (inc) begin words.push_back(d); nd++; end
      end
    end
    words.push_back({16'h0, h.err});
    words.push_back(32'd1); words.push_back(32'(nd)); words.push_back(32'd1);
    exp_ev.push_back({1'b1, SLINK_BOF});
    foreach (words[i]) begin
      exp_ev.push_back({1'b0, words[i]});
      if (vsel) exp_vme.push_back(words[i]);
      if (gsel) exp_giga.push_back(words[i]);
    end
    exp_ev.push_back({1'b1, SLINK_EOF});
    if (vsel) m_vme++;
    if (gsel) m_giga++;
    hdr_q.push_back(h);
  endtask

  initial begin
    repeat (3) @(posedge clk); #2 rst = 0;
    for (int e = 0; e < NEV; e++) begin
      int n;
      n = 0;
      one_event(e);
      while (exp_ev.size() != 0 && n < 5000) begin @(posedge clk); n++; end
      repeat (2) @(posedge clk);
      #2;
      chk(exp_ev.size() == 0 && exp_vme.size() == 0 && exp_giga.size() == 0, "event complete");
    end
    for (int i = 0; i < NQ; i++) chk(dat_q[i].size() == 0 && cnt_q[i].size() == 0, "every pipe drained");
    chk(n_events == 32'(NEV) && n_eof == NEV, "event counter");
    chk(n_vme == 32'(m_vme) && n_giga == 32'(m_giga), "sample counters");
    chk(m_vme > 0 && m_giga > 0 && m_vme < NEV && m_giga < NEV, "sampling exercised both ways");
    chk(n_stall > 0, "output back-pressure exercised");
    $display("events %0d vme %0d giga %0d", n_events, n_vme, n_giga);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
