// tb_ttc_if: drives bunch clock, BCR, ECR, L1A and trigger types into the
// TTC block and checks the stored event IDs against a reference model of
// the counters: BCID loaded with the offset on BCR and wrapping per orbit,
// L1ID counting L1As and cleared by ECR with EVIDext incremented, ORBIT held
// at zero until the first L1A then counting BCRs, the trigger-type FIFO,
// the fake-L1A rate (one per FAKE_PERIOD clocks) and the single-shot fake.
module tb_ttc_if;
  import rod_pkg::*;
  localparam int BCO = 20, FAKEP = 16;
  logic clk = 0, rst = 1;
  logic enable, l1a, bcr, ecr, tt_stb, fake_ena, fake_pulse, clr_orbit;
  logic [7:0] tt, tt_out;
  logic [11:0] bc_offset;
  logic evid_rd, evid_empty, evid_full, tt_rd, tt_empty, first_l1a;
  evid_t evid;
  logic [23:0] last_l1id;
  int checks = 0, failures = 0, n_first = 0;
  // reference model
  int m_bcid, m_l1id, m_ext, m_orbit; bit m_run;
  evid_t exp_q[$];
  logic [7:0] tt_q[$];

  ttc_if #(.BC_PER_ORBIT(BCO), .FAKE_PERIOD(FAKEP), .DEPTH(64)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (first_l1a) n_first++;

  // model runs on the same edges as the DUT
  // inputs change just after a rising edge; the model steps on the falling
  // edge with the values the DUT will sample on the next rising edge
  int n_push = 0;
  int m_fcnt = 0;   // free-running fake-trigger divider, as the DUT's
  always @(negedge clk) if (!rst) begin
    bit any;
    any = enable && (l1a || fake_pulse || (fake_ena && m_fcnt == 0));
    m_fcnt = (m_fcnt + 1) % FAKEP;
    if (any) n_push++;
    if (any) exp_q.push_back({8'(m_ext), 24'(m_l1id), 12'(m_bcid), 32'(m_orbit)});
    if (enable && tt_stb) tt_q.push_back(tt);
    if (bcr) begin m_bcid = int'(bc_offset); if (m_run) m_orbit++; end
    else m_bcid = (m_bcid == BCO - 1) ? 0 : m_bcid + 1;
    if (ecr) begin m_l1id = 0; m_ext++; end else if (any) m_l1id++;
    if (any) m_run = 1;
  end

  // consumer
  always @(negedge clk) if (!rst) begin
    evid_rd = 0; tt_rd = 0;
    if (!evid_empty) begin
      chk(exp_q.size() > 0 && evid == exp_q[0], "event ID record");
      if (exp_q.size() > 0 && evid != exp_q[0]) $display("  got %h exp %h", evid, exp_q[0]);
      void'(exp_q.pop_front()); evid_rd = 1;
    end
    if (!tt_empty) begin
      chk(tt_q.size() > 0 && tt_out == tt_q[0], "trigger type");
      void'(tt_q.pop_front()); tt_rd = 1;
    end
  end

  initial begin
    int nfake;
    enable = 1; l1a = 0; bcr = 0; ecr = 0; tt_stb = 0; tt = 0; fake_ena = 0; fake_pulse = 0; clr_orbit = 0;
    bc_offset = 12'd3; evid_rd = 0; tt_rd = 0;
    m_bcid = 0; m_l1id = 0; m_ext = 0; m_orbit = 0; m_run = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk); #1;
      l1a    = ($urandom_range(9, 0) == 0);
      bcr    = (i % 37 == 5);
      ecr    = (i == 300);
      tt_stb = ($urandom_range(9, 0) == 0); tt = 8'($urandom);
    end
    @(posedge clk); #1; l1a = 0; bcr = 0; ecr = 0; tt_stb = 0;
    chk(n_first == 1, "first L1A reported once");
    // fake L1A rate
    nfake = n_push;
    fake_ena = 1;
    repeat (8 * FAKEP) @(posedge clk);
    #1 fake_ena = 0;
    chk(n_push - nfake == 8, "fake L1A every FAKE_PERIOD clocks");
    @(posedge clk); #1 fake_pulse = 1; @(posedge clk); #1 fake_pulse = 0;
    repeat (5) @(posedge clk);
    chk(exp_q.size() == 0 && tt_q.size() == 0 && evid_empty, "all records read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
