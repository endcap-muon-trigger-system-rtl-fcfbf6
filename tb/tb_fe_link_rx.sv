// tb_fe_link_rx: drives framed fragments into one FE link handler the way a
// G-link receiver delivers them (control-mode framing words, idle gaps) and
// reads them back.  Cases: good fragments, a corrupted word (XOR error), a
// G-link error, an over-long fragment, stray words outside an event, a
// disabled link, and buffer overflow with busy, sticky overflow and its
// clearing.  Expected word counts, flags and data come from the generated
// fragments.
module tb_fe_link_rx;
  import rod_pkg::*;
  import tb_frag_pkg::*;
  localparam int DEPTH = 256, CDEPTH = 8, MAX_WC = 96, AF = 32;
  logic clk = 0, rst = 1;
  logic enable, clr_ovf, gl_dv, gl_cntl, gl_err;
  logic [15:0] gl_data, data_out, occupancy;
  logic data_rd, data_empty, ctrl_rd, ctrl_empty, busy, ovf_sticky;
  frag_flags_t ctrl_flags;
  logic [11:0] ctrl_wc;
  int checks = 0, failures = 0;

  fe_link_rx #(.DEPTH(DEPTH), .CDEPTH(CDEPTH), .MAX_WC(MAX_WC), .AF_MARGIN(AF)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic put(input logic [15:0] d, input bit cntl, input bit err = 0);
    @(negedge clk); gl_dv = 1; gl_cntl = cntl; gl_data = d; gl_err = err;
    @(posedge clk); #1; gl_dv = 0; gl_err = 0;
  endtask

  task automatic send(input wq_t w, input int err_at = -1);
    put(16'h0000, 1); put(BOE_WORD, 1);
    foreach (w[i]) begin
      put(w[i], 0, i == err_at);
      if ($urandom_range(3, 0) == 0) @(posedge clk);   // idle gap
    end
    put(EOE_WORD, 1); put(16'h0000, 1);
  endtask

  // read one fragment and compare
  task automatic expect_frag(input wq_t w, input int n, input frag_flags_t fl, input string tag);
    @(negedge clk);
    chk(!ctrl_empty, {tag, ": fragment buffered"});
    chk(int'(ctrl_wc) == n, {tag, ": word count"});
    chk(ctrl_flags == fl, {tag, ": flags"});
    if (ctrl_flags != fl) $display("  flags %b expected %b", ctrl_flags, fl);
    ctrl_rd = 1; @(posedge clk); #1; ctrl_rd = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      chk(!data_empty && data_out == w[i], {tag, ": data"});
      data_rd = 1; @(posedge clk); #1; data_rd = 0;
    end
  endtask

  initial begin
    wq_t w, w2; hq_t h, t;
    frag_flags_t none, f;
    none = '0;
    enable = 0; clr_ovf = 0; gl_dv = 0; gl_cntl = 0; gl_err = 0; gl_data = 0; data_rd = 0; ctrl_rd = 0;
    repeat (3) @(posedge clk); rst = 0;
    // disabled link ignores input
    make_frag(0, 3, 1, 2, 3, w, h, t);
    send(w);
    @(negedge clk); chk(ctrl_empty && data_empty, "disabled link ignores data");
    enable = 1;
    // good fragments
    for (int k = 0; k < 5; k++) begin
      make_frag(0, 3, k, 3, 4, w, h, t);
      chk(xor_all(w) == 16'h0, "generator XOR");
      send(w);
      expect_frag(w, w.size(), none, "good");
    end
    // corrupted word -> XOR error
    make_frag(0, 3, 1, 2, 4, w, h, t);
    w2 = w; w2[3] ^= 16'h0040;
    send(w2);
    f = none; f.xor_err = 1; expect_frag(w2, w2.size(), f, "xor");
    // G-link error
    make_frag(0, 3, 1, 2, 4, w, h, t);
    send(w, 2);
    f = none; f.link_err = 1; expect_frag(w, w.size(), f, "glink");
    // too long: truncated to MAX_WC
    make_frag(0, 3, 1, 12, 8, w, h, t);
    while (w.size() <= MAX_WC) make_frag(0, 3, 1, 12, 8, w, h, t);
    send(w);
    f = none; f.too_long = 1; expect_frag(w, MAX_WC, f, "too long");
    // stray data outside an event marks the next fragment
    put(16'h1234, 0);
    make_frag(0, 3, 1, 2, 4, w, h, t);
    send(w);
    f = none; f.link_err = 1; expect_frag(w, w.size(), f, "stray");
    // overflow: several fragments without reading
    chk(!busy && !ovf_sticky, "not busy when empty");
    for (int k = 0; k < 6; k++) begin
      make_frag(0, 3, 1, 8, 8, w, h, t);
      send(w);
    end
    @(negedge clk);
    chk(busy, "busy (almost full) asserted");
    chk(ovf_sticky, "overflow seen");
    chk(int'(occupancy) == DEPTH, "occupancy at full");
    begin
      int n_ovf = 0, tot = 0;
      while (!ctrl_empty) begin
        @(negedge clk);
        if (ctrl_flags.overflow) n_ovf++;
        tot += int'(ctrl_wc);
        ctrl_rd = 1; @(posedge clk); #1; ctrl_rd = 0;
      end
      chk(n_ovf > 0, "overflow flag on a fragment");
      chk(tot == DEPTH, "stored words equal buffer size");
      while (!data_empty) begin data_rd = 1; @(posedge clk); #1; end
      data_rd = 0;
    end
    clr_ovf = 1; @(posedge clk); #1; clr_ovf = 0;
    @(negedge clk); chk(!ovf_sticky && !busy, "overflow cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
