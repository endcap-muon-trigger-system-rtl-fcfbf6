// tb_cmd_resp_slave: plays the main-FPGA side of the command-response
// channel against the RX-side slave.  Sends every Table-3 command (two
// command nibbles, then collects four response nibbles) and checks the
// 16-bit responses against values built from the link status the bench
// presents, the one-clock pulses on the link control outputs (fragment
// pop, overflow clear, SelectLink start), the enable register and the
// all-links-ready line.
module tb_cmd_resp_slave;
  import rod_pkg::*;
  localparam int NCH = 3;
  logic clk = 0, rst = 1;
  logic cmd_stb, rsp_ack, all_ready, tx_busy, tx_start;
  logic [3:0] cmd_nib, rsp_nib;
  logic [NCH-1:0] link_ready, ctrl_empty, ovf, busy, ctrl_rd, clr_ovf, enable;
  logic [15:0] occ [NCH];
  frag_flags_t ctrl_flags [NCH];
  logic [11:0] ctrl_wc [NCH];
  logic [11:0] tx_wc;
  logic [1:0] tx_ch;
  int checks = 0, failures = 0;
  int n_ctrl_rd [NCH], n_clr [NCH], n_start;
  logic [1:0] last_ch;
  logic [11:0] last_wc;

  cmd_resp_slave #(.NCH(NCH)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    for (int c = 0; c < NCH; c++) begin
      if (ctrl_rd[c]) n_ctrl_rd[c]++;
      if (clr_ovf[c]) n_clr[c]++;
    end
    if (tx_start) begin n_start++; last_ch = tx_ch; last_wc = tx_wc; end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic command(input rx_cmd_e op, input logic [3:0] arg, output logic [15:0] rsp);
    int guard = 0;
    @(negedge clk); cmd_stb = 1; cmd_nib = op;
    @(negedge clk); cmd_nib = arg;
    @(negedge clk); cmd_stb = 0;
    rsp = '0;
    for (int k = 0; k < 4; k++) begin
      while (!rsp_ack && guard < 20) begin @(negedge clk); guard++; end
      rsp = {rsp[11:0], rsp_nib};
      @(negedge clk);
    end
    chk(!rsp_ack, "response is exactly four nibbles");
  endtask

  function automatic logic [15:0] status_word();
    logic [15:0] s = '0;
    for (int c = 0; c < NCH; c++) s[4*c +: 4] = {link_ready[c], ctrl_empty[c], ovf[c], busy[c]};
    return s;
  endfunction

  initial begin
    logic [15:0] r;
    cmd_stb = 0; cmd_nib = 0; tx_busy = 0;
    for (int c = 0; c < NCH; c++) begin
      occ[c] = 16'(100 * c + 7); ctrl_flags[c] = frag_flags_t'(c + 1); ctrl_wc[c] = 12'(20 + c);
      n_ctrl_rd[c] = 0; n_clr[c] = 0;
    end
    n_start = 0;
    link_ready = 3'b101; ctrl_empty = 3'b010; ovf = 3'b100; busy = 3'b001;
    repeat (3) @(posedge clk); rst = 0;
    chk(enable == 0 && !all_ready, "links disabled after reset");
    command(CMD_GET_STATUS, 0, r);
    chk(r == status_word(), "get_status");
    command(CMD_ENA_LINKS, 4'b0101, r);
    chk(enable == 3'b101 && r == status_word(), "enable_links");
    @(negedge clk); chk(all_ready, "all enabled links have data");
    ctrl_empty = 3'b011; @(negedge clk); chk(!all_ready, "all_ready drops when an enabled link is empty");
    ctrl_empty = 3'b010;
    for (int c = 0; c < NCH; c++) begin
      command(CMD_GET_OCC, 4'(c), r);
      chk(r == occ[c], "get_occupancy");
    end
    command(CMD_SEND_EVENT, 4'd2, r);
    chk(r == {ctrl_flags[2], ctrl_wc[2]}, "send_event response");
    chk(n_ctrl_rd[2] == 1 && n_ctrl_rd[0] == 0 && n_ctrl_rd[1] == 0, "fragment popped from link 2 only");
    chk(n_start == 1 && last_ch == 2'd2 && last_wc == ctrl_wc[2], "SelectLink started for link 2");
    command(CMD_SEND_EVENT, 4'd1, r);
    chk(r == 16'h0 && n_ctrl_rd[1] == 0 && n_start == 1, "send_event on an empty link refused");
    tx_busy = 1;
    command(CMD_SEND_EVENT, 4'd0, r);
    chk(r == 16'h0 && n_start == 1, "send_event refused while SelectLink busy");
    tx_busy = 0;
    command(CMD_CLR_OVF, 4'b0100, r);
    chk(n_clr[2] == 1 && n_clr[0] == 0 && n_clr[1] == 0, "clear_overflows mask");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
