// tb_rx_fpga: one RX FPGA end to end.  Fragments are sent on its three FE
// links; the bench then acts as the main FPGA: enable_links, get_status
// until a link has data, send_event, and collects the SelectLink bytes
// (with random back-pressure).  Checks the response word count, each
// received word, the XOR check word, that get_status shows the control
// FIFOs empty afterwards, and the all-links-ready line.
module tb_rx_fpga;
  import rod_pkg::*;
  import tb_frag_pkg::*;
  logic clk = 0, rst = 1;
  logic gl_lock [CH_PER_RX], gl_dv [CH_PER_RX], gl_cntl [CH_PER_RX], gl_err [CH_PER_RX];
  logic [15:0] gl_data [CH_PER_RX];
  logic cmd_stb, rsp_ack, all_ready, sl_valid, sl_ready, rx_busy;
  logic [3:0] cmd_nib, rsp_nib;
  logic [7:0] sl_byte;
  logic [CH_PER_RX-1:0] link_busy, link_ovf;
  int checks = 0, failures = 0;
  logic [7:0] bytes[$];

  rx_fpga #(.DEPTH(512), .CDEPTH(8), .MAX_WC(256), .AF_MARGIN(64)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    sl_ready <= ($urandom_range(3, 0) != 0);
    if (sl_valid) bytes.push_back(sl_byte);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
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

  task automatic command(input rx_cmd_e op, input logic [3:0] arg, output logic [15:0] rsp);
    @(negedge clk); cmd_stb = 1; cmd_nib = op;
    @(negedge clk); cmd_nib = arg;
    @(negedge clk); cmd_stb = 0;
    rsp = '0;
    for (int k = 0; k < 4; k++) begin
      while (!rsp_ack) @(negedge clk);
      rsp = {rsp[11:0], rsp_nib};
      @(negedge clk);
    end
  endtask

  initial begin
    wq_t w [CH_PER_RX]; hq_t h, t;
    logic [15:0] r;
    cmd_stb = 0; cmd_nib = 0;
    for (int c = 0; c < CH_PER_RX; c++) begin gl_lock[c] = 1; gl_dv[c] = 0; gl_cntl[c] = 0; gl_err[c] = 0; gl_data[c] = 0; end
    repeat (3) @(posedge clk); rst = 0;
    command(CMD_ENA_LINKS, 4'b0111, r);
    for (int ev = 0; ev < 3; ev++) begin
      for (int c = 0; c < CH_PER_RX; c++) begin
        make_frag(c, 2, ev, 2 + c, 5, w[c], h, t);
        send(c, w[c]);
      end
      @(negedge clk);
      chk(all_ready, "all links ready with data");
      for (int c = CH_PER_RX - 1; c >= 0; c--) begin
        logic [15:0] x;
        command(CMD_GET_STATUS, 0, r);
        chk(r[4*c + 2] == 1'b0 && r[4*c + 3] == 1'b1, "status: link ready with data");
        bytes = {};
        command(CMD_SEND_EVENT, 4'(c), r);
        chk(int'(r[11:0]) == w[c].size() && r[15:12] == 4'h0, "send_event word count and flags");
        while (bytes.size() < 2 * w[c].size() + 2) @(posedge clk);
        x = 16'h0;
        for (int i = 0; i < w[c].size(); i++) begin
          chk({bytes[2*i], bytes[2*i+1]} == w[c][i], "SelectLink word");
          x ^= w[c][i];
        end
        chk({bytes[2*w[c].size()], bytes[2*w[c].size()+1]} == x, "SelectLink XOR check word");
        command(CMD_GET_STATUS, 0, r);
        chk(r[4*c + 2] == 1'b1, "status: control FIFO empty after transfer");
      end
      chk(!all_ready && !rx_busy && link_ovf == '0, "idle after event");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
