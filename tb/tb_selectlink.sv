// tb_selectlink: connects selectlink_tx to selectlink_rx and moves blocks of
// random words from a source FIFO model to the receiver, whose output is
// drained at a random rate (so the ready/valid throttling is exercised).
// Checks every received word, the done flag, the byte count per transfer
// (two bytes per word plus two check bytes), and that a byte corrupted on
// the link is caught by the XOR check word.
module tb_selectlink;
  logic clk = 0, rst = 1;
  logic start, src_empty, src_rd, sl_valid, sl_ready, busy, out_rd, out_empty, done, xor_err;
  logic [11:0] wc;
  logic [15:0] src_data, out_data;
  logic [7:0] sl_byte, tx_byte;
  logic corrupt;
  int tcur = 0, ncur = 0;
  int checks = 0, failures = 0, nbytes;
  logic [15:0] src[$];

  selectlink_tx u_tx (.clk, .rst, .start, .wc, .src_empty, .src_data, .src_rd,
                      .sl_valid, .sl_byte(tx_byte), .sl_ready, .busy);
  // transfer 7: flip a bit of the last check byte on the link
  assign corrupt = (tcur == 7) && (nbytes == 2 * ncur + 1);
  assign sl_byte = corrupt ? (tx_byte ^ 8'h01) : tx_byte;
  selectlink_rx #(.DEPTH(16)) u_rx (.clk, .rst, .start, .wc, .sl_valid, .sl_byte, .sl_ready,
                                    .out_rd, .out_data, .out_empty, .done, .xor_err);

  assign src_empty = (src.size() == 0);
  assign src_data  = src_empty ? 16'h0 : src[0];
  always @(posedge clk) begin
    if (src_rd && !src_empty) void'(src.pop_front());
    if (sl_valid) nbytes++;
  end

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; wc = 0; out_rd = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int t = 0; t < 12; t++) begin
      logic [15:0] exp[$];
      int n;
      n = (t == 0) ? 1 : $urandom_range(60, 1);
      exp = {};
      for (int i = 0; i < n; i++) begin exp.push_back(16'($urandom)); src.push_back(exp[i]); end
      nbytes = 0; tcur = t; ncur = n;
      @(negedge clk); start = 1; wc = 12'(n); @(posedge clk); #1; start = 0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        while (out_empty || $urandom_range(2, 0) == 0) @(negedge clk);
        chk(out_data == exp[i], "received word");
        out_rd = 1; @(posedge clk); #1; out_rd = 0;
      end
      while (!done) @(posedge clk);
      @(negedge clk);
      chk(nbytes == 2 * n + 2, "bytes on the link");
      chk(xor_err == (t == 7), "XOR check word");
      chk(!busy, "transmitter idle at end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
