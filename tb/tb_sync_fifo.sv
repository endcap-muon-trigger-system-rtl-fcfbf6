// tb_sync_fifo: random push/pop traffic against a queue model; checks the
// head word, empty/full/almost-full and the occupancy count every clock.
module tb_sync_fifo;
  localparam int W = 16, DEPTH = 16, AF = 3;
  logic clk = 0, rst = 1;
  logic wr, rd, empty, full, afull;
  logic [W-1:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.W(W), .DEPTH(DEPTH), .AF_MARGIN(AF)) dut (.*, .almost_full(afull));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; rd = 0; din = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      chk(count == model.size(), "count");
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == DEPTH), "full");
      chk(afull == (model.size() + AF >= DEPTH), "almost_full");
      if (model.size() != 0) chk(dout == model[0], "head word");
      // phases: fill, drain, mixed
      wr  = (i % 1000 < 300) ? ($urandom_range(3,0) != 0) : (i % 1000 < 600) ? ($urandom_range(3,0) == 0) : $urandom_range(1,0);
      rd  = (i % 1000 < 300) ? ($urandom_range(3,0) == 0) : (i % 1000 < 600) ? ($urandom_range(3,0) != 0) : $urandom_range(1,0);
      din = W'($urandom);
      begin
        automatic int sz = model.size();
        @(posedge clk);
        if (rd && sz != 0) void'(model.pop_front());
        if (wr && sz < DEPTH) model.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
