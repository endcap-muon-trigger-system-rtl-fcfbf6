// tb_rodbusy_ctl: drives random busy requests from four RX FPGAs, the
// event-ID FIFO almost-full flag and the force bit, and checks that RODBUSY
// is their OR one clock later and that the busy-time counter advances once
// per CLK_PER_US busy clocks (CLK_PER_US reduced to 5 here).
module tb_rodbusy_ctl;
  localparam int NS = 4, CPU = 5;
  logic clk = 0, rst = 1;
  logic [NS-1:0] rx_busy = 0;
  logic evid_afull = 0, force_busy = 0, rodbusy;
  logic [31:0] btime_us;
  int checks = 0, failures = 0;

  rodbusy_ctl #(.NSRC(NS), .CLK_PER_US(CPU)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit exp_busy = 0;
  int busy_clocks = 0, n_force = 0, n_afull = 0;

  always @(posedge clk) if (!rst) begin
    chk(rodbusy == exp_busy, "RODBUSY is the OR of the requests, one clock late");
    chk(btime_us == 32'(busy_clocks / CPU), "busy time in microseconds");
    if (rodbusy) busy_clocks++;
    exp_busy = (|rx_busy) || evid_afull || force_busy;
    #1;
    // long quiet and busy stretches
    if ($urandom_range(0, 9) == 0) rx_busy = NS'($urandom_range(0, 1) ? (1 << $urandom_range(0, NS - 1)) : 0);
    if ($urandom_range(0, 19) == 0) begin evid_afull = !evid_afull; n_afull++; end
    if ($urandom_range(0, 29) == 0) begin force_busy = !force_busy; n_force++; end
  end

  initial begin
    repeat (3) @(posedge clk); #2 rst = 0;
    repeat (3000) @(posedge clk);
    chk(busy_clocks > 100 && busy_clocks < 2900, "busy and idle both exercised");
    chk(n_force > 0 && n_afull > 0, "every busy source exercised");
    $display("busy clocks %0d busy time %0d us", busy_clocks, btime_us);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
