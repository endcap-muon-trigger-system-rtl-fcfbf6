// tb_rod_pipe: writes random-length records with random status into a
// pipe while a consumer reads them back with the control-word-first rule;
// checks the counts, statuses, data, that a control word appears only after
// its record is complete, and that words written into a full data FIFO are
// not counted.
module tb_rod_pipe;
  localparam int DW = 16, DEPTH = 64, CDEPTH = 8, SW = 4, CW = 12;
  logic clk = 0, rst = 1;
  logic wr, rec_end, data_full, ctrl_full, ctrl_afull, almost_full, data_rd, data_empty, ctrl_rd, ctrl_empty;
  logic [DW-1:0] wdata, data_out;
  logic [SW-1:0] rec_status, ctrl_status;
  logic [CW-1:0] ctrl_cnt;
  logic [$clog2(DEPTH+1)-1:0] occupancy;
  int checks = 0, failures = 0;
  typedef struct { int n; logic [SW-1:0] st; logic [DW-1:0] d[$]; } rec_t;
  rec_t sent[$];

  rod_pipe #(.DW(DW), .DEPTH(DEPTH), .CDEPTH(CDEPTH), .SW(SW), .CW(CW), .AF_MARGIN(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // producer
  initial begin
    wr = 0; rec_end = 0; wdata = 0; rec_status = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int r = 0; r < 60; r++) begin
      rec_t rc;
      rc.n = $urandom_range(20, 0); rc.st = SW'($urandom); rc.d = {};
      while (ctrl_full) @(posedge clk);
      for (int i = 0; i < rc.n; i++) begin
        @(negedge clk);
        while (data_full) @(negedge clk);
        wr = 1; wdata = DW'($urandom); rc.d.push_back(wdata);
        rec_end = (i == rc.n - 1); rec_status = rc.st;
        @(posedge clk); #1; wr = 0; rec_end = 0;
      end
      if (rc.n == 0) begin
        @(negedge clk); rec_end = 1; rec_status = rc.st; @(posedge clk); #1; rec_end = 0;
      end
      sent.push_back(rc);
    end
    // overflow: fill the data FIFO beyond its size in one record
    wait (sent.size() == 0);
    @(negedge clk);
    for (int i = 0; i < DEPTH + 5; i++) begin
      wr = 1; wdata = DW'(i); @(posedge clk); #1;
    end
    wr = 0; @(negedge clk);
    chk(data_full && almost_full, "full after overflow");
    chk(ctrl_empty, "no control word before record end");
    rec_end = 1; rec_status = 4'h5; @(posedge clk); #1; rec_end = 0;
    @(negedge clk);
    chk(!ctrl_empty && ctrl_cnt == CW'(DEPTH), "overflowing record counts only stored words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: blocking read on the control pipe, then the record
  initial begin
    data_rd = 0; ctrl_rd = 0;
    @(negedge rst);
    for (int r = 0; r < 60; r++) begin
      rec_t rc;
      @(negedge clk);
      while (ctrl_empty) @(negedge clk);
      chk(sent.size() > 0, "control word only after record complete");
      rc = sent.pop_front();
      chk(int'(ctrl_cnt) == rc.n, "record word count");
      chk(ctrl_status == rc.st, "record status");
      ctrl_rd = 1; @(posedge clk); #1; ctrl_rd = 0;
      for (int i = 0; i < rc.n; i++) begin
        @(negedge clk);
        chk(!data_empty && data_out == rc.d[i], "record data");
        data_rd = 1; @(posedge clk); #1; data_rd = 0;
      end
    end
  end
endmodule
