// tb_fpga_registers: random register traffic on the local bus of the FPGA
// register block, checked against a model kept in the bench.
//   - Random writes go to the writable registers and to unused offsets.
//     After every write, each writable register must read back its model
//     value (BCOF keeps 16 bits), unused offsets must read zero, and the
//     decoded outputs must match the model: the FCR1 bits at their
//     positions, OUTLENA/TTCENA, run number, ROD ID, TTACC, BC offset, the
//     EMUTE mute bits, the per-link Star Switch IDs from TGCC0/1, and a link enabled exactly
//     when its ID is non-zero.
//   - CMR1 writes must give one-clock pulses on clr_orbit / fake_pulse for
//     bits 4 / 5 and nothing otherwise, and CMR1 must read as zero.
//   - Read-only registers are checked against random status inputs.
// Bus inputs are driven 1 ns after the rising edge; the read data, being
// combinational, is sampled 1 ns after the address is set.
module tb_fpga_registers;
  import rod_pkg::*;
  logic clk = 0, rst = 1;
  logic [19:0] reg_addr = 0; logic reg_wr = 0; logic [31:0] reg_wdata = 0, reg_rdata;
  fcr1_t fcr1; logic ttc_ena, outl_ena;
  logic [31:0] run_number; logic [7:0] rod_id, ttacc; logic [11:0] bc_offset;
  logic [3:0] sswid_tab [N_FE]; logic [N_FE-1:0] ch_enable; logic [15:0] err_mute;
  logic clr_orbit, fake_pulse;
  logic svc_pend = 0, slink_lff = 0, slink_ldown = 0, busy_processing = 0;
  logic [3:0] l1id_expect = 0;
  logic [N_FE-1:0] fe_ovf = 0, fe_busy = 0, fe_tmo = 0;
  logic [15:0] last_err = 0;
  logic [31:0] btime_us = 0, n_giga = 0, n_built = 0;
  logic [23:0] l1id_proc = 0;
  int checks = 0, failures = 0;

  fpga_registers dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // model of the writable registers
  logic [19:0] wa [9];
  logic [31:0] m [9];     // FCR1 CMR1 BCOF RUN TGCC0 TGCC1 RODID TTACC EMUTE
  int n_orbit = 0, n_fake = 0;
  always @(posedge clk) if (!rst) begin
    if (clr_orbit) n_orbit++;
    if (fake_pulse) n_fake++;
  end

  task automatic write_reg(input logic [19:0] a, input logic [31:0] d);
    @(posedge clk); #1 reg_addr = a; reg_wdata = d; reg_wr = 1;
    @(posedge clk); #1 reg_wr = 0;
  endtask

  task automatic read_reg(input logic [19:0] a, output logic [31:0] d);
    #1 reg_addr = a;
    #1 d = reg_rdata;
  endtask

  task automatic check_all();
    logic [31:0] r;
    for (int i = 0; i < 9; i++) begin
      read_reg(wa[i], r);
      if (i == 1) chk(r == 32'h0, "CMR1 reads as zero");
      else if (i == 2) chk(r == {16'h0, m[i][15:0]}, "BCOF reads back");
      else chk(r == m[i], "register reads back");
    end
    read_reg(20'h00300, r);
    chk(r == 32'h0, "unused offset reads zero");
    chk(fcr1.allfmt == m[0][0] && fcr1.errfmt == m[0][1] && fcr1.fltfmt == m[0][2] &&
        fcr1.giga_sample == m[0][3] && fcr1.fltfmt_giga == m[0][4] &&
        fcr1.include_ssw == m[0][5] && fcr1.info_off == m[0][7] &&
        fcr1.tt_include == m[0][9] && fcr1.slink_force == m[0][13] &&
        fcr1.fake_l1a == m[0][19], "FCR1 bit positions");
    chk(outl_ena == m[0][21] && ttc_ena == m[0][22], "OUTLENA / TTCENA");
    chk(bc_offset == m[2][11:0], "BC offset");
    chk(run_number == m[3], "run number");
    chk(rod_id == m[6][7:0] && ttacc == m[7][7:0], "ROD ID and TTACC");
    chk(err_mute == m[8][15:0], "error mute bits");
    for (int c = 0; c < N_FE; c++) begin
      logic [3:0] id;
      id = (c < 8) ? m[4][4*c +: 4] : m[5][4*(c-8) +: 4];
      chk(sswid_tab[c] == id, "Star Switch ID of a link");
      chk(ch_enable[c] == (id != 4'h0), "link enabled when its ID is set");
    end
  endtask

  initial begin
    logic [31:0] r;
    int want_orbit, want_fake;
    wa[0] = 20'h00200; wa[1] = 20'h00204; wa[2] = 20'h00210; wa[3] = 20'h00214;
    wa[4] = 20'h00220; wa[5] = 20'h00224; wa[6] = 20'h00234; wa[7] = 20'h00240; wa[8] = 20'h00238;
    for (int i = 0; i < 9; i++) m[i] = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    check_all();
    want_orbit = 0; want_fake = 0;
    for (int k = 0; k < 400; k++) begin
      int i;
      logic [31:0] d;
      i = $urandom_range(0, 9);
      d = $urandom;
      // clear some nibbles so that links get disabled too
      for (int b = 0; b < 8; b++) if ($urandom_range(0, 2) == 0) d[4*b +: 4] = 4'h0;
      if (i == 9) write_reg(20'(4 * $urandom_range(0, 255)) | 20'h80000, d);  // unused offset
      else begin
        write_reg(wa[i], d);
        if (i == 1) begin
          want_orbit += int'(d[4]); want_fake += int'(d[5]);
        end else m[i] = d;
      end
      @(posedge clk);
      check_all();
    end
    chk(n_orbit == want_orbit && want_orbit > 0, "one clr_orbit pulse per CMR1 bit 4");
    chk(n_fake == want_fake && want_fake > 0, "one fake_pulse per CMR1 bit 5");
    // read-only registers
    for (int k = 0; k < 50; k++) begin
      @(posedge clk); #1;
      svc_pend = 1'($urandom); slink_lff = 1'($urandom); slink_ldown = 1'($urandom);
      busy_processing = 1'($urandom); l1id_expect = 4'($urandom);
      fe_ovf = N_FE'($urandom); fe_busy = N_FE'($urandom); fe_tmo = N_FE'($urandom);
      last_err = 16'($urandom); btime_us = $urandom; n_giga = $urandom; n_built = $urandom;
      l1id_proc = 24'($urandom);
      read_reg(20'h00000, r);
      chk(r[0] == svc_pend && r[19:16] == l1id_expect && r[20] == slink_lff &&
          r[21] == svc_pend && r[22] == slink_ldown && r[29] == busy_processing, "SR1");
      read_reg(20'h00004, r); chk(r == {4'h0, fe_ovf, 4'h0, fe_busy}, "FFR");
      read_reg(20'h00008, r); chk(r == {16'h0, last_err}, "ERRS");
      read_reg(20'h0001C, r); chk(r == btime_us, "BTIME");
      read_reg(20'h00028, r); chk(r == {20'h0, fe_tmo}, "FEOUT");
      read_reg(20'h00108, r); chk(r == {8'h0, l1id_proc}, "L1AP");
      read_reg(20'h0010C, r); chk(r == n_giga, "NGIG");
      read_reg(20'h00110, r); chk(r == n_built, "NEVS");
      read_reg(20'h00014, r); chk(r != 32'h0, "FVER");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
