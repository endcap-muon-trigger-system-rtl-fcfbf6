// fpga_registers: the VME-visible control, command and status registers of
// the ROD main FPGA.
//
// The board's VME interface logic turns VME cycles in the FPGA's 1 MB
// register window into a simple local bus: `reg_addr` is the byte offset in
// that window, `reg_wr` with `reg_wdata` writes a register at the clock edge,
// and `reg_rdata` is the combinational read data for `reg_addr`.
// Writable registers (offsets as in the FPGA register map):
//   0x200 FCR1   control register 1, bits as listed below
//   0x204 CMR1   command register 1, write only: each set bit gives a one-
//                clock pulse (bit 4 clear orbit counter, bit 5 fake L1A)
//   0x210 BCOF   bunch-crossing offset loaded on BCR (low 12 bits used)
//   0x214 RUN    run number put into every formatted event
//   0x220 TGCC0  Star Switch ID expected on FE links 7..0, 4 bits each
//   0x224 TGCC1  Star Switch ID expected on FE links 11..8
//   0x234 RODID  ROD ID (bit 7 selects the detector side)
//   0x238 EMUTE  event error bits that do not count for CR1_ERRFMT sampling
//   0x240 TTACC  trigger-type bits selecting events for filtered sampling
// Read-only registers: 0x000 SR1 status, 0x004 FFR (FE overflow flags in
// bits 27:16, FE buffer busy flags in bits 11:0), 0x008 ERRS (error summary
// of the last event), 0x014 FVER firmware version, 0x01C BTIME (RODBUSY time
// in microseconds), 0x028 FEOUT (FE links timed out in the last event),
// 0x108 L1AP (L1ID being processed), 0x10C NGIG (events sampled to gigabit ethernet), 0x110 NEVS
// (events built).  Writable registers read back their value; other
// offsets read as zero.
// The register names, offsets, meanings and the FCR1/CMR1/SR1 bit lists
// follow the register map of the design description.  Bit numbers are not
// given there: FCR1 and CMR1 bits are numbered here in the order they are
// listed (FCR1 bit 0 ALLFMT, 1 ERRFMT, 2 FLTFMT, 3 GIGA_SAMPLE,
// 4 FLTFMT_GIGA, 5 INCLUDE_SSW, 7 INFOFF, 9 TRIGGER_TYPE_INCLUDE,
// 13 SLINK_FORCE, 19 FAKE_L1A, 21 OUTLENA, 22 TTCENA; the other listed bits
// are stored but drive nothing), and SR1 fields are packed from bit 0 up in
// listed order.  A link is enabled when its TGCC nibble is non-zero (no
// Star Switch connected otherwise); that, the local bus and the firmware
// version number are this design's own choices.  Registers the RTL has no
// use for (SBINFO, EMUTS, TSTN, ...) are not provided.
module fpga_registers
  import rod_pkg::*;
#(
  parameter logic [31:0] FW_VERSION = 32'h0001_0000
) (
  input  logic        clk,
  input  logic        rst,
  // local bus from the VME interface
  input  logic [19:0] reg_addr,
  input  logic        reg_wr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // configuration to the data path
  output fcr1_t       fcr1,
  output logic        ttc_ena,
  output logic        outl_ena,
  output logic [31:0] run_number,
  output logic [7:0]  rod_id,
  output logic [7:0]  ttacc,
  output logic [11:0] bc_offset,
  output logic [3:0]  sswid_tab [N_FE],
  output logic [N_FE-1:0] ch_enable,
  output logic [15:0] err_mute,
  // CMR1 command pulses
  output logic        clr_orbit,
  output logic        fake_pulse,
  // status from the data path
  input  logic        svc_pend,       // exception pipe service call pending
  input  logic [3:0]  l1id_expect,    // low L1ID of the event in processing
  input  logic        slink_lff,
  input  logic        slink_ldown,
  input  logic        busy_processing,
  input  logic [N_FE-1:0] fe_ovf,
  input  logic [N_FE-1:0] fe_busy,
  input  logic [N_FE-1:0] fe_tmo,
  input  logic [15:0] last_err,
  input  logic [31:0] btime_us,
  input  logic [23:0] l1id_proc,
  input  logic [31:0] n_giga,
  input  logic [31:0] n_built
);
  localparam logic [19:0] A_SR1   = 20'h0_0000, A_FFR   = 20'h0_0004,
                          A_ERRS  = 20'h0_0008, A_FVER  = 20'h0_0014,
                          A_BTIME = 20'h0_001C, A_FEOUT = 20'h0_0028,
                          A_L1AP  = 20'h0_0108,
                          A_NGIG  = 20'h0_010C, A_NEVS  = 20'h0_0110,
                          A_FCR1  = 20'h0_0200, A_CMR1  = 20'h0_0204,
                          A_BCOF  = 20'h0_0210, A_RUN   = 20'h0_0214,
                          A_TGCC0 = 20'h0_0220, A_TGCC1 = 20'h0_0224,
                          A_RODID = 20'h0_0234, A_EMUTE = 20'h0_0238, A_TTACC = 20'h0_0240;

  logic [31:0] r_fcr1, r_run, r_rodid, r_ttacc, r_tgcc0, r_tgcc1, r_emute;
  logic [15:0] r_bcof;

  always_ff @(posedge clk) begin
    clr_orbit  <= 1'b0;
    fake_pulse <= 1'b0;
    if (rst) begin
      r_fcr1 <= '0; r_run <= '0; r_rodid <= '0; r_ttacc <= '0;
      r_tgcc0 <= '0; r_tgcc1 <= '0; r_bcof <= '0; r_emute <= '0;
    end else if (reg_wr) begin
      unique case (reg_addr)
        A_FCR1:  r_fcr1  <= reg_wdata;
        A_CMR1:  begin clr_orbit <= reg_wdata[4]; fake_pulse <= reg_wdata[5]; end
        A_BCOF:  r_bcof  <= reg_wdata[15:0];
        A_RUN:   r_run   <= reg_wdata;
        A_TGCC0: r_tgcc0 <= reg_wdata;
        A_TGCC1: r_tgcc1 <= reg_wdata;
        A_RODID: r_rodid <= reg_wdata;
        A_TTACC: r_ttacc <= reg_wdata;
        A_EMUTE: r_emute <= reg_wdata;
        default: ;
      endcase
    end
  end

  // decoded configuration
  assign fcr1.allfmt      = r_fcr1[0];
  assign fcr1.errfmt      = r_fcr1[1];
  assign fcr1.fltfmt      = r_fcr1[2];
  assign fcr1.giga_sample = r_fcr1[3];
  assign fcr1.fltfmt_giga = r_fcr1[4];
  assign fcr1.include_ssw = r_fcr1[5];
  assign fcr1.info_off    = r_fcr1[7];
  assign fcr1.tt_include  = r_fcr1[9];
  assign fcr1.slink_force = r_fcr1[13];
  assign fcr1.fake_l1a    = r_fcr1[19];
  assign outl_ena         = r_fcr1[21];
  assign ttc_ena          = r_fcr1[22];
  assign run_number = r_run;
  assign rod_id     = r_rodid[7:0];
  assign ttacc      = r_ttacc[7:0];
  assign bc_offset  = r_bcof[11:0];
  assign err_mute   = r_emute[15:0];
  always_comb
    for (int c = 0; c < int'(N_FE); c++) begin
      sswid_tab[c] = (c < 8) ? r_tgcc0[4*c +: 4] : r_tgcc1[4*(c-8) +: 4];
      ch_enable[c] = (sswid_tab[c] != 4'h0);
    end

  // SR1, fields from bit 0 up: PENDING(16) L1IDXPCT(4) LFF SVCPEND LDOWN
  // TST RST FRAGWAIT TTYPEWAIT TTCrxREADY TRIGWAIT DONEWAIT HSTRY_ENA
  logic [31:0] sr1;
  always_comb begin
    sr1 = '0;
    sr1[0]     = svc_pend;
    sr1[19:16] = l1id_expect;
    sr1[20]    = slink_lff;
    sr1[21]    = svc_pend;
    sr1[22]    = slink_ldown;
    sr1[29]    = busy_processing;   // DONEWAIT: waiting for all links
  end

  always_comb begin
    unique case (reg_addr)
      A_SR1:   reg_rdata = sr1;
      A_FFR:   reg_rdata = {4'h0, fe_ovf, 4'h0, fe_busy};
      A_ERRS:  reg_rdata = {16'h0, last_err};
      A_FVER:  reg_rdata = FW_VERSION;
      A_BTIME: reg_rdata = btime_us;
      A_FEOUT: reg_rdata = {20'h0, fe_tmo};
      A_L1AP:  reg_rdata = {8'h0, l1id_proc};
      A_NGIG:  reg_rdata = n_giga;
      A_NEVS:  reg_rdata = n_built;
      A_FCR1:  reg_rdata = r_fcr1;
      A_BCOF:  reg_rdata = {16'h0, r_bcof};
      A_RUN:   reg_rdata = r_run;
      A_TGCC0: reg_rdata = r_tgcc0;
      A_TGCC1: reg_rdata = r_tgcc1;
      A_RODID: reg_rdata = r_rodid;
      A_TTACC: reg_rdata = r_ttacc;
      A_EMUTE: reg_rdata = r_emute;
      default: reg_rdata = '0;
    endcase
  end
endmodule
