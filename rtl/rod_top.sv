// rod_top: the TGC Read-Out Driver (ROD) data path, from twelve Front End
// links to the S-Link, VME and gigabit-ethernet event outputs.
//
// Structure (one clock domain in this RTL):
//   4 x rx_fpga          three FE link handlers each, fragment buffers,
//                        command-response slave, SelectLink transmitter
//   ttc_if               BCID/L1ID/ORBIT counters, EVENT ID and trigger
//                        type FIFOs
//   event_manager        one event at a time through fragment processing
//   4 x fragment_scheduler + selectlink_rx + fragment_processor
//                        one per board-to-board link, running in parallel
//   3 x 4 rod_pipe       hit, tracklet and raw pipes of the processors
//   header pipe          event header records
//   output_formatter     ROD event record + sampling to VME/gigabit pipes
//   output event FIFO -> slink_mgr -> S-Link
//   exception_arb        exception pipe with service-call request
//   rodbusy_ctl          RODBUSY and busy time
//   fpga_registers       FCR1, CMR1, RUN, RODID, BCOF, TTACC, TGCC0/1 and
//                        status/counter registers on the `reg_*` bus
// The G-link receivers, TTCrx, S-Link card, gigabit MAC/PHY, VME interface
// CPLD and the CAM/SRAM look-up are outside; their signals are ports.
// All configuration comes from fpga_registers; RODBUSY forcing and the
// clear-overflows request, which belong to the board's service logic, are
// inputs.  The VME and gigabit event
// pipes and the exception pipe are read through FIFO read ports.
// FE link n is channel n%3 of RX FPGA n/3.
// Follows the document: the split into RX FPGAs, schedulers, processors,
// pipes, formatter and S-Link manager, and the data flow between them.
// Own choices: the single clock, every FIFO depth, the port list and the
// three activity counters (all-links-ready shortcuts, get_status polls,
// clocks held by XOFF) brought out for monitoring.
module rod_top
  import rod_pkg::*;
#(
  parameter int unsigned FE_DEPTH   = 8192,  // FE fragment buffer, words per link
  parameter int unsigned FE_CDEPTH  = 512,
  parameter int unsigned MAX_WC     = 1024,
  parameter int unsigned FE_AF      = 1024,
  parameter int unsigned PIPE_DEPTH = 2048,  // hit/tracklet/raw pipes, words
  parameter int unsigned EV_DEPTH   = 2048,  // output event FIFO
  parameter int unsigned MON_DEPTH  = 2048,  // VME and gigabit event pipes
  parameter int unsigned MAX_HITS   = 1024,
  parameter int unsigned TIMEOUT_POLLS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  // Front End links (G-link receivers)
  input  logic        gl_lock [N_FE],
  input  logic        gl_dv   [N_FE],
  input  logic        gl_cntl [N_FE],
  input  logic        gl_err  [N_FE],
  input  logic [15:0] gl_data [N_FE],
  // TTC (from the TTCrx)
  input  logic        l1a,
  input  logic        bcr,
  input  logic        ecr,
  input  logic        tt_stb,
  input  logic [7:0]  tt,
  // register bus from the VME interface (see fpga_registers)
  input  logic [19:0] reg_addr,
  input  logic        reg_wr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  input  logic        force_busy,
  input  logic        clr_ovf_req,
  // S-Link source card
  input  logic        lff,
  input  logic        ldown,
  output logic [31:0] ud,
  output logic        uctrl,
  output logic        uwen,
  // RODBUSY
  output logic        rodbusy,
  output logic [31:0] btime_us,
  // exception pipe
  input  logic        exc_rd,
  output exc_msg_t    exc_dout,
  output logic        exc_svc,
  output logic        first_l1a,
  // monitoring event pipes
  input  logic        vme_rd,
  output logic [31:0] vme_dout,
  output logic        vme_empty,
  input  logic        giga_rd,
  output logic [31:0] giga_dout,
  output logic        giga_empty,
  // counters
  output logic [31:0] n_events_built,
  output logic [31:0] n_events_sent,
  output logic [31:0] n_vme_events,
  output logic [31:0] n_giga_events,
  output logic [31:0] n_hits_total,
  output logic [31:0] n_exc_total,
  output logic [31:0] n_fast_total,   // links found ready through all-links-ready
  output logic [31:0] n_polls_total,  // get_status polls sent
  output logic [31:0] n_xoff,         // clocks the S-Link output waited on XOFF
  output logic [N_FE-1:0] fe_ovf
);
  localparam int unsigned NQ = 3 * N_RX;

  // ---------------- registers ----------------
  fcr1_t       fcr1;
  logic        ttc_ena, outl_ena, fake_pulse, clr_orbit, busy_proc;
  logic [31:0] run_number;
  logic [7:0]  rod_id, ttacc;
  logic [11:0] bc_offset;
  logic [3:0]  sswid_tab [N_FE];
  logic [N_FE-1:0] ch_enable, fe_busy, fe_tmo;
  logic [15:0] last_err, err_mute;
  logic [23:0] ev_l1id;

  fpga_registers u_regs (
    .clk, .rst, .reg_addr, .reg_wr, .reg_wdata, .reg_rdata,
    .fcr1, .ttc_ena, .outl_ena, .run_number, .rod_id, .ttacc, .bc_offset,
    .sswid_tab, .ch_enable, .err_mute, .clr_orbit, .fake_pulse,
    .svc_pend(exc_svc), .l1id_expect(ev_l1id[3:0]), .slink_lff(lff), .slink_ldown(ldown),
    .busy_processing(busy_proc), .fe_ovf, .fe_busy, .fe_tmo, .last_err, .btime_us,
    .l1id_proc(ev_l1id), .n_giga(n_giga_events), .n_built(n_events_built));

  // ---------------- RX FPGAs ----------------
  logic        cmd_stb [N_RX];
  logic [3:0]  cmd_nib [N_RX];
  logic        rsp_ack [N_RX];
  logic [3:0]  rsp_nib [N_RX];
  logic        all_rdy [N_RX];
  logic        sl_valid [N_RX];
  logic [7:0]  sl_byte  [N_RX];
  logic        sl_ready [N_RX];
  logic [N_RX-1:0] rx_busy;

  for (genvar r = 0; r < int'(N_RX); r++) begin : g_rx
    logic        l_lock [CH_PER_RX];
    logic        l_dv   [CH_PER_RX];
    logic        l_cntl [CH_PER_RX];
    logic        l_err  [CH_PER_RX];
    logic [15:0] l_data [CH_PER_RX];
    for (genvar c = 0; c < int'(CH_PER_RX); c++) begin : g_ch
      assign l_lock[c] = gl_lock[r*CH_PER_RX + c];
      assign l_dv[c]   = gl_dv  [r*CH_PER_RX + c];
      assign l_cntl[c] = gl_cntl[r*CH_PER_RX + c];
      assign l_err[c]  = gl_err [r*CH_PER_RX + c];
      assign l_data[c] = gl_data[r*CH_PER_RX + c];
    end
    rx_fpga #(.DEPTH(FE_DEPTH), .CDEPTH(FE_CDEPTH), .MAX_WC(MAX_WC), .AF_MARGIN(FE_AF)) u_rx (
      .clk, .rst,
      .gl_lock(l_lock), .gl_dv(l_dv), .gl_cntl(l_cntl), .gl_err(l_err), .gl_data(l_data),
      .cmd_stb(cmd_stb[r]), .cmd_nib(cmd_nib[r]), .rsp_ack(rsp_ack[r]), .rsp_nib(rsp_nib[r]),
      .all_ready(all_rdy[r]),
      .sl_valid(sl_valid[r]), .sl_byte(sl_byte[r]), .sl_ready(sl_ready[r]),
      .rx_busy(rx_busy[r]), .link_busy(fe_busy[r*CH_PER_RX +: CH_PER_RX]),
      .link_ovf(fe_ovf[r*CH_PER_RX +: CH_PER_RX]));
  end

  // ---------------- TTC ----------------
  evid_t      evid;
  logic       evid_empty, evid_full, evid_rd, tt_empty, tt_rd;
  logic [7:0] tt_out;

  ttc_if u_ttc (
    .clk, .rst, .enable(ttc_ena), .l1a, .bcr, .ecr, .tt_stb, .tt, .bc_offset,
    .fake_ena(fcr1.fake_l1a), .fake_pulse, .clr_orbit,
    .evid_rd, .evid, .evid_empty, .evid_full,
    .tt_rd, .tt_out, .tt_empty, .first_l1a, .last_l1id());

  // ---------------- event manager ----------------
  logic        ev_start, ev_close, pipes_ready, hdr_wr, hdr_full, hdr_empty, hdr_rd;
  logic        sched_done [N_RX];
  logic        sched_tmo  [N_RX];
  logic [15:0] fp_err     [N_RX];
  evhdr_t      hdr_in, hdr_out;

  event_manager #(.NSCHED(N_RX)) u_evm (
    .clk, .rst, .tt_include(fcr1.tt_include),
    .evid, .evid_empty, .evid_rd, .tt(tt_out), .tt_empty, .tt_rd,
    .ev_start, .ev_l1id, .sched_done, .sched_tmo, .fp_err, .pipes_ready, .ev_close,
    .hdr_wr, .hdr(hdr_in), .busy_processing(busy_proc), .n_events());

  // error summary of the last closed event, for the ERRS register
  always_ff @(posedge clk)
    if (rst) last_err <= '0;
    else if (hdr_wr) last_err <= hdr_in.err;

  sync_fifo #(.W($bits(evhdr_t)), .DEPTH(64), .AF_MARGIN(2)) u_hdr_pipe (
    .clk, .rst, .wr(hdr_wr), .din(hdr_in), .rd(hdr_rd), .dout(hdr_out),
    .empty(hdr_empty), .full(hdr_full), .almost_full(), .count());

  // ---------------- schedulers, SelectLink receivers, processors ----------------
  localparam int unsigned NEXC = 2 * N_RX;
  logic        exc_v [NEXC];
  exc_msg_t    exc_m [NEXC];
  logic        exc_r [NEXC];

  // pipes: q = kind*N_RX + processor, kind 0 hits, 1 tracklets, 2 raw
  logic        q_wr [NQ];
  logic [31:0] q_wd [NQ];
  logic        q_full [NQ], q_cfull [NQ], q_close [NQ];
  logic        q_ctrl_empty [NQ], q_ctrl_rd [NQ], q_data_rd [NQ];
  logic [11:0] q_ctrl_cnt [NQ];
  logic [31:0] q_data [NQ];
  logic [31:0] fp_hits [N_RX];
  logic [15:0] s_polls [N_RX];
  logic [15:0] s_fast  [N_RX];

  for (genvar k = 0; k < int'(N_RX); k++) begin : g_fp
    logic        fp_idle, fp_start, fp_done, in_empty, in_rd, x_done, x_err;
    logic [3:0]  fp_ch;
    logic [11:0] fp_wc;
    frag_flags_t fp_flags;
    logic [15:0] in_data;
    logic [CH_PER_RX-1:0] tmo;
    logic        hit_wr, trk_wr, raw_wr, close;
    logic [31:0] hit_data, raw_data;

    fragment_scheduler #(.LINK(k), .TIMEOUT_POLLS(TIMEOUT_POLLS)) u_sched (
      .clk, .rst, .ev_start, .clr_ovf_req,
      .ch_enable(ch_enable[k*CH_PER_RX +: CH_PER_RX]),
      .done(sched_done[k]), .timedout(tmo),
      .cmd_stb(cmd_stb[k]), .cmd_nib(cmd_nib[k]), .rsp_ack(rsp_ack[k]), .rsp_nib(rsp_nib[k]),
      .all_ready(all_rdy[k]),
      .fp_idle, .fp_start, .fp_ch, .fp_wc, .fp_flags, .fp_done,
      .exc_valid(exc_v[k]), .exc_msg(exc_m[k]), .exc_ready(exc_r[k]),
      .n_polls(s_polls[k]), .n_fast(s_fast[k]));
    assign sched_tmo[k] = |tmo;
    assign fe_tmo[k*CH_PER_RX +: CH_PER_RX] = tmo;

    selectlink_rx #(.DEPTH(32)) u_slrx (
      .clk, .rst, .start(fp_start), .wc(fp_wc),
      .sl_valid(sl_valid[k]), .sl_byte(sl_byte[k]), .sl_ready(sl_ready[k]),
      .out_rd(in_rd), .out_data(in_data), .out_empty(in_empty),
      .done(x_done), .xor_err(x_err));

    fragment_processor #(.MAX_HITS(MAX_HITS)) u_fp (
      .clk, .rst, .include_raw(fcr1.include_ssw), .sswid_tab,
      .ev_start, .ev_l1id, .ev_close, .ev_err(fp_err[k]),
      .start(fp_start), .ch(fp_ch), .wc(fp_wc), .flags(fp_flags),
      .idle(fp_idle), .done(fp_done),
      .in_empty, .in_data, .in_rd, .xfer_done(x_done), .xfer_err(x_err),
      .hit_wr, .trk_wr, .raw_wr, .hit_data, .raw_data,
      .hit_full(q_full[k]), .trk_full(q_full[N_RX + k]), .raw_full(q_full[2*N_RX + k]),
      .pipes_close(close),
      .exc_valid(exc_v[N_RX + k]), .exc_msg(exc_m[N_RX + k]), .exc_ready(exc_r[N_RX + k]),
      .n_hits(fp_hits[k]), .n_frags());

    assign q_wr[k]          = hit_wr;
    assign q_wd[k]          = hit_data;
    assign q_wr[N_RX + k]   = trk_wr;
    assign q_wd[N_RX + k]   = hit_data;
    assign q_wr[2*N_RX + k] = raw_wr;
    assign q_wd[2*N_RX + k] = raw_data;
    assign q_close[k] = close;
    assign q_close[N_RX + k] = close;
    assign q_close[2*N_RX + k] = close;
  end

  for (genvar q = 0; q < int'(NQ); q++) begin : g_pipe
    rod_pipe #(.DW(32), .DEPTH(PIPE_DEPTH), .CDEPTH(64), .SW(1), .CW(12), .AF_MARGIN(8)) u_pipe (
      .clk, .rst, .wr(q_wr[q]), .wdata(q_wd[q]), .rec_end(q_close[q]), .rec_status(1'b0),
      .data_full(q_full[q]), .ctrl_full(q_cfull[q]), .ctrl_afull(), .almost_full(), .occupancy(),
      .data_rd(q_data_rd[q]), .data_out(q_data[q]), .data_empty(),
      .ctrl_rd(q_ctrl_rd[q]), .ctrl_status(), .ctrl_cnt(q_ctrl_cnt[q]), .ctrl_empty(q_ctrl_empty[q]));
  end

  always_comb begin
    pipes_ready = !hdr_full;
    for (int q = 0; q < int'(NQ); q++) pipes_ready = pipes_ready && !q_cfull[q];
  end

  always_comb begin
    n_hits_total = '0;
    for (int k = 0; k < int'(N_RX); k++) n_hits_total = n_hits_total + fp_hits[k];
  end

  always_comb begin
    n_fast_total  = '0;
    n_polls_total = '0;
    for (int k = 0; k < int'(N_RX); k++) begin
      n_fast_total  = n_fast_total + 32'(s_fast[k]);
      n_polls_total = n_polls_total + 32'(s_polls[k]);
    end
  end

  // ---------------- exceptions ----------------
  exception_arb #(.NSRC(NEXC), .DEPTH(256)) u_exc (
    .clk, .rst, .info_off(fcr1.info_off), .valid(exc_v), .msg(exc_m), .ready(exc_r),
    .rd(exc_rd), .dout(exc_dout), .empty(), .svc_req(exc_svc), .count(), .n_msgs(n_exc_total));

  // ---------------- output formatter, event FIFOs, S-Link ----------------
  logic        ev_wr, ev_full, ev_empty, ev_rd;
  logic [32:0] ev_data, ev_q;
  logic        vme_wr, giga_wr, vme_full, vme_afull, giga_full, giga_afull;
  logic [31:0] mon_data;

  output_formatter #(.NFP(N_RX), .NQ(NQ)) u_fmt (
    .clk, .rst, .fcr1, .run_number, .rod_id, .ttacc, .err_mute,
    .hdr(hdr_out), .hdr_empty, .hdr_rd,
    .q_ctrl_empty, .q_ctrl_cnt, .q_ctrl_rd, .q_data, .q_data_rd,
    .ev_wr, .ev_data, .ev_full,
    .vme_wr, .giga_wr, .mon_data, .vme_full, .vme_afull, .giga_full, .giga_afull,
    .n_events(n_events_built), .n_vme(n_vme_events), .n_giga(n_giga_events));

  sync_fifo #(.W(33), .DEPTH(EV_DEPTH), .AF_MARGIN(2)) u_ev_fifo (
    .clk, .rst, .wr(ev_wr), .din(ev_data), .rd(ev_rd), .dout(ev_q),
    .empty(ev_empty), .full(ev_full), .almost_full(), .count());

  sync_fifo #(.W(32), .DEPTH(MON_DEPTH), .AF_MARGIN(MON_DEPTH/2)) u_vme_pipe (
    .clk, .rst, .wr(vme_wr), .din(mon_data), .rd(vme_rd), .dout(vme_dout),
    .empty(vme_empty), .full(vme_full), .almost_full(vme_afull), .count());

  sync_fifo #(.W(32), .DEPTH(MON_DEPTH), .AF_MARGIN(MON_DEPTH/2)) u_giga_pipe (
    .clk, .rst, .wr(giga_wr), .din(mon_data), .rd(giga_rd), .dout(giga_dout),
    .empty(giga_empty), .full(giga_full), .almost_full(giga_afull), .count());

  slink_mgr u_slink (
    .clk, .rst, .enable(outl_ena), .force_wr(fcr1.slink_force),
    .ev_empty, .ev_data(ev_q), .ev_rd, .lff, .ldown, .ud, .uctrl, .uwen,
    .n_events(n_events_sent), .n_xoff);

  // ---------------- RODBUSY ----------------
  rodbusy_ctl #(.NSRC(N_RX), .CLK_PER_US(40)) u_busy (
    .clk, .rst, .rx_busy, .evid_afull(evid_full), .force_busy, .rodbusy, .btime_us);
endmodule
