// rx_fpga: one RX FPGA of a 6RX mezzanine board (four per ROD).
//
// Holds three Front End link handlers (fe_link_rx), the slave end of the
// command-response channel (cmd_resp_slave) and the SelectLink transmitter
// (selectlink_tx).  When the main FPGA issues send_event for a link, that
// link's oldest buffered fragment is streamed out over SelectLink, followed
// by its XOR check word.  `rx_busy` is the OR of the links' almost-full
// flags, which the main FPGA turns into RODBUSY.
// The partition (three links, one command-response channel and one block
// link per RX FPGA) follows the design description.
module rx_fpga
  import rod_pkg::*;
#(
  parameter int unsigned DEPTH  = 8192,
  parameter int unsigned CDEPTH = 512,
  parameter int unsigned MAX_WC = 1024,
  parameter int unsigned AF_MARGIN = 1024
) (
  input  logic        clk,
  input  logic        rst,
  // G-link receivers
  input  logic        gl_lock [CH_PER_RX],
  input  logic        gl_dv   [CH_PER_RX],
  input  logic        gl_cntl [CH_PER_RX],
  input  logic        gl_err  [CH_PER_RX],
  input  logic [15:0] gl_data [CH_PER_RX],
  // command-response channel
  input  logic        cmd_stb,
  input  logic [3:0]  cmd_nib,
  output logic        rsp_ack,
  output logic [3:0]  rsp_nib,
  output logic        all_ready,
  // SelectLink
  output logic        sl_valid,
  output logic [7:0]  sl_byte,
  input  logic        sl_ready,
  // status
  output logic        rx_busy,
  output logic [CH_PER_RX-1:0] link_busy,
  output logic [CH_PER_RX-1:0] link_ovf
);
  logic [CH_PER_RX-1:0] ctrl_empty, data_empty, ovf, busy, ctrl_rd, clr_ovf, enable, data_rd, lock;
  logic [15:0]   data_out [CH_PER_RX];
  logic [15:0]   occ      [CH_PER_RX];
  frag_flags_t   cflags   [CH_PER_RX];
  logic [11:0]   cwc      [CH_PER_RX];
  logic          tx_busy, tx_start, src_rd;
  logic [11:0]   tx_wc;
  logic [1:0]    tx_ch;

  for (genvar c = 0; c < int'(CH_PER_RX); c++) begin : g_link
    assign lock[c]    = gl_lock[c];
    assign data_rd[c] = src_rd && (tx_ch == 2'(c));
    fe_link_rx #(.DEPTH(DEPTH), .CDEPTH(CDEPTH), .MAX_WC(MAX_WC), .AF_MARGIN(AF_MARGIN)) u_link (
      .clk, .rst, .enable(enable[c]), .clr_ovf(clr_ovf[c]),
      .gl_dv(gl_dv[c]), .gl_cntl(gl_cntl[c]), .gl_err(gl_err[c]), .gl_data(gl_data[c]),
      .data_rd(data_rd[c]), .data_out(data_out[c]), .data_empty(data_empty[c]),
      .ctrl_rd(ctrl_rd[c]), .ctrl_flags(cflags[c]), .ctrl_wc(cwc[c]), .ctrl_empty(ctrl_empty[c]),
      .busy(busy[c]), .ovf_sticky(ovf[c]), .occupancy(occ[c]));
  end

  assign rx_busy   = |busy;
  assign link_busy = busy;
  assign link_ovf  = ovf;

  cmd_resp_slave #(.NCH(CH_PER_RX)) u_cmd (
    .clk, .rst, .cmd_stb, .cmd_nib, .rsp_ack, .rsp_nib, .all_ready,
    .link_ready(lock), .ctrl_empty, .ovf, .busy, .occ, .ctrl_flags(cflags), .ctrl_wc(cwc),
    .ctrl_rd, .clr_ovf, .enable, .tx_busy, .tx_start, .tx_wc, .tx_ch);

  selectlink_tx u_tx (
    .clk, .rst, .start(tx_start), .wc(tx_wc),
    .src_empty(data_empty[tx_ch]), .src_data(data_out[tx_ch]), .src_rd,
    .sl_valid, .sl_byte, .sl_ready, .busy(tx_busy));
endmodule
