// rod_pipe: the ROD "pipe", a data FIFO paired with a control FIFO.
//
// The data FIFO holds variable-length records.  For every record, one word
// is written to the control FIFO only once the whole record is in the data
// FIFO: it carries the number of data words in the record and SW status
// bits supplied by the producer.  A consumer therefore waits for the control
// FIFO to be non-empty (the "blocking read"), learns the record length from
// `ctrl_cnt`, and then reads exactly that many words.
//
// Producer side: `wr`/`wdata` append a word to the open record (dropped and
// not counted if the data FIFO is full), `rec_end` closes the record with
// `rec_status`; a word written in the same cycle as `rec_end` belongs to the
// closing record.  Consumer side: first-word-fall-through reads on both
// FIFOs.  `almost_full` is the OR of both FIFOs' almost-full flags and is
// what upstream logic uses for back-pressure and the RODBUSY request.
// The pairing and write-after-record rule follow the design description;
// widths, depths and the status-field contents are per-instance parameters.
module rod_pipe #(
  parameter int unsigned DW        = 16,
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned CDEPTH    = 64,
  parameter int unsigned SW        = 4,
  parameter int unsigned CW        = 12,
  parameter int unsigned AF_MARGIN = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  // producer
  input  logic                       wr,
  input  logic [DW-1:0]              wdata,
  input  logic                       rec_end,
  input  logic [SW-1:0]              rec_status,
  output logic                       data_full,
  output logic                       ctrl_full,
  output logic                       ctrl_afull,
  output logic                       almost_full,
  output logic [$clog2(DEPTH+1)-1:0] occupancy,
  // consumer: data
  input  logic                       data_rd,
  output logic [DW-1:0]              data_out,
  output logic                       data_empty,
  // consumer: control
  input  logic                       ctrl_rd,
  output logic [SW-1:0]              ctrl_status,
  output logic [CW-1:0]              ctrl_cnt,
  output logic                       ctrl_empty
);
  logic [CW-1:0] rec_cnt;
  logic          d_af, c_af, d_wr;

  assign d_wr = wr && !data_full;

  sync_fifo #(.W(DW), .DEPTH(DEPTH), .AF_MARGIN(AF_MARGIN)) u_data (
    .clk, .rst, .wr(d_wr), .din(wdata), .rd(data_rd), .dout(data_out),
    .empty(data_empty), .full(data_full), .almost_full(d_af), .count(occupancy));

  sync_fifo #(.W(SW+CW), .DEPTH(CDEPTH), .AF_MARGIN(2)) u_ctrl (
    .clk, .rst, .wr(rec_end), .din({rec_status, rec_cnt + CW'(d_wr)}),
    .rd(ctrl_rd), .dout({ctrl_status, ctrl_cnt}),
    .empty(ctrl_empty), .full(ctrl_full), .almost_full(c_af), .count());

  assign almost_full = d_af || c_af;
  assign ctrl_afull  = c_af;

  always_ff @(posedge clk) begin
    if (rst)          rec_cnt <= '0;
    else if (rec_end) rec_cnt <= '0;
    else if (d_wr)    rec_cnt <= rec_cnt + 1'b1;
  end

  // A record may only be closed when its control word has room.
  a_ctrl_room: assert property (@(posedge clk) disable iff (rst) rec_end |-> !ctrl_full);
endmodule
