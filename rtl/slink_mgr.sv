// slink_mgr: S-Link output manager.
//
// Moves the formatted events from the output event FIFO to the HOLA S-Link
// source card, one 32-bit word per clock: `ud` data, `uctrl` marks the
// begin/end control words, `uwen` is the write enable.  It obeys the link's
// flow control: nothing is written while the card's link-full flag `lff`
// (XOFF from the ROS) or `ldown` is active, unless CR1_SLINK_FORCE is set;
// nothing at all unless CR1_OUTLENA (`enable`).  Counts transmitted events
// (end control words) and the clocks spent waiting on XOFF.
// Flow control, 32-bit width and the force/enable bits follow the design
// description; signal polarities (active high here) and the single clock
// domain are this design's own simplifications.
module slink_mgr
  import rod_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        force_wr,
  // output event FIFO
  input  logic        ev_empty,
  input  logic [32:0] ev_data,
  output logic        ev_rd,
  // S-Link source card
  input  logic        lff,
  input  logic        ldown,
  output logic [31:0] ud,
  output logic        uctrl,
  output logic        uwen,
  // statistics
  output logic [31:0] n_events,
  output logic [31:0] n_xoff
);
  assign ev_rd = enable && !ev_empty && (force_wr || (!lff && !ldown));

  always_ff @(posedge clk) begin
    if (rst) begin
      ud       <= '0;
      uctrl    <= 1'b0;
      uwen     <= 1'b0;
      n_events <= '0;
      n_xoff   <= '0;
    end else begin
      uwen  <= ev_rd;
      ud    <= ev_data[31:0];
      uctrl <= ev_data[32];
      if (ev_rd && ev_data[32] && ev_data[31:0] == SLINK_EOF) n_events <= n_events + 1'b1;
      if (enable && !ev_empty && !force_wr && lff) n_xoff <= n_xoff + 1'b1;
    end
  end
endmodule
