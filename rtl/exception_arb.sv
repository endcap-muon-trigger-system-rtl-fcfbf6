// exception_arb: the exception pipe.
//
// Several processes (fragment schedulers, fragment processors) may raise
// exception messages.  Only one message enters the pipe per clock: a
// round-robin arbiter plays the part of the semaphore that serialises the
// writers, and a source is stalled (`ready` low) while another is served or
// the pipe is full.  Messages are 32 bits: 2-bit type (info/debug, event
// error, system error), 6-bit id, 24-bit context.  With `info_off`
// (CR1_INFOFF) info messages are accepted but discarded.  `svc_req`, the
// service-call interrupt request to the ROD crate processor, is high while
// the pipe is not empty; the processor reads it through `rd`/`dout`.
// `count` is the occupancy exposed for monitoring.
// The message layout, single shared pipe and not-empty interrupt follow the
// design description; round-robin order and pipe depth are this design's
// own.
module exception_arb
  import rod_pkg::*;
#(
  parameter int unsigned NSRC  = 8,
  parameter int unsigned DEPTH = 256
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           info_off,
  input  logic           valid [NSRC],
  input  exc_msg_t       msg   [NSRC],
  output logic           ready [NSRC],
  input  logic           rd,
  output exc_msg_t       dout,
  output logic           empty,
  output logic           svc_req,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [31:0]    n_msgs
);
  localparam int unsigned SW = (NSRC > 1) ? $clog2(NSRC) : 1;
  logic [SW-1:0] last, sel;
  logic          any, full, wr;

  always_comb begin
    any = 1'b0;
    sel = last;
    for (int k = 1; k <= int'(NSRC); k++) begin
      automatic int s = (int'(last) + k) % int'(NSRC);
      if (!any && valid[s]) begin
        any = 1'b1;
        sel = SW'(s);
      end
    end
  end

  assign wr = any && !full && !(info_off && msg[sel].mtype == MT_INFO);

  always_comb
    for (int s = 0; s < int'(NSRC); s++)
      ready[s] = any && (sel == SW'(s)) && !full;

  sync_fifo #(.W(32), .DEPTH(DEPTH), .AF_MARGIN(2)) u_pipe (
    .clk, .rst, .wr, .din(msg[sel]), .rd, .dout, .empty, .full,
    .almost_full(), .count);

  assign svc_req = !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      last   <= SW'(NSRC - 1);
      n_msgs <= '0;
    end else if (any && !full) begin
      last <= sel;
      if (wr) n_msgs <= n_msgs + 1'b1;
    end
  end
endmodule
