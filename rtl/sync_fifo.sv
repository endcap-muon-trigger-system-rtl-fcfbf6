// sync_fifo: single-clock first-word-fall-through FIFO, the storage element
// behind every pipe of the ROD.
//
// The word at the head is always visible on `dout` while `empty` is low;
// `rd` pops it.  `wr` pushes `din` unless the FIFO is full (a push into a full
// FIFO is ignored, the caller is expected to look at `full`).  `count` is the
// occupancy, which the ROD exposes for monitoring, and `almost_full` rises
// when fewer than AF_MARGIN free entries remain.  Storage is a plain array
// so that synthesis maps it onto block RAM; DEPTH must be a power of two.
// Reset empties the FIFO; the array itself is not cleared.
module sync_fifo #(
  parameter int unsigned W         = 16,
  parameter int unsigned DEPTH     = 16,
  parameter int unsigned AF_MARGIN = 2
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr,
  input  logic [W-1:0]               din,
  input  logic                       rd,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic                       almost_full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign empty       = (count == 0);
  assign full        = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign almost_full = (32'(count) + AF_MARGIN >= DEPTH);
  assign do_wr       = wr && !full;
  assign do_rd       = rd && !empty;
  assign dout        = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end
endmodule
