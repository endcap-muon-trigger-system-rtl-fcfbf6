// selectlink_tx: transmit end of the RX-to-main-FPGA block-transfer link
// ("SelectLink").
//
// On `start` it sends `wc` 16-bit words taken from a first-word-fall-through
// source (the selected FE fragment buffer) over an 8-bit data path, high
// byte first, and then appends the 16-bit XOR of the words it sent as a
// check word, which the receiver verifies.  A byte is sent on each clock in
// which `sl_ready` (the far end's FIFO has room) is high; `sl_valid` marks
// the bytes.  `busy` is high from `start` until the last check byte.
// The 8-bit path, two bytes per word and the XOR check on arrival follow
// the design description; byte order and the ready/valid flow control are
// this design's own.  Source, link and destination share one clock here.
module selectlink_tx (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [11:0] wc,
  // fragment source
  input  logic        src_empty,
  input  logic [15:0] src_data,
  output logic        src_rd,
  // link
  output logic        sl_valid,
  output logic [7:0]  sl_byte,
  input  logic        sl_ready,
  output logic        busy
);
  typedef enum logic [2:0] {S_IDLE, S_HI, S_LO, S_XHI, S_XLO} state_e;
  state_e      state;
  logic [11:0] left;
  logic [15:0] xsum;

  assign busy = (state != S_IDLE);

  always_comb begin
    sl_valid = 1'b0;
    sl_byte  = '0;
    src_rd   = 1'b0;
    unique case (state)
      S_HI:  begin sl_valid = sl_ready && !src_empty; sl_byte = src_data[15:8]; end
      S_LO:  begin sl_valid = sl_ready; sl_byte = src_data[7:0]; src_rd = sl_ready; end
      S_XHI: begin sl_valid = sl_ready; sl_byte = xsum[15:8]; end
      S_XLO: begin sl_valid = sl_ready; sl_byte = xsum[7:0]; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      left  <= '0;
      xsum  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          left  <= wc;
          xsum  <= '0;
          state <= (wc == 0) ? S_XHI : S_HI;
        end
        S_HI:  if (sl_ready && !src_empty) state <= S_LO;
        S_LO:  if (sl_ready) begin
          xsum  <= xsum ^ src_data;
          left  <= left - 1'b1;
          state <= (left == 12'd1) ? S_XHI : S_HI;
        end
        S_XHI: if (sl_ready) state <= S_XLO;
        S_XLO: if (sl_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
