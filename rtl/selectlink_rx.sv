// selectlink_rx: receive end of the RX-to-main-FPGA block-transfer link.
//
// After `start` with the expected word count `wc` (learned from the
// send_event response), it pairs incoming bytes into 16-bit words (high
// byte first), pushes the first `wc` words into a small first-word-fall-
// through FIFO for the fragment processor, and compares the next word, the
// sender's XOR check word, with the XOR it computed itself.  `done` rises
// when the check word has arrived and stays high until the next `start`;
// `xor_err` then tells whether the check failed.  `sl_ready` is high once started while the FIFO is
// not almost full; it holds the sender off before `start` and throttles it.
// The FIFO interface at the receiving end and the XOR validation follow the
// design description; the FIFO depth is this design's own choice.
module selectlink_rx #(
  parameter int unsigned DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [11:0] wc,
  input  logic        sl_valid,
  input  logic [7:0]  sl_byte,
  output logic        sl_ready,
  input  logic        out_rd,
  output logic [15:0] out_data,
  output logic        out_empty,
  output logic        done,
  output logic        xor_err
);
  logic        have_hi, active;
  logic [7:0]  hi;
  logic [11:0] left;
  logic [15:0] xsum, word;
  logic        push, af;

  assign word     = {hi, sl_byte};
  assign push     = active && sl_valid && have_hi && left != 0;
  assign sl_ready = active && !af;   // hold the sender off until started

  sync_fifo #(.W(16), .DEPTH(DEPTH), .AF_MARGIN(4)) u_fifo (
    .clk, .rst, .wr(push), .din(word), .rd(out_rd), .dout(out_data),
    .empty(out_empty), .full(), .almost_full(af), .count());

  always_ff @(posedge clk) begin
    if (rst) begin
      have_hi <= 1'b0;
      active  <= 1'b0;
      hi      <= '0;
      left    <= '0;
      xsum    <= '0;
      done    <= 1'b0;
      xor_err <= 1'b0;
    end else if (start) begin
      have_hi <= 1'b0;
      active  <= 1'b1;
      left    <= wc;
      xsum    <= '0;
      done    <= 1'b0;
      xor_err <= 1'b0;
    end else if (active && sl_valid) begin
      if (!have_hi) begin
        hi      <= sl_byte;
        have_hi <= 1'b1;
      end else begin
        have_hi <= 1'b0;
        if (left != 0) begin
          xsum <= xsum ^ word;
          left <= left - 1'b1;
        end else begin
          active  <= 1'b0;
          done    <= 1'b1;
          xor_err <= (word != xsum);
        end
      end
    end
  end
endmodule
