// ttc_if: TTC signal handling of the main FPGA.
//
// Keeps the bunch-crossing counter BCID (incremented on every bunch clock,
// which is the design clock here, wrapping after BC_PER_ORBIT crossings)
// and the 24-bit Level-1 ID L1ID (incremented on each Level-1 Accept).
// A Bunch Counter Reset (BCR) does not zero BCID but loads the programmable
// offset `bc_offset`; it also increments the ORBIT count, which is held at
// zero until the first L1A of a run (`first_l1a` pulses then).  An Event
// Counter Reset (ECR) zeroes L1ID and increments the 8-bit extension
// EVIDext.  On each L1A (from the TTCrx, or internally every FAKE_PERIOD
// clocks when `fake_ena`, or once on `fake_pulse`) the event ID {EVIDext,
// L1ID, BCID, ORBIT} is pushed into the EVENT ID FIFO.  The trigger type,
// which arrives some time after its L1A, goes into a separate FIFO.
// Both FIFOs are read by the event manager.
// All counter and FIFO behaviour above follows the design description; the
// L1ID of the first event after reset/ECR is 0, the counter widths other
// than L1ID and the FIFO depths are this design's own choices.
module ttc_if
  import rod_pkg::*;
#(
  parameter int unsigned BC_PER_ORBIT = 3564,
  parameter int unsigned FAKE_PERIOD  = 512,   // 40 MHz / 512 = 78 kHz
  parameter int unsigned DEPTH        = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,      // CR1_TTCENA
  input  logic        l1a,
  input  logic        bcr,
  input  logic        ecr,
  input  logic        tt_stb,
  input  logic [7:0]  tt,
  input  logic [11:0] bc_offset,
  input  logic        fake_ena,    // CR1_FAKE_L1A
  input  logic        fake_pulse,  // CMR1_FAKE_L1A
  input  logic        clr_orbit,   // CMR1_ORBITCNT
  // EVENT ID FIFO
  input  logic        evid_rd,
  output evid_t       evid,
  output logic        evid_empty,
  output logic        evid_full,
  // trigger type FIFO
  input  logic        tt_rd,
  output logic [7:0]  tt_out,
  output logic        tt_empty,
  output logic        first_l1a,
  output logic [23:0] last_l1id
);
  logic [11:0] bcid;
  logic [23:0] l1id;
  logic [7:0]  evidext;
  logic [31:0] orbit;
  logic        run_started;
  logic [$clog2(FAKE_PERIOD)-1:0] fake_cnt;
  logic        fake_tick, any_l1a;

  assign fake_tick = fake_ena && (fake_cnt == '0);
  assign any_l1a   = enable && (l1a || fake_tick || fake_pulse);
  assign last_l1id = l1id - 1'b1;

  sync_fifo #(.W($bits(evid_t)), .DEPTH(DEPTH), .AF_MARGIN(2)) u_evid (
    .clk, .rst, .wr(any_l1a), .din({evidext, l1id, bcid, orbit}),
    .rd(evid_rd), .dout(evid), .empty(evid_empty), .full(evid_full),
    .almost_full(), .count());

  sync_fifo #(.W(8), .DEPTH(DEPTH), .AF_MARGIN(2)) u_tt (
    .clk, .rst, .wr(enable && tt_stb), .din(tt), .rd(tt_rd), .dout(tt_out),
    .empty(tt_empty), .full(), .almost_full(), .count());

  always_ff @(posedge clk) begin
    if (rst) begin
      bcid        <= '0;
      l1id        <= '0;
      evidext     <= '0;
      orbit       <= '0;
      run_started <= 1'b0;
      fake_cnt    <= '0;
      first_l1a   <= 1'b0;
    end else begin
      first_l1a <= 1'b0;
      fake_cnt  <= fake_cnt + 1'b1;
      if (bcr)                                  bcid <= bc_offset;
      else if (32'(bcid) == BC_PER_ORBIT - 1)   bcid <= '0;
      else                                      bcid <= bcid + 1'b1;
      if (clr_orbit) begin
        orbit       <= '0;
        run_started <= 1'b0;
      end else if (bcr && run_started) orbit <= orbit + 1'b1;
      if (ecr) begin
        l1id    <= '0;
        evidext <= evidext + 1'b1;
      end else if (any_l1a) begin
        l1id <= l1id + 1'b1;
      end
      if (any_l1a && !run_started) begin
        run_started <= 1'b1;
        first_l1a   <= 1'b1;
      end
    end
  end
endmodule
