// rodbusy_ctl: RODBUSY generation and busy-time accounting.
//
// RODBUSY, sent to the central trigger's busy module, is asserted while any
// Front End link buffer on the RX FPGAs is almost full, while the EVENT ID
// FIFO is almost full, or when forced from VME (CR0 force_RODBUSY).  The
// accumulated RODBUSY time is counted in microseconds (BTIME register):
// a prescaler of CLK_PER_US clocks per microsecond.
// The busy sources and the microsecond counter follow the design
// description; the registered output is this design's own choice.
module rodbusy_ctl #(
  parameter int unsigned NSRC       = 4,
  parameter int unsigned CLK_PER_US = 40
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NSRC-1:0] rx_busy,
  input  logic            evid_afull,
  input  logic            force_busy,
  output logic            rodbusy,
  output logic [31:0]     btime_us
);
  logic [$clog2(CLK_PER_US)-1:0] pre;

  always_ff @(posedge clk) begin
    if (rst) begin
      rodbusy  <= 1'b0;
      btime_us <= '0;
      pre      <= '0;
    end else begin
      rodbusy <= (|rx_busy) || evid_afull || force_busy;
      if (rodbusy) begin
        if (32'(pre) == CLK_PER_US - 1) begin
          pre      <= '0;
          btime_us <= btime_us + 1'b1;
        end else pre <= pre + 1'b1;
      end
    end
  end
endmodule
