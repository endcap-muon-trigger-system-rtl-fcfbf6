// cmd_resp_slave: RX-FPGA end of the command-response channel to the main
// FPGA.
//
// The main FPGA sends a command byte as two 4-bit nibbles on `cmd_nib`,
// each marked by `cmd_stb`: first the command code, then the operand
// nibble (channel number or 4-bit channel mask).  The slave then answers
// with a 16-bit response as four nibbles, most significant first, each
// marked by `rsp_ack`.  Commands (rod_pkg::rx_cmd_e):
//   get_status      -> 4 status bits per FE link {link ready, control FIFO
//                      empty, overflow, busy}, link 0 in bits 3:0
//   send_event ch   -> {4 flags, 12-bit word count} of the oldest fragment of
//                      link `ch`, which is popped and handed to the
//                      SelectLink transmitter; a word count of 0 means no
//                      fragment could be sent
//   get_occupancy ch-> data-buffer occupancy of link `ch`
//   clear_overflows m / enable_links m -> act on the links in mask m,
//                      answer with the get_status word
// `all_ready` (all enabled links have a fragment buffered) lets the main
// FPGA skip get_status polling when the rate is high.
// The command set, 4-bit bus, 2-byte response and all-links-ready line
// follow the design description; the split of the bidirectional bus into
// two unidirectional nibble buses, the nibble order and the status bit
// order within a nibble are this design's own.
module cmd_resp_slave
  import rod_pkg::*;
#(
  parameter int unsigned NCH = CH_PER_RX
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cmd_stb,
  input  logic [3:0]       cmd_nib,
  output logic             rsp_ack,
  output logic [3:0]       rsp_nib,
  output logic             all_ready,
  // link status
  input  logic [NCH-1:0]   link_ready,
  input  logic [NCH-1:0]   ctrl_empty,
  input  logic [NCH-1:0]   ovf,
  input  logic [NCH-1:0]   busy,
  input  logic [15:0]      occ      [NCH],
  input  frag_flags_t      ctrl_flags [NCH],
  input  logic [11:0]      ctrl_wc  [NCH],
  // link control
  output logic [NCH-1:0]   ctrl_rd,
  output logic [NCH-1:0]   clr_ovf,
  output logic [NCH-1:0]   enable,
  // SelectLink transmitter
  input  logic             tx_busy,
  output logic             tx_start,
  output logic [11:0]      tx_wc,
  output logic [1:0]       tx_ch
);
  typedef enum logic [1:0] {S_OP, S_ARG, S_EXEC, S_RSP} state_e;
  state_e      state;
  rx_cmd_e     op;
  logic [3:0]  arg;
  logic [15:0] rsp;
  logic [1:0]  nib;
  logic [15:0] status;

  always_comb begin
    status = '0;
    for (int c = 0; c < int'(NCH); c++)
      status[4*c +: 4] = {link_ready[c], ctrl_empty[c], ovf[c], busy[c]};
  end

  assign all_ready = (enable != '0) && ((~ctrl_empty | ~enable) == '1);
  assign rsp_ack   = (state == S_RSP);
  assign rsp_nib   = rsp[15:12];

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_OP;
      op       <= CMD_NOP;
      arg      <= '0;
      rsp      <= '0;
      nib      <= '0;
      enable   <= '0;
      ctrl_rd  <= '0;
      clr_ovf  <= '0;
      tx_start <= 1'b0;
      tx_wc    <= '0;
      tx_ch    <= '0;
    end else begin
      ctrl_rd  <= '0;
      clr_ovf  <= '0;
      tx_start <= 1'b0;
      unique case (state)
        S_OP:  if (cmd_stb) begin op <= rx_cmd_e'(cmd_nib); state <= S_ARG; end
        S_ARG: if (cmd_stb) begin arg <= cmd_nib; state <= S_EXEC; end
        S_EXEC: begin
          rsp   <= status;
          nib   <= '0;
          state <= S_RSP;
          unique case (op)
            CMD_SEND_EVENT: begin
              rsp <= '0;
              if (32'(arg) < NCH && !ctrl_empty[arg[1:0]] && !tx_busy) begin
                rsp                <= {ctrl_flags[arg[1:0]], ctrl_wc[arg[1:0]]};
                ctrl_rd[arg[1:0]]  <= 1'b1;
                tx_start           <= 1'b1;
                tx_wc              <= ctrl_wc[arg[1:0]];
                tx_ch              <= arg[1:0];
              end
            end
            CMD_GET_OCC:   rsp <= (32'(arg) < NCH) ? occ[arg[1:0]] : 16'h0;
            CMD_CLR_OVF:   clr_ovf <= arg[NCH-1:0];
            CMD_ENA_LINKS: enable  <= arg[NCH-1:0];
            default: ;
          endcase
        end
        S_RSP: begin
          rsp <= {rsp[11:0], 4'h0};
          nib <= nib + 1'b1;
          if (nib == 2'd3) state <= S_OP;
        end
        default: state <= S_OP;
      endcase
    end
  end
endmodule
