// rod_pkg: types and constants shared by the TGC Read-Out Driver (ROD) RTL.
//
// Holds the Front End (FE) link word types and framing words, the command
// codes of the RX<->main-FPGA command-response channel, the exception
// message layout (2-bit type, 6-bit id, 24-bit context) and its ids, the
// event-ID record stored on each Level-1 Accept, and the ATLAS-style output
// format constants.  Word types, framing words, the pad word, the 0xFCA
// end-of-event marker, the Table-3 command codes and the exception message
// layout follow the design description; the numeric exception ids, the
// bit positions inside the 32-bit SSW headers and the output-format words
// are this design's own choices (see the README).
package rod_pkg;

  // ---------------- system sizes ----------------
  localparam int unsigned N_RX        = 4;   // RX FPGAs (two per 6RX mezzanine)
  localparam int unsigned CH_PER_RX   = 3;   // FE links per RX FPGA
  localparam int unsigned N_FE        = N_RX * CH_PER_RX; // 12 FE links
  localparam int unsigned N_CELLS     = 25;  // 200-bit Slave Board pattern / 8-bit cells
  localparam int unsigned N_HIT_CELLS = 20;  // 160 hit bits; cells 20..24 = coincidence output

  // ---------------- FE link format ----------------
  typedef enum logic [2:0] {
    WT_EVHDR  = 3'b000,  // 32-bit event header
    WT_SLBHDR = 3'b010,  // 32-bit SLB header
    WT_SLBX   = 3'b011,  // bit12=0: 32-bit SLB header 2 ; bit12=1: 16-bit SLB trailer
    WT_DCUR   = 3'b100,  // cell data, current BC
    WT_DPREV  = 3'b101,  // cell data, previous BC
    WT_DNEXT  = 3'b110,  // cell data, next BC (also PAD word)
    WT_EVTRL  = 3'b111   // 32-bit event trailer
  } word_type_e;

  localparam logic [15:0] BOE_WORD  = 16'h0B0F;  // control-mode begin of event
  localparam logic [15:0] EOE_WORD  = 16'h0E0F;  // control-mode end of event
  localparam logic [15:0] PAD_WORD  = 16'hDF00;
  localparam logic [11:0] EOE_MARK  = 12'hFCA;   // trailer bits 31:20
  localparam logic [1:0]  REC_TYPE  = 2'b01;     // record type of this format version

  // Flags stored with every buffered fragment (top nibble of the 16-bit
  // fragment control word; low 12 bits are the word count).
  typedef struct packed {
    logic link_err;   // G-link error or bad framing seen
    logic xor_err;    // fragment XOR check failed on the RX FPGA
    logic too_long;   // fragment longer than the maximum word count
    logic overflow;   // fragment buffer overflow, words were lost
  } frag_flags_t;

  // ---------------- command-response channel (Table 3) ----------------
  typedef enum logic [3:0] {
    CMD_NOP        = 4'd0,
    CMD_GET_STATUS = 4'd1,
    CMD_SEND_EVENT = 4'd2,
    CMD_GET_OCC    = 4'd3,
    CMD_CLR_OVF    = 4'd4,
    CMD_ENA_LINKS  = 4'd5
  } rx_cmd_e;

  // ---------------- exception messages ----------------
  typedef enum logic [1:0] {
    MT_INFO    = 2'd0,
    MT_EVT_ERR = 2'd1,
    MT_SYS_ERR = 2'd2
  } msg_type_e;

  typedef enum logic [5:0] {
    EX_GLINK_ERR      = 6'd1,   // Front End link G-link error
    EX_FRAMING        = 6'd2,   // invalid FE link framing words
    EX_TOO_LONG_OVF   = 6'd3,   // FE event too long or FE FIFO overflow
    EX_BAD_RECTYPE    = 6'd5,   // unrecognized record type
    EX_BAD_SSWID      = 6'd6,   // invalid or unexpected Star Switch ID
    EX_DISABLED_RXID  = 6'd7,   // data from disabled SSW RX ID
    EX_BAD_EOE        = 6'd8,   // bad end-of-event marker, not 0xFCA
    EX_FE_TIMEOUT     = 6'd9,   // a Front End link has timed out - abandoned
    EX_SB_L1ID        = 6'd13,  // unexpected SB L1 event ID (lo 4)
    EX_BAD_CELL       = 6'd14,  // invalid cell address
    EX_TOO_MANY_HITS  = 6'd15,  // too many hits in event
    EX_NO_EOE         = 6'd17,  // no end-of-event marker received
    EX_BAD_WC         = 6'd19,  // event has WC=0 or WC > max WC
    EX_WC_AFTER_EOE   = 6'd20,  // WC not 0 after EoE marker
    EX_SSW_FLAGS      = 6'd23,  // SSW reports T1C, NRC, T2C or G-link no-lock
    EX_MEZZ_XOR       = 6'd24,  // bad XOR checksum from mezz board
    EX_XOR            = 6'd25,  // invalid XOR event checksum
    EX_FIRST_NOT_HDR  = 6'd26,  // first word is not header
    EX_OUT_OF_ORDER   = 6'd27,  // word is out of order
    EX_RXREQ_ERR      = 6'd28,  // error in request to send an event via RX link
    EX_RXID_DUP       = 6'd29,  // RX ID is duplicated in the event
    EX_SSW_RXOVF      = 6'd36,  // SSW: RX fifo overflow
    EX_SSW_LVDS_NEW   = 6'd37,  // SSW: new input LVDS link down
    EX_SSW_LVDS_OLD   = 6'd38,  // SSW: old input LVDS link down
    EX_SSW_RXERR      = 6'd39,  // SSW: RX error state
    EX_SSW_SEU        = 6'd40,  // SSW: slave board had SEU
    EX_XMIT_ERR       = 6'd42   // transmit error from mezz board
  } exc_id_e;

  typedef struct packed {
    msg_type_e   mtype;
    exc_id_e     id;
    logic [23:0] ctx;
  } exc_msg_t;

  // ---------------- TTC event ID ----------------
  typedef struct packed {
    logic [7:0]  evidext;  // event ID extension, incremented by ECR
    logic [23:0] l1id;
    logic [11:0] bcid;
    logic [31:0] orbit;
  } evid_t;

  // Header pipe record written by the event manager per event.
  typedef struct packed {
    evid_t       evid;
    logic [7:0]  ttype;
    logic [15:0] err;      // per-event error summary
  } evhdr_t;

  // Error summary bits (evhdr_t.err and the output status word).
  localparam int unsigned ERR_LINK    = 0;  // FE link / framing / buffer problems
  localparam int unsigned ERR_FORMAT  = 1;  // FE data format errors
  localparam int unsigned ERR_XOR     = 2;  // checksum errors
  localparam int unsigned ERR_TIMEOUT = 3;  // a FE link timed out
  localparam int unsigned ERR_HITS    = 4;  // too many hits
  localparam int unsigned ERR_ID      = 5;  // L1ID mismatch
  localparam int unsigned ERR_SSW     = 6;  // error reported by the Star Switch

  // ---------------- output event format ----------------
  localparam logic [31:0] SLINK_BOF     = 32'hB0F0_0000;  // S-Link begin-of-fragment control word
  localparam logic [31:0] SLINK_EOF     = 32'hE0F0_0000;  // S-Link end-of-fragment control word
  localparam logic [31:0] ROD_HDR_MARK  = 32'hEE12_34EE;
  localparam logic [31:0] ROD_HDR_SIZE  = 32'd9;
  localparam logic [31:0] ROD_FMT_VER   = 32'h0301_0000;
  localparam logic [7:0]  SUBDET_TGC_A  = 8'h67;
  localparam logic [7:0]  SUBDET_TGC_C  = 8'h68;
  localparam logic [7:0]  BLK_HITS      = 8'h01;
  localparam logic [7:0]  BLK_TRACKLETS = 8'h02;
  localparam logic [7:0]  BLK_RAW       = 8'h03;

  // Control register 1 (FCR1) bits used by the RTL.
  typedef struct packed {
    logic fake_l1a;       // CR1_FAKE_L1A
    logic info_off;       // CR1_INFOFF
    logic tt_include;     // CR1_TRIGGER_TYPE_INCLUDE
    logic slink_force;    // CR1_SLINK_FORCE
    logic include_ssw;    // CR1_INCLUDE_SSW
    logic fltfmt_giga;    // CR1_FLTFMT_GIGA
    logic giga_sample;    // CR1_GIGA_SAMPLE
    logic fltfmt;         // CR1_FLTFMT
    logic errfmt;         // CR1_ERRFMT
    logic allfmt;         // CR1_ALLFMT
  } fcr1_t;

endpackage
