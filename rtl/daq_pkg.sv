// daq_pkg - constants and types shared by the multi-protocol data collection module.
//
// The module gathers sensor data from three MIL-STD-1553B channels, one ARINC-429 channel and
// two RS-422 channels, and sends it to a host as one Ethernet frame per processing cycle. The
// frame layout (order and size of the six channel slots, 157 16-bit words = 314 bytes) follows
// the published frame layout of the design. Word width, channel numbering, the per-channel
// buffer map and the Ethernet type are this design's own choices.
package daq_pkg;

  // ---------------- channel slots of the upstream frame ----------------
  localparam int unsigned NUM_CH = 6;
  typedef enum logic [2:0] {
    CH_RS422_1 = 3'd0,
    CH_MIL_RT1 = 3'd1,
    CH_MIL_BC2 = 3'd2,
    CH_MIL_BC1 = 3'd3,
    CH_RS422_2 = 3'd4,
    CH_ARINC   = 3'd5
  } ch_id_e;

  // words per slot, in frame order: RS_422_1, MIL_RT1, MIL_BC2, MIL_BC1, RS_422_2, ARINC
  localparam int unsigned SLOT_RS422_1 = 18;
  localparam int unsigned SLOT_MIL_RT1 = 32;
  localparam int unsigned SLOT_MIL_BC2 = 12;
  localparam int unsigned SLOT_MIL_BC1 = 47;
  localparam int unsigned SLOT_RS422_2 = 16;
  localparam int unsigned SLOT_ARINC   = 32;   // 16 ARINC-429 words, two 16-bit halves each
  localparam int unsigned FRAME_WORDS  = SLOT_RS422_1 + SLOT_MIL_RT1 + SLOT_MIL_BC2 +
                                         SLOT_MIL_BC1 + SLOT_RS422_2 + SLOT_ARINC;  // 157

  function automatic int unsigned slot_words(input int unsigned ch);
    case (ch)
      0: return SLOT_RS422_1;
      1: return SLOT_MIL_RT1;
      2: return SLOT_MIL_BC2;
      3: return SLOT_MIL_BC1;
      4: return SLOT_RS422_2;
      default: return SLOT_ARINC;
    endcase
  endfunction

  // ---------------- per-channel buffer RAM map (16-bit words) ----------------
  // 0..127   transmit area, written by the host path before WRITE_DONE
  // 128..191 receive bank 0, 192..255 receive bank 1 (ping-pong packet buffers)
  localparam int unsigned CH_AW      = 8;
  localparam int unsigned WORD_W     = 16;
  localparam logic [CH_AW-1:0] RX_BANK0 = 8'd128;
  localparam logic [CH_AW-1:0] RX_BANK1 = 8'd192;

  // ---------------- MIL-STD-1553B ----------------
  localparam int unsigned HAM_D = 17;   // 16 data bits + the word's odd parity bit
  localparam int unsigned HAM_N = 23;   // extended Hamming code word
  localparam logic [4:0]  MIL_BCAST = 5'd31;

  typedef struct packed {
    logic [4:0] rt_addr;
    logic       tr;        // 1: RT transmits, 0: RT receives
    logic [4:0] subaddr;
    logic [4:0] wc;        // 0 means 32 words
  } mil_cmd_t;

  function automatic logic [5:0] wc_words(input logic [4:0] wc);
    return (wc == 5'd0) ? 6'd32 : {1'b0, wc};
  endfunction

  // ---------------- Ethernet ----------------
  localparam logic [15:0] ETH_TYPE_DAQ = 16'h88B5;

  // Reflected CRC-32 (IEEE 802.3), one byte, LSB first.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] b);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ b[i]) c = (c >> 1) ^ 32'hEDB88320;
      else             c = c >> 1;
    end
    return c;
  endfunction

  localparam logic [31:0] CRC_RESIDUE = 32'hDEBB20E3;

  // ---------------- event pulses brought out of the top ----------------
  typedef struct packed {
    logic [2:0] mil_corrected;   // per 1553 channel (RT1, BC2, BC1): a word was repaired
    logic [2:0] mil_uncorr;      // a word was rejected
    logic [2:0] mil_pkt;         // a packet completed
    logic [2:0] mil_msg;         // the channel's controller finished a message
    logic [2:0] mil_no_status;   // a BC got no status word
    logic       a429_word_ok;
    logic       a429_word_bad;
    logic       a429_pkt;
    logic [1:0] rs422_pkt;
    logic [1:0] rs422_overflow;
    logic [5:0] trans_done;      // per channel, frame slot order
    logic       eth_cmd_bad;
    logic       dispatch;
    logic       frame;
    logic       overrun;
  } daq_events_t;

endpackage
