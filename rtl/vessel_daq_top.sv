// vessel_daq_top - centralized multi-protocol data collection module for vessel systems.
//
// Six sensor channels run in parallel: RS_422_1, MIL_RT1, MIL_BC2, MIL_BC1, RS_422_2 and
// ARINC-429. Each has its own protocol engine and on-chip buffer RAM. Every processing cycle
// the gateway controller merges the latest complete packet of each channel into one 157-word
// (314-byte) payload and sends it to the host in one Ethernet frame (upstream). Control frames
// from the host are checked, decoded and routed to one channel, which sends their words on its
// own bus (downstream). The 1553 channels protect every word with an extended Hamming code
// (single-error correction, double-error detection) on top of Manchester II coding.
//
// Channel roles: MIL_RT1 is a remote terminal (address RT1_ADDR) that captures what a bus
// controller sends it; MIL_BC1 is a bus controller towards RT 1 and captures the messages
// addressed to it, merging a 32-word and a 15-word message into one 47-word packet; MIL_BC2 is
// a bus controller that broadcasts (address 31, no status replies) and captures the 12-word
// broadcasts on its bus. The channel list, roles, packet sizes, frame
// order and the Hamming/Manchester word format follow the published design; clock rate, bit
// rates, addresses, buffer map, Ethernet format and cycle period are this design's choices,
// listed as parameters below.
//
// Interface: a byte-wide GMII-style Ethernet port (the PHY is external), two-line digital
// interfaces towards the external 1553 transceivers (primary and reserve bus of each channel),
// ARINC-429 line driver/receiver and RS-422 transceivers. Clock: one system clock, 50 MHz by
// default; all bit timing is derived from it.
module vessel_daq_top
  import daq_pkg::*;
#(
  parameter int unsigned MIL_CLKS_PER_BIT   = 50,         // 1 Mbit/s
  parameter int unsigned A429_CLKS_PER_BIT  = 500,        // 100 kbit/s
  parameter int unsigned UART_CLKS_PER_BIT  = 434,        // 115200 baud
  parameter int unsigned CYCLE_CLKS         = 1_000_000,  // 20 ms processing cycle
  parameter logic [47:0] OWN_MAC            = 48'h02_00_00_00_15_53,
  parameter logic [47:0] HOST_MAC           = 48'hFF_FF_FF_FF_FF_FF,
  parameter logic [4:0]  RT1_ADDR           = 5'd1,
  parameter logic [4:0]  BC1_TGT_ADDR       = 5'd1,
  parameter logic [4:0]  BC2_TGT_ADDR       = 5'd31   // broadcast
)(
  input  logic              clk,
  input  logic              rst_n,
  // Ethernet (to the PHY)
  output logic [7:0]        eth_txd_o,
  output logic              eth_tx_en_o,
  input  logic [7:0]        eth_rxd_i,
  input  logic              eth_rx_dv_i,
  // MIL-STD-1553B: index 0 MIL_RT1, 1 MIL_BC2, 2 MIL_BC1; inner index 0 primary, 1 reserve
  input  logic [2:0]        mil_bus_sel_i,
  output logic [2:0][1:0]   mil_tx_p_o,
  output logic [2:0][1:0]   mil_tx_n_o,
  input  logic [2:0][1:0]   mil_rx_p_i,
  input  logic [2:0][1:0]   mil_rx_n_i,
  // ARINC-429
  output logic              a429_tx_hi_o,
  output logic              a429_tx_lo_o,
  input  logic              a429_rx_hi_i,
  input  logic              a429_rx_lo_i,
  // RS-422: index 0 RS_422_1, 1 RS_422_2
  output logic [1:0]        rs422_txd_o,
  input  logic [1:0]        rs422_rxd_i,
  // event pulses (monitoring)
  output daq_events_t       ev_o
);
  // ---------------- channel buffer ports ----------------
  logic [NUM_CH-1:0] ch_we, ch_wd, ch_rx_valid, ch_rx_bank, ch_trans_done;
  logic [CH_AW-1:0]  ch_addr;
  logic [15:0]       ch_din;
  logic [6:0]        ch_tx_len;
  logic [15:0]       ch_dout [NUM_CH];
  logic [6:0]        ch_rx_len [NUM_CH];

  // ---------------- Ethernet ----------------
  logic        cmd_we, cmd_valid, eth_bad;
  logic [6:0]  cmd_addr, cmd_len;
  logic [15:0] cmd_data;
  logic [2:0]  cmd_ch;
  eth_rx_mac #(.OWN_MAC(OWN_MAC)) u_eth_rx (
    .clk, .rst_n, .rxd_i(eth_rxd_i), .rx_dv_i(eth_rx_dv_i),
    .cmd_we_o(cmd_we), .cmd_addr_o(cmd_addr), .cmd_data_o(cmd_data),
    .cmd_valid_o(cmd_valid), .cmd_ch_o(cmd_ch), .cmd_len_o(cmd_len), .ev_bad_o(eth_bad));

  logic        tx_start, tx_busy, tx_done;
  logic [10:0] tx_len, pl_addr;
  logic [7:0]  pl_data;
  eth_tx_mac #(.SRC_MAC(OWN_MAC), .DST_MAC(HOST_MAC)) u_eth_tx (
    .clk, .rst_n, .start_i(tx_start), .len_i(tx_len), .pl_addr_o(pl_addr),
    .pl_data_i(pl_data), .busy_o(tx_busy), .done_o(tx_done),
    .txd_o(eth_txd_o), .tx_en_o(eth_tx_en_o));
  logic unused_done;
  assign unused_done = tx_done;

  gateway_ctrl #(.CYCLE_CLKS(CYCLE_CLKS)) u_gw (
    .clk, .rst_n,
    .cmd_we_i(cmd_we), .cmd_addr_i(cmd_addr), .cmd_data_i(cmd_data),
    .cmd_valid_i(cmd_valid), .cmd_ch_i(cmd_ch), .cmd_len_i(cmd_len),
    .tx_start_o(tx_start), .tx_len_o(tx_len), .pl_addr_i(pl_addr), .pl_data_o(pl_data),
    .tx_busy_i(tx_busy),
    .ch_we_o(ch_we), .ch_addr_o(ch_addr), .ch_din_o(ch_din), .ch_dout_i(ch_dout),
    .ch_write_done_o(ch_wd), .ch_tx_len_o(ch_tx_len),
    .ch_rx_valid_i(ch_rx_valid), .ch_rx_bank_i(ch_rx_bank), .ch_rx_len_i(ch_rx_len),
    .ev_dispatch_o(ev_o.dispatch), .ev_frame_o(ev_o.frame), .ev_overrun_o(ev_o.overrun));
  assign ev_o.eth_cmd_bad = eth_bad;
  assign ev_o.trans_done  = ch_trans_done;

  // ---------------- RS-422 channels ----------------
  rs422_channel #(.CLKS_PER_BIT(UART_CLKS_PER_BIT), .MAX_WORDS(SLOT_RS422_1)) u_rs422_1 (
    .clk, .rst_n, .ram_we_i(ch_we[CH_RS422_1]), .ram_addr_i(ch_addr), .ram_din_i(ch_din),
    .ram_dout_o(ch_dout[CH_RS422_1]), .write_done_i(ch_wd[CH_RS422_1]), .tx_len_i(ch_tx_len),
    .trans_done_o(ch_trans_done[CH_RS422_1]), .rx_valid_o(ch_rx_valid[CH_RS422_1]),
    .rx_bank_o(ch_rx_bank[CH_RS422_1]), .rx_len_o(ch_rx_len[CH_RS422_1]),
    .txd_o(rs422_txd_o[0]), .rxd_i(rs422_rxd_i[0]),
    .ev_pkt_o(ev_o.rs422_pkt[0]), .ev_overflow_o(ev_o.rs422_overflow[0]));

  rs422_channel #(.CLKS_PER_BIT(UART_CLKS_PER_BIT), .MAX_WORDS(SLOT_RS422_2)) u_rs422_2 (
    .clk, .rst_n, .ram_we_i(ch_we[CH_RS422_2]), .ram_addr_i(ch_addr), .ram_din_i(ch_din),
    .ram_dout_o(ch_dout[CH_RS422_2]), .write_done_i(ch_wd[CH_RS422_2]), .tx_len_i(ch_tx_len),
    .trans_done_o(ch_trans_done[CH_RS422_2]), .rx_valid_o(ch_rx_valid[CH_RS422_2]),
    .rx_bank_o(ch_rx_bank[CH_RS422_2]), .rx_len_o(ch_rx_len[CH_RS422_2]),
    .txd_o(rs422_txd_o[1]), .rxd_i(rs422_rxd_i[1]),
    .ev_pkt_o(ev_o.rs422_pkt[1]), .ev_overflow_o(ev_o.rs422_overflow[1]));

  // ---------------- ARINC-429 channel ----------------
  arinc429_channel #(.CLKS_PER_BIT(A429_CLKS_PER_BIT), .PKT_WORDS(SLOT_ARINC)) u_arinc (
    .clk, .rst_n, .ram_we_i(ch_we[CH_ARINC]), .ram_addr_i(ch_addr), .ram_din_i(ch_din),
    .ram_dout_o(ch_dout[CH_ARINC]), .write_done_i(ch_wd[CH_ARINC]), .tx_len_i(ch_tx_len),
    .trans_done_o(ch_trans_done[CH_ARINC]), .rx_valid_o(ch_rx_valid[CH_ARINC]),
    .rx_bank_o(ch_rx_bank[CH_ARINC]), .rx_len_o(ch_rx_len[CH_ARINC]),
    .a429_tx_hi_o, .a429_tx_lo_o, .a429_rx_hi_i, .a429_rx_lo_i,
    .ev_word_ok_o(ev_o.a429_word_ok), .ev_word_bad_o(ev_o.a429_word_bad),
    .ev_pkt_o(ev_o.a429_pkt));

  // ---------------- MIL-STD-1553B channels ----------------
  mil1553_channel #(.CLKS_PER_BIT(MIL_CLKS_PER_BIT), .IS_BC(1'b0), .RT_ADDR(RT1_ADDR),
                    .MON_ADDR(RT1_ADDR), .PKT_WORDS(SLOT_MIL_RT1)) u_mil_rt1 (
    .clk, .rst_n, .ram_we_i(ch_we[CH_MIL_RT1]), .ram_addr_i(ch_addr), .ram_din_i(ch_din),
    .ram_dout_o(ch_dout[CH_MIL_RT1]), .write_done_i(ch_wd[CH_MIL_RT1]), .tx_len_i(ch_tx_len),
    .trans_done_o(ch_trans_done[CH_MIL_RT1]), .rx_valid_o(ch_rx_valid[CH_MIL_RT1]),
    .rx_bank_o(ch_rx_bank[CH_MIL_RT1]), .rx_len_o(ch_rx_len[CH_MIL_RT1]),
    .bus_sel_i(mil_bus_sel_i[0]), .tx_p_o(mil_tx_p_o[0]), .tx_n_o(mil_tx_n_o[0]),
    .rx_p_i(mil_rx_p_i[0]), .rx_n_i(mil_rx_n_i[0]),
    .ev_corrected_o(ev_o.mil_corrected[0]), .ev_uncorr_o(ev_o.mil_uncorr[0]),
    .ev_pkt_o(ev_o.mil_pkt[0]), .ev_msg_o(ev_o.mil_msg[0]),
    .ev_no_status_o(ev_o.mil_no_status[0]));

  mil1553_channel #(.CLKS_PER_BIT(MIL_CLKS_PER_BIT), .IS_BC(1'b1), .TGT_ADDR(BC2_TGT_ADDR),
                    .MON_ADDR(BC2_TGT_ADDR), .PKT_WORDS(SLOT_MIL_BC2)) u_mil_bc2 (
    .clk, .rst_n, .ram_we_i(ch_we[CH_MIL_BC2]), .ram_addr_i(ch_addr), .ram_din_i(ch_din),
    .ram_dout_o(ch_dout[CH_MIL_BC2]), .write_done_i(ch_wd[CH_MIL_BC2]), .tx_len_i(ch_tx_len),
    .trans_done_o(ch_trans_done[CH_MIL_BC2]), .rx_valid_o(ch_rx_valid[CH_MIL_BC2]),
    .rx_bank_o(ch_rx_bank[CH_MIL_BC2]), .rx_len_o(ch_rx_len[CH_MIL_BC2]),
    .bus_sel_i(mil_bus_sel_i[1]), .tx_p_o(mil_tx_p_o[1]), .tx_n_o(mil_tx_n_o[1]),
    .rx_p_i(mil_rx_p_i[1]), .rx_n_i(mil_rx_n_i[1]),
    .ev_corrected_o(ev_o.mil_corrected[1]), .ev_uncorr_o(ev_o.mil_uncorr[1]),
    .ev_pkt_o(ev_o.mil_pkt[1]), .ev_msg_o(ev_o.mil_msg[1]),
    .ev_no_status_o(ev_o.mil_no_status[1]));

  mil1553_channel #(.CLKS_PER_BIT(MIL_CLKS_PER_BIT), .IS_BC(1'b1), .TGT_ADDR(BC1_TGT_ADDR),
                    .MON_ADDR(BC1_TGT_ADDR), .PKT_WORDS(SLOT_MIL_BC1)) u_mil_bc1 (
    .clk, .rst_n, .ram_we_i(ch_we[CH_MIL_BC1]), .ram_addr_i(ch_addr), .ram_din_i(ch_din),
    .ram_dout_o(ch_dout[CH_MIL_BC1]), .write_done_i(ch_wd[CH_MIL_BC1]), .tx_len_i(ch_tx_len),
    .trans_done_o(ch_trans_done[CH_MIL_BC1]), .rx_valid_o(ch_rx_valid[CH_MIL_BC1]),
    .rx_bank_o(ch_rx_bank[CH_MIL_BC1]), .rx_len_o(ch_rx_len[CH_MIL_BC1]),
    .bus_sel_i(mil_bus_sel_i[2]), .tx_p_o(mil_tx_p_o[2]), .tx_n_o(mil_tx_n_o[2]),
    .rx_p_i(mil_rx_p_i[2]), .rx_n_i(mil_rx_n_i[2]),
    .ev_corrected_o(ev_o.mil_corrected[2]), .ev_uncorr_o(ev_o.mil_uncorr[2]),
    .ev_pkt_o(ev_o.mil_pkt[2]), .ev_msg_o(ev_o.mil_msg[2]),
    .ev_no_status_o(ev_o.mil_no_status[2]));
endmodule
