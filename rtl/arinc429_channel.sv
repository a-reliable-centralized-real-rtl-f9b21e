// arinc429_channel - the ARINC-429 channel: TX and RX controllers, TX and RX drivers and
// buffer RAM.
//
// The TX and RX paths run independently and in parallel. TX: the host path writes words into
// the transmit area of the buffer (two 16-bit words per ARINC word, bits 32..17 first) and
// pulses WRITE_DONE with the count of 16-bit words; the TX controller reads each pair, hands
// bits 1..31 to the driver (which adds the odd parity bit) and pulses TRANS_DONE after the
// last word has left. RX: the driver delivers each received word; only words with 32 bits and
// good parity are kept, as two 16-bit words in the receive bank being filled (bits 32..17
// first). After PKT_WORDS 16-bit words (16 ARINC words) the bank is handed over (rx_bank_o,
// rx_valid_o) and the other bank is filled.
//
// The division into TX/RX controllers and drivers around a buffer, the hardware-fixed
// parameters and the forwarding of verified words only follow the published block diagram and
// text. The packet size follows the 32-word ARINC slot of the published frame, read as 16
// ARINC words of two 16-bit halves; the buffer is built as two simple dual-port RAMs (one per
// direction) with the same map as the other channels (see daq_pkg), which is this design's
// choice. The receive side keeps words in arrival order, not sorted by label.
module arinc429_channel
  import daq_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 500,
  parameter int unsigned PKT_WORDS    = 32
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ram_we_i,
  input  logic [CH_AW-1:0]  ram_addr_i,
  input  logic [15:0]       ram_din_i,
  output logic [15:0]       ram_dout_o,
  input  logic              write_done_i,
  input  logic [6:0]        tx_len_i,
  output logic              trans_done_o,
  output logic              rx_valid_o,
  output logic              rx_bank_o,
  output logic [6:0]        rx_len_o,
  output logic              a429_tx_hi_o,
  output logic              a429_tx_lo_o,
  input  logic              a429_rx_hi_i,
  input  logic              a429_rx_lo_i,
  output logic              ev_word_ok_o,
  output logic              ev_word_bad_o,
  output logic              ev_pkt_o
);
  // ---------------- RAMs ----------------
  logic [6:0]  txr_addr;
  logic [15:0] txr_data, rxr_data;
  logic        rxw_we;
  logic [6:0]  rxw_addr;
  logic [15:0] rxw_data;
  sdp_ram #(.DW(16), .AW(7)) u_txram (
    .clk, .we_i(ram_we_i && !ram_addr_i[7]), .wr_addr_i(ram_addr_i[6:0]),
    .wr_data_i(ram_din_i), .rd_addr_i(txr_addr), .rd_data_o(txr_data));
  sdp_ram #(.DW(16), .AW(7)) u_rxram (
    .clk, .we_i(rxw_we), .wr_addr_i(rxw_addr), .wr_data_i(rxw_data),
    .rd_addr_i(ram_addr_i[6:0]), .rd_data_o(rxr_data));
  logic ext_sel_rx;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ext_sel_rx <= 1'b0; else ext_sel_rx <= ram_addr_i[7];
  assign ram_dout_o = ext_sel_rx ? rxr_data : 16'h0000;

  // ---------------- TX controller ----------------
  logic        d_start, d_ready;
  logic [30:0] d_data;
  arinc_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_drv_tx (
    .clk, .rst_n, .start_i(d_start), .data_i(d_data), .ready_o(d_ready),
    .line_hi_o(a429_tx_hi_o), .line_lo_o(a429_tx_lo_o));

  typedef enum logic [2:0] {T_IDLE, T_RDH, T_RDL, T_LOAD, T_WAIT} tst_e;
  tst_e       tst;
  logic [5:0] t_n, t_i;
  logic [15:0] t_hi;
  assign txr_addr = {t_i, (tst == T_RDL || tst == T_LOAD)};
  assign d_start  = (tst == T_LOAD) && d_ready;
  assign d_data   = {t_hi[14:0], txr_data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tst <= T_IDLE; t_n <= '0; t_i <= '0; t_hi <= '0; trans_done_o <= 1'b0;
    end else begin
      trans_done_o <= 1'b0;
      case (tst)
        T_IDLE: if (write_done_i && tx_len_i[6:1] != '0) begin
          t_n <= tx_len_i[6:1]; t_i <= '0; tst <= T_RDH;
        end
        T_RDH:  tst <= T_RDL;                       // address of the high half is out
        // T_RDL: high half arrives, low half addressed; T_LOAD: low half held until the driver is free
        T_RDL:  begin t_hi <= txr_data; tst <= T_LOAD; end
        T_LOAD: if (d_ready) begin
          if (t_i + 1'b1 == t_n) tst <= T_WAIT;
          else begin t_i <= t_i + 1'b1; tst <= T_RDH; end
        end
        default: if (d_ready) begin trans_done_o <= 1'b1; tst <= T_IDLE; end
      endcase
    end
  end

  // ---------------- RX controller ----------------
  logic        r_valid, r_ok;
  logic [31:0] r_word;
  arinc_rx #(.GAP_CLKS(2 * CLKS_PER_BIT)) u_drv_rx (
    .clk, .rst_n, .line_hi_i(a429_rx_hi_i), .line_lo_i(a429_rx_lo_i),
    .word_valid_o(r_valid), .word_ok_o(r_ok), .word_o(r_word));

  logic       r_bank, r_second;
  logic [5:0] r_k;
  logic [15:0] r_lo;
  assign ev_word_ok_o  = r_valid && r_ok;
  assign ev_word_bad_o = r_valid && !r_ok;
  assign rxw_we   = (r_valid && r_ok) || r_second;
  assign rxw_addr = {r_bank, r_k[4:0], r_second};
  assign rxw_data = r_second ? r_lo : r_word[31:16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_bank <= 1'b0; r_second <= 1'b0; r_k <= '0; r_lo <= '0;
      rx_valid_o <= 1'b0; rx_bank_o <= 1'b0; rx_len_o <= '0; ev_pkt_o <= 1'b0;
    end else begin
      ev_pkt_o <= 1'b0;
      r_second <= 1'b0;
      if (r_valid && r_ok) begin
        r_lo     <= r_word[15:0];
        r_second <= 1'b1;
      end
      if (r_second) begin
        if (r_k == 6'(PKT_WORDS / 2 - 1)) begin
          r_k <= '0;
          r_bank <= ~r_bank;
          rx_bank_o <= r_bank;
          rx_valid_o <= 1'b1;
          rx_len_o <= 7'(PKT_WORDS);
          ev_pkt_o <= 1'b1;
        end else r_k <= r_k + 1'b1;
      end
    end
  end
endmodule
