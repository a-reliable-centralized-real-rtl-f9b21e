// rs422_channel - an RS-422/485 channel with variable-length packets.
//
// RX: bytes from the UART receiver are packed two to a 16-bit word (first byte in the high
// half) into the receive bank being filled. The packet length is not fixed: a byte whose four
// high bits equal EOF_CODE (the end-of-frame control bits) closes the packet. Its length is
// the number of words stored (an odd byte count leaves a final word with a zero low byte); the
// bank is then handed over with that length (rx_len_o, rx_bank_o, rx_valid_o). Bytes beyond
// MAX_WORDS words are dropped and counted as an overflow; an empty packet or one with a framing
// error is discarded.
// TX: after WRITE_DONE with a word count, the words of the transmit area are sent high byte
// first, followed by the end-of-frame byte {EOF_CODE, 4'h0}; TRANS_DONE pulses after it.
//
// The end-of-frame control bits that set the packet length, and the variable-length packets in
// both directions, follow the published description. Their exact coding (the high nibble of a
// trailing byte, value 4'hF) is this design's choice: data bytes must therefore not carry that
// nibble. The 8N1 format and the buffer map are also this design's choices.
module rs422_channel
  import daq_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter int unsigned MAX_WORDS    = 18,
  parameter logic [3:0]  EOF_CODE     = 4'hF
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
  output logic              txd_o,
  input  logic              rxd_i,
  output logic              ev_pkt_o,
  output logic              ev_overflow_o
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

  // ---------------- TX ----------------
  logic       u_start, u_ready;
  logic [7:0] u_data;
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_utx (
    .clk, .rst_n, .start_i(u_start), .data_i(u_data), .ready_o(u_ready), .txd_o(txd_o));

  typedef enum logic [1:0] {T_IDLE, T_RD, T_SEND, T_WAIT} tst_e;
  tst_e       tst;
  logic [6:0] t_n, t_i;
  logic       t_lo;       // sending the low byte
  logic       t_eof;      // sending the trailer
  assign txr_addr = t_i;
  assign u_data   = t_eof ? {EOF_CODE, 4'h0} : (t_lo ? txr_data[7:0] : txr_data[15:8]);
  assign u_start  = (tst == T_SEND) && u_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tst <= T_IDLE; t_n <= '0; t_i <= '0; t_lo <= 1'b0; t_eof <= 1'b0; trans_done_o <= 1'b0;
    end else begin
      trans_done_o <= 1'b0;
      case (tst)
        T_IDLE: if (write_done_i && tx_len_i != '0) begin
          t_n <= tx_len_i; t_i <= '0; t_lo <= 1'b0; t_eof <= 1'b0; tst <= T_RD;
        end
        T_RD: tst <= T_SEND;                 // read data of word t_i arrives
        T_SEND: if (u_ready) begin
          if (t_eof) tst <= T_WAIT;
          else if (!t_lo) t_lo <= 1'b1;
          else begin
            t_lo <= 1'b0;
            if (t_i + 1'b1 == t_n) t_eof <= 1'b1;
            else begin t_i <= t_i + 1'b1; tst <= T_RD; end
          end
        end
        default: if (u_ready) begin trans_done_o <= 1'b1; tst <= T_IDLE; end
      endcase
    end
  end

  // ---------------- RX framer ----------------
  logic       b_valid, b_ferr;
  logic [7:0] b_data;
  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_urx (
    .clk, .rst_n, .rxd_i(rxd_i), .byte_valid_o(b_valid), .frame_err_o(b_ferr), .byte_o(b_data));

  logic       r_bank, r_odd, r_bad;
  logic [6:0] r_w;          // whole words stored
  logic [7:0] r_hi;
  wire  is_eof  = b_valid && (b_data[7:4] == EOF_CODE);
  wire  is_data = b_valid && !is_eof && !b_ferr;
  wire  room    = r_w < 7'(MAX_WORDS);

  assign rxw_we   = (is_data && r_odd && room) || (is_eof && r_odd && room);
  assign rxw_addr = {r_bank, r_w[5:0]};
  assign rxw_data = is_eof ? {r_hi, 8'h00} : {r_hi, b_data};
  assign ev_overflow_o = is_data && !room && !r_odd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_bank <= 1'b0; r_odd <= 1'b0; r_bad <= 1'b0; r_w <= '0; r_hi <= '0;
      rx_valid_o <= 1'b0; rx_bank_o <= 1'b0; rx_len_o <= '0; ev_pkt_o <= 1'b0;
    end else begin
      ev_pkt_o <= 1'b0;
      if (b_valid && b_ferr) r_bad <= 1'b1;
      if (is_eof) begin
        if (!r_bad && (r_w != '0 || r_odd)) begin
          rx_len_o   <= (r_odd && room) ? r_w + 1'b1 : r_w;
          rx_bank_o  <= r_bank;
          rx_valid_o <= 1'b1;
          ev_pkt_o   <= 1'b1;
          r_bank     <= ~r_bank;
        end
        r_w <= '0; r_odd <= 1'b0; r_bad <= 1'b0;
      end else if (is_data) begin
        if (!r_odd) begin r_hi <= b_data; r_odd <= 1'b1; end
        else begin
          r_odd <= 1'b0;
          if (room) r_w <= r_w + 1'b1;
        end
      end
    end
  end
endmodule
