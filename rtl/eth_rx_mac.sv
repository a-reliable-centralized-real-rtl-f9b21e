// eth_rx_mac - Ethernet frame receiver and command decoder for the downstream (host ->
// module) direction.
//
// Takes a byte-wide GMII-style stream (rxd_i, rx_dv_i). After the preamble and the 0xD5
// delimiter it checks the destination address (own MAC or broadcast) and the EtherType, and
// runs the CRC-32 over the whole frame, FCS included (a good frame leaves the fixed residue
// 0xDEBB20E3). The payload of a control frame is: byte 0 the target channel (frame slot order,
// see daq_pkg), byte 1 the number of 16-bit words, then the words, high byte first. Words are
// written to the command buffer through cmd_we_o/cmd_addr_o/cmd_data_o as they arrive;
// cmd_valid_o pulses with the channel and count only when the frame ends with a good FCS and
// the header and count are consistent, so a damaged frame is never dispatched (its words are
// overwritten by the next frame). ev_bad_o pulses for a rejected frame.
//
// Decoding host frames and routing them to the protocol modules follows the published
// description; the frame layout, addressing and command format are this design's choices.
module eth_rx_mac
  import daq_pkg::*;
#(
  parameter logic [47:0] OWN_MAC  = 48'h02_00_00_00_15_53,
  parameter logic [15:0] ETH_TYPE = ETH_TYPE_DAQ,
  parameter int unsigned MAX_WORDS = 64
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  rxd_i,
  input  logic        rx_dv_i,
  output logic        cmd_we_o,
  output logic [6:0]  cmd_addr_o,
  output logic [15:0] cmd_data_o,
  output logic        cmd_valid_o,
  output logic [2:0]  cmd_ch_o,
  output logic [6:0]  cmd_len_o,
  output logic        ev_bad_o
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_BODY, S_DROP} st_e;
  st_e         st;
  logic [10:0] n;            // byte index after the delimiter
  logic [31:0] crc;
  logic        hdr_ok, own_ok, bc_ok;
  logic [7:0]  ch;
  logic [7:0]  cnt;
  logic [7:0]  hi;

  wire [10:0] pidx = n - 11'd14;            // payload byte index
  wire [10:0] widx = (pidx - 11'd2) >> 1;   // word index of a data byte

  always_comb begin
    cmd_we_o   = 1'b0;
    cmd_addr_o = widx[6:0];
    cmd_data_o = {hi, rxd_i};
    if (st == S_BODY && rx_dv_i && n >= 11'd17 && pidx[0] == 1'b1 && widx < 11'(cnt) &&
        widx < 11'(MAX_WORDS))
      cmd_we_o = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; n <= '0; crc <= '1; hdr_ok <= 1'b0; own_ok <= 1'b0; bc_ok <= 1'b0; ch <= '0; cnt <= '0; hi <= '0;
      cmd_valid_o <= 1'b0; cmd_ch_o <= '0; cmd_len_o <= '0; ev_bad_o <= 1'b0;
    end else begin
      cmd_valid_o <= 1'b0;
      ev_bad_o    <= 1'b0;
      case (st)
        S_IDLE: if (rx_dv_i) st <= (rxd_i == 8'h55) ? S_PRE : S_DROP;
        S_PRE: begin
          if (!rx_dv_i) st <= S_IDLE;
          else if (rxd_i == 8'hD5) begin
            st <= S_BODY; n <= '0; crc <= '1; hdr_ok <= 1'b1; own_ok <= 1'b1; bc_ok <= 1'b1;
          end else if (rxd_i != 8'h55) st <= S_DROP;
        end
        S_BODY: begin
          if (rx_dv_i) begin
            crc <= crc32_byte(crc, rxd_i);
            n   <= n + 1'b1;
            if (n < 11'd6) begin
              if (rxd_i != OWN_MAC[47 - 8 * n[2:0] -: 8]) own_ok <= 1'b0;
              if (rxd_i != 8'hFF) bc_ok <= 1'b0;
            end
            if (n == 11'd12 && rxd_i != ETH_TYPE[15:8]) hdr_ok <= 1'b0;
            if (n == 11'd13 && rxd_i != ETH_TYPE[7:0])  hdr_ok <= 1'b0;
            if (n == 11'd14) ch  <= rxd_i;
            if (n == 11'd15) cnt <= rxd_i;
            if (n >= 11'd16) hi  <= rxd_i;
          end else begin
            // end of frame
            if (hdr_ok && (own_ok || bc_ok) && crc == CRC_RESIDUE && ch < 8'(NUM_CH) && cnt != 8'd0 &&
                cnt <= 8'(MAX_WORDS) && n >= 11'(14 + 2 + 2 * 32'(cnt) + 4)) begin
              cmd_valid_o <= 1'b1;
              cmd_ch_o    <= ch[2:0];
              cmd_len_o   <= cnt[6:0];
            end else ev_bad_o <= 1'b1;
            st <= S_IDLE;
          end
        end
        default: if (!rx_dv_i) st <= S_IDLE;    // S_DROP
      endcase
    end
  end
endmodule
