// eth_tx_mac - Ethernet frame transmitter for the upstream (module -> host) direction.
//
// On start_i it sends one frame on a byte-wide GMII-style interface (txd_o, tx_en_o, one byte
// per clock): 7 preamble bytes 0x55, the start delimiter 0xD5, destination and source MAC
// addresses, the EtherType, len_i payload bytes (zero-padded to the 46-byte minimum), and the
// CRC-32 frame check sequence, then at least 12 idle byte times. Payload bytes are fetched
// through pl_addr_o: the byte at index pl_addr_o must be on pl_data_i one clock later
// (a block RAM read). busy_o is high from start_i to the end of the idle gap.
//
// The published design sends the aggregated data to the host in a standard Ethernet frame; it
// does not give the PHY interface, the addresses or the type. The byte-wide interface, raw
// layer-2 framing and the EtherType 0x88B5 (reserved for local experiments) are this design's
// choices. The PHY itself is outside this module.
module eth_tx_mac
  import daq_pkg::*;
#(
  parameter logic [47:0] SRC_MAC  = 48'h02_00_00_00_15_53,
  parameter logic [47:0] DST_MAC  = 48'hFF_FF_FF_FF_FF_FF,
  parameter logic [15:0] ETH_TYPE = ETH_TYPE_DAQ
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic [10:0] len_i,
  output logic [10:0] pl_addr_o,
  input  logic [7:0]  pl_data_i,
  output logic        busy_o,
  output logic        done_o,
  output logic [7:0]  txd_o,
  output logic        tx_en_o
);
  typedef enum logic [2:0] {S_IDLE, S_PRE, S_HDR, S_PAY, S_FCS, S_IFG} st_e;
  st_e         st;
  logic [10:0] idx, len, plen;
  logic [31:0] crc;
  logic [7:0]  ob;
  logic [111:0] hdr;
  assign hdr = {DST_MAC, SRC_MAC, ETH_TYPE};

  assign busy_o = (st != S_IDLE);
  assign plen   = (len < 11'd46) ? 11'd46 : len;
  assign pl_addr_o = (st == S_PAY) ? idx + 11'd1 : 11'd0;

  always_comb begin
    case (st)
      S_PRE:   ob = (idx == 11'd7) ? 8'hD5 : 8'h55;
      S_HDR:   ob = hdr[111 - 8 * idx[3:0] -: 8];
      S_PAY:   ob = (idx < len) ? pl_data_i : 8'h00;
      S_FCS:   ob = ~crc[8 * idx[1:0] +: 8];
      default: ob = 8'h00;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; idx <= '0; len <= '0; crc <= '1; txd_o <= '0; tx_en_o <= 1'b0;
      done_o <= 1'b0;
    end else begin
      done_o  <= 1'b0;
      txd_o   <= ob;
      tx_en_o <= (st == S_PRE) || (st == S_HDR) || (st == S_PAY) || (st == S_FCS);
      if (st == S_HDR || st == S_PAY) crc <= crc32_byte(crc, ob);
      case (st)
        S_IDLE: if (start_i) begin
          st <= S_PRE; idx <= '0; len <= len_i; crc <= '1;
        end
        S_PRE: if (idx == 11'd7) begin st <= S_HDR; idx <= '0; end else idx <= idx + 1'b1;
        S_HDR: if (idx == 11'd13) begin st <= S_PAY; idx <= '0; end else idx <= idx + 1'b1;
        S_PAY: if (idx == plen - 1'b1) begin st <= S_FCS; idx <= '0; end else idx <= idx + 1'b1;
        S_FCS: if (idx == 11'd3) begin st <= S_IFG; idx <= '0; end else idx <= idx + 1'b1;
        default: if (idx == 11'd11) begin st <= S_IDLE; done_o <= 1'b1; end
                 else idx <= idx + 1'b1;
      endcase
    end
  end
endmodule
