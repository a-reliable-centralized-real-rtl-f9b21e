// gateway_ctrl - protocol processing and conversion controller: the central gateway between
// the Ethernet side and the six protocol channels.
//
// It owns the buffer port (WEA_RAM, ADDR_RAM, DATA_TO_RAM, DATA_FROM_RAM, WRITE_DONE) of every
// channel and does one of two jobs at a time:
//  * Dispatch (downstream). When the Ethernet receiver reports a good control frame, the words
//    it left in the command buffer are copied into the transmit area of the addressed channel
//    (one word per clock after a one-clock read latency) and the channel's WRITE_DONE pulses
//    with the word count; the channel then sends them in its own protocol.
//  * Collect (upstream). Every CYCLE_CLKS clocks (the processing cycle) the latest complete
//    packet of each channel is copied, slot after slot in the fixed frame order (RS_422_1,
//    MIL_RT1, MIL_BC2, MIL_BC1, RS_422_2, ARINC; 157 words), into the aggregation buffer; words
//    past a channel's packet length, or of a channel with no packet yet, are sent as 0. The
//    aggregation buffer is then sent as one 314-byte Ethernet payload.
// A command that arrives during a collection waits (one deep); a cycle tick that arrives while
// the previous frame is still in progress is counted as an overrun and skipped.
//
// The two directions, the merge of all channels into one frame per processing cycle and the
// frame order and sizes follow the published description and frame layout. The cycle period
// (20 ms, 50 Hz, the rate of the fastest source) and the copy scheme are this design's choices.
module gateway_ctrl
  import daq_pkg::*;
#(
  parameter int unsigned CYCLE_CLKS = 1_000_000     // 20 ms at 50 MHz
)(
  input  logic              clk,
  input  logic              rst_n,
  // command buffer write port, from the Ethernet receiver
  input  logic              cmd_we_i,
  input  logic [6:0]        cmd_addr_i,
  input  logic [15:0]       cmd_data_i,
  input  logic              cmd_valid_i,
  input  logic [2:0]        cmd_ch_i,
  input  logic [6:0]        cmd_len_i,
  // Ethernet transmitter
  output logic              tx_start_o,
  output logic [10:0]       tx_len_o,
  input  logic [10:0]       pl_addr_i,
  output logic [7:0]        pl_data_o,
  input  logic              tx_busy_i,
  // channel buffer ports
  output logic [NUM_CH-1:0] ch_we_o,
  output logic [CH_AW-1:0]  ch_addr_o,
  output logic [15:0]       ch_din_o,
  input  logic [15:0]       ch_dout_i [NUM_CH],
  output logic [NUM_CH-1:0] ch_write_done_o,
  output logic [6:0]        ch_tx_len_o,
  input  logic [NUM_CH-1:0] ch_rx_valid_i,
  input  logic [NUM_CH-1:0] ch_rx_bank_i,
  input  logic [6:0]        ch_rx_len_i [NUM_CH],
  // events
  output logic              ev_dispatch_o,
  output logic              ev_frame_o,
  output logic              ev_overrun_o
);
  // ---------------- processing-cycle timer ----------------
  logic [$clog2(CYCLE_CLKS+1)-1:0] tmr;
  logic tick;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin tmr <= '0; tick <= 1'b0; end
    else begin
      tick <= 1'b0;
      if (tmr == ($bits(tmr))'(CYCLE_CLKS - 1)) begin tmr <= '0; tick <= 1'b1; end
      else tmr <= tmr + 1'b1;
    end
  end

  // ---------------- buffers ----------------
  logic [6:0]  cmd_raddr;
  logic [15:0] cmd_rdata;
  sdp_ram #(.DW(16), .AW(7)) u_cmdbuf (
    .clk, .we_i(cmd_we_i), .wr_addr_i(cmd_addr_i), .wr_data_i(cmd_data_i),
    .rd_addr_i(cmd_raddr), .rd_data_o(cmd_rdata));

  logic        agg_we;
  logic [7:0]  agg_waddr;
  logic [15:0] agg_wdata, agg_rdata;
  logic        pl_lsb;
  sdp_ram #(.DW(16), .AW(8)) u_aggbuf (
    .clk, .we_i(agg_we), .wr_addr_i(agg_waddr), .wr_data_i(agg_wdata),
    .rd_addr_i(pl_addr_i[8:1]), .rd_data_o(agg_rdata));
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pl_lsb <= 1'b0; else pl_lsb <= pl_addr_i[0];
  assign pl_data_o = pl_lsb ? agg_rdata[7:0] : agg_rdata[15:8];

  // ---------------- control ----------------
  typedef enum logic [1:0] {G_IDLE, G_DISP, G_COLL, G_SEND} gst_e;
  gst_e        gst;
  logic        cmd_pend, tick_pend;
  logic [2:0]  p_ch;
  logic [6:0]  p_len;
  logic [6:0]  i;            // word being read
  logic        wv;           // a read issued last clock is to be written now
  logic [6:0]  wi;           // its word index
  logic [2:0]  s, ws;        // slot being read / slot of the word being written
  logic [7:0]  base, wbase;  // frame offset of the slot
  logic        wzero;        // the word being written is padding

  wire [6:0] slot_len = 7'(slot_words(32'(s)));

  always_comb begin
    cmd_raddr = i;
    ch_addr_o = '0;
    ch_din_o  = cmd_rdata;
    ch_we_o   = '0;
    if (gst == G_DISP) begin
      ch_addr_o = {1'b0, wi};
      if (wv) ch_we_o[p_ch] = 1'b1;
    end else if (gst == G_COLL) begin
      ch_addr_o = (ch_rx_bank_i[s] ? RX_BANK1 : RX_BANK0) + 8'(i);
    end
    agg_we    = (gst == G_COLL) && wv;
    agg_waddr = wbase + 8'(wi);
    agg_wdata = wzero ? 16'h0000 : ch_dout_i[ws];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gst <= G_IDLE; cmd_pend <= 1'b0; tick_pend <= 1'b0; p_ch <= '0; p_len <= '0;
      i <= '0; wv <= 1'b0; wi <= '0; s <= '0; ws <= '0; base <= '0; wbase <= '0; wzero <= 1'b0;
      ch_write_done_o <= '0; ch_tx_len_o <= '0; tx_start_o <= 1'b0; tx_len_o <= '0;
      ev_dispatch_o <= 1'b0; ev_frame_o <= 1'b0; ev_overrun_o <= 1'b0;
    end else begin
      ch_write_done_o <= '0;
      tx_start_o      <= 1'b0;
      ev_dispatch_o   <= 1'b0;
      ev_frame_o      <= 1'b0;
      ev_overrun_o    <= 1'b0;
      if (cmd_valid_i) begin cmd_pend <= 1'b1; p_ch <= cmd_ch_i; p_len <= cmd_len_i; end
      if (tick) begin
        if (tick_pend || gst == G_COLL || gst == G_SEND) ev_overrun_o <= 1'b1;
        else tick_pend <= 1'b1;
      end
      wv <= 1'b0;
      case (gst)
        G_IDLE: begin
          i <= '0;
          if (cmd_pend && !cmd_valid_i) begin
            gst <= G_DISP; cmd_pend <= 1'b0;
          end else if (tick_pend && !tx_busy_i) begin
            gst <= G_COLL; tick_pend <= 1'b0; s <= '0; base <= '0;
          end
        end
        G_DISP: begin
          if (i < p_len) begin wv <= 1'b1; wi <= i; i <= i + 1'b1; end
          else if (!wv) begin
            ch_write_done_o[p_ch] <= 1'b1;
            ch_tx_len_o   <= p_len;
            ev_dispatch_o <= 1'b1;
            gst <= G_IDLE;
          end
        end
        G_COLL: begin
          if (s < 3'(NUM_CH)) begin
            wv    <= 1'b1;
            wi    <= i;
            ws    <= s;
            wbase <= base;
            wzero <= !ch_rx_valid_i[s] || (i >= ch_rx_len_i[s]);
            if (i == slot_len - 1'b1) begin
              i <= '0; s <= s + 1'b1; base <= base + 8'(slot_len);
            end else i <= i + 1'b1;
          end else if (!wv) begin
            tx_start_o <= 1'b1;
            tx_len_o   <= 11'(2 * FRAME_WORDS);
            ev_frame_o <= 1'b1;
            gst <= G_SEND;
          end
        end
        default: if (tx_busy_i) gst <= G_IDLE;   // G_SEND: wait until the transmitter has started
      endcase
    end
  end
endmodule
