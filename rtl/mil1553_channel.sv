// mil1553_channel - one MIL-STD-1553B channel of the data collection module (a "function
// card": MIL_RT1, MIL_BC1 or MIL_BC2), with its on-chip buffer RAM and its controller.
//
// Upstream (bus -> host). A passive monitor decodes every word on the dual-redundant bus
// (primary and reserve are received together) and captures the data words of messages
// addressed to MON_ADDR or to the broadcast address 31: the words following a receive command,
// or following the status word of a transmit command. Messages are merged into one packet of
// PKT_WORDS words: a message whose word count equals min(32, PKT_WORDS) starts a new packet,
// shorter ones are appended. So a 47-word packet sent as a 32-word and a 15-word command pair
// is reassembled in order, while 32-word (RT) and 12-word (broadcast) packets arrive whole. A
// message holding an uncorrectable word (double error, Manchester or 1553 parity error) is
// discarded. Packets are written into ping-pong banks of the receive RAM; when one completes,
// rx_bank_o flips to it and rx_valid_o is set, so the reader always sees a whole packet.
//
// Downstream (host -> bus). The host path writes words into the transmit RAM through the
// WEA_RAM / ADDR_RAM / DATA_TO_RAM port and pulses WRITE_DONE with the word count.
//  * IS_BC = 1 (bus controller): the words are sent to TGT_ADDR as receive commands of at most
//    32 words each (47 words -> CMD_1 with 32, CMD_2 with 15); after each command the
//    controller waits STATUS_TIMEOUT clocks for the RT's status word (STA_1, STA_2). A missing
//    status (the RT stays silent when a word arrived with a double error) pulses ev_no_status_o
//    and the same message is sent again, up to RETRIES times, before the controller moves on.
//    A broadcast target (31) gets no status. TRANS_DONE pulses after the last message.
//  * IS_BC = 0 (remote terminal RT_ADDR): a transmit command to RT_ADDR is answered after
//    RESP_GAP clocks with a status word and the requested words from the transmit RAM, then
//    TRANS_DONE pulses; a valid receive command to RT_ADDR is answered with a status word.
// Words this channel transmits itself are not captured by its monitor.
//
// The roles of the three cards, the 32+15 split, the merge into one 47-word packet, the
// status responses and the BRAM buffering follow the published description; the merge rule
// (by word count), the buffer map (see daq_pkg), the response gap, the time-outs and the choice
// of a passive monitor for acquisition are this design's own. Mode code commands (subaddress 0
// or 31) are ignored by the monitor and by the RT.
//
// External RAM port: addresses 0..127 are the transmit area, 128..255 the two receive banks.
// The read data (DATA_FROM_RAM) appears one clock after the address.
module mil1553_channel
  import daq_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT   = 50,
  parameter bit          IS_BC          = 1'b0,
  parameter logic [4:0]  RT_ADDR        = 5'd1,    // own address in RT role
  parameter logic [4:0]  TGT_ADDR       = 5'd1,    // addressed RT in BC role
  parameter logic [4:0]  SUBADDR        = 5'd1,    // subaddress used by BC commands
  parameter int unsigned RETRIES        = 1,       // BC: resends of a message without status
  parameter logic [4:0]  MON_ADDR       = 5'd1,    // terminal whose messages are captured
  parameter int unsigned PKT_WORDS      = 32,
  parameter int unsigned RESP_GAP       = 5 * CLKS_PER_BIT,    // RT response time
  parameter int unsigned MSG_GAP        = 20 * CLKS_PER_BIT,   // BC gap between messages
  parameter int unsigned STATUS_TIMEOUT = 40 * CLKS_PER_BIT
)(
  input  logic              clk,
  input  logic              rst_n,
  // buffer port (WEA_RAM, ADDR_RAM, DATA_TO_RAM, DATA_FROM_RAM)
  input  logic              ram_we_i,
  input  logic [CH_AW-1:0]  ram_addr_i,
  input  logic [15:0]       ram_din_i,
  output logic [15:0]       ram_dout_o,
  input  logic              write_done_i,
  input  logic [6:0]        tx_len_i,
  output logic              trans_done_o,
  // received packet
  output logic              rx_valid_o,
  output logic              rx_bank_o,
  output logic [6:0]        rx_len_o,
  // bus: index 0 primary, 1 reserve
  input  logic              bus_sel_i,
  output logic [1:0]        tx_p_o,
  output logic [1:0]        tx_n_o,
  input  logic [1:0]        rx_p_i,
  input  logic [1:0]        rx_n_i,
  // events
  output logic              ev_corrected_o,   // a word was repaired by the Hamming decoder
  output logic              ev_uncorr_o,      // a word was rejected
  output logic              ev_pkt_o,         // a packet completed
  output logic              ev_msg_o,         // the controller finished one message
  output logic              ev_no_status_o    // BC: status word missing
);
  localparam int unsigned FIRST_WC = (PKT_WORDS < 32) ? PKT_WORDS : 32;

  // ---------------- word transmitter / receiver ----------------
  logic        wt_start, wt_cmd, wt_ready, wt_busy, wt_p, wt_n;
  logic [15:0] wt_data;
  mil_word_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_wtx (
    .clk, .rst_n, .start_i(wt_start), .cmd_sync_i(wt_cmd), .data_i(wt_data),
    .ready_o(wt_ready), .busy_o(wt_busy), .tx_p_o(wt_p), .tx_n_o(wt_n));
  assign tx_p_o = bus_sel_i ? {wt_p, 1'b0} : {1'b0, wt_p};
  assign tx_n_o = bus_sel_i ? {wt_n, 1'b0} : {1'b0, wt_n};

  logic        rw_valid, rw_ok, rw_cmd, rw_e1, rw_e2, rw_pok, rw_merr;
  logic [15:0] rw_word;
  logic [HAM_N-1:0] rw_code, rw_corr;
  logic [4:0]  rw_loc;
  mil_word_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_wrx (
    .clk, .rst_n, .rx_p_i(|rx_p_i), .rx_n_i(|rx_n_i),
    .word_valid_o(rw_valid), .word_ok_o(rw_ok), .cmd_sync_o(rw_cmd), .word_o(rw_word),
    .code_o(rw_code), .corrected_o(rw_corr), .err_loc_o(rw_loc), .err_1bit_o(rw_e1),
    .err_2bit_o(rw_e2), .parity_ok_o(rw_pok), .manch_err_o(rw_merr));

  // own transmissions, plus one bit time after, are echo
  logic [$clog2(2*CLKS_PER_BIT+1)-1:0] echo_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) echo_cnt <= '0;
    else if (wt_busy) echo_cnt <= ($bits(echo_cnt))'(2 * CLKS_PER_BIT);
    else if (echo_cnt != '0) echo_cnt <= echo_cnt - 1'b1;
  end
  wire  echo  = wt_busy || (echo_cnt != '0);
  wire  w_in  = rw_valid && !echo;          // a word from another terminal
  mil_cmd_t rcmd;
  assign rcmd = mil_cmd_t'(rw_word);

  assign ev_corrected_o = w_in && rw_e1 && rw_ok;
  assign ev_uncorr_o    = w_in && !rw_ok;

  // ---------------- RAMs ----------------
  logic [15:0] txr_data, rxr_data;
  logic [6:0]  txr_addr;
  logic        rxw_we;
  logic [6:0]  rxw_addr;
  logic [15:0] rxw_data;
  sdp_ram #(.DW(16), .AW(7)) u_txram (
    .clk, .we_i(ram_we_i && !ram_addr_i[7]), .wr_addr_i(ram_addr_i[6:0]),
    .wr_data_i(ram_din_i), .rd_addr_i(txr_addr), .rd_data_o(txr_data));
  sdp_ram #(.DW(16), .AW(7)) u_rxram (
    .clk, .we_i(rxw_we), .wr_addr_i(rxw_addr), .wr_data_i(rxw_data),
    .rd_addr_i(ram_addr_i[6:0]), .rd_data_o(rxr_data));

  // external read: rx area from the rx RAM; tx area through a second look at the tx RAM is
  // not needed by the host path, so it reads back 0
  logic ext_sel_rx;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ext_sel_rx <= 1'b0; else ext_sel_rx <= ram_addr_i[7];
  assign ram_dout_o = ext_sel_rx ? rxr_data : 16'h0000;

  // ---------------- monitor: capture and merge ----------------
  typedef enum logic [1:0] {M_IDLE, M_STAT, M_DATA} mst_e;
  mst_e        mst;
  logic [5:0]  m_left;        // data words still expected in this message
  logic [5:0]  m_wc;          // words of this message
  logic [5:0]  m_k;           // words stored so far in this message
  logic [5:0]  m_base;        // packet index where this message starts
  logic        m_bank;        // bank being filled
  logic [$clog2(40*CLKS_PER_BIT+1)-1:0] m_tmo;
  logic        m_done_ok;     // pulse: message captured correctly

  wire cmd_for_me = (rcmd.rt_addr == MON_ADDR) || (rcmd.rt_addr == MIL_BCAST);
  wire mode_code  = (rcmd.subaddr == 5'd0) || (rcmd.subaddr == 5'd31);

  assign rxw_we   = (mst == M_DATA) && w_in && !rw_cmd && rw_ok &&
                    (32'(m_base) + 32'(m_k) < PKT_WORDS);
  assign rxw_addr = {m_bank, 6'(m_base + m_k)};
  assign rxw_data = rw_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst <= M_IDLE; m_left <= '0; m_wc <= '0; m_k <= '0; m_base <= '0; m_bank <= 1'b0;
      m_tmo <= '0; m_done_ok <= 1'b0;
      rx_valid_o <= 1'b0; rx_bank_o <= 1'b0; rx_len_o <= '0; ev_pkt_o <= 1'b0;
    end else begin
      m_done_ok <= 1'b0;
      ev_pkt_o  <= 1'b0;
      if (mst != M_IDLE) begin
        if (m_tmo == '0) mst <= M_IDLE; else m_tmo <= m_tmo - 1'b1;
      end
      if (w_in) begin
        m_tmo <= ($bits(m_tmo))'(40 * CLKS_PER_BIT);
        case (mst)
          M_IDLE: if (rw_cmd && rw_ok && cmd_for_me && !mode_code) begin
            m_wc   <= wc_words(rcmd.wc);
            m_left <= wc_words(rcmd.wc);
            m_k    <= '0;
            if (wc_words(rcmd.wc) == 6'(FIRST_WC)) m_base <= '0;
            mst    <= rcmd.tr ? M_STAT : M_DATA;
          end
          M_STAT: mst <= (rw_cmd && rw_ok && rcmd.rt_addr == MON_ADDR) ? M_DATA : M_IDLE;
          default: begin  // M_DATA
            if (rw_cmd || !rw_ok) begin
              mst <= M_IDLE;                     // message broken: discard it
            end else begin
              m_k    <= m_k + 1'b1;
              m_left <= m_left - 1'b1;
              if (m_left == 6'd1) begin
                mst <= M_IDLE;
                m_done_ok <= 1'b1;
                if (32'(m_base) + 32'(m_wc) >= PKT_WORDS) begin
                  rx_bank_o  <= m_bank;
                  rx_valid_o <= 1'b1;
                  rx_len_o   <= 7'(PKT_WORDS);
                  ev_pkt_o   <= 1'b1;
                  m_bank     <= ~m_bank;
                  m_base     <= '0;
                end else begin
                  m_base <= m_base + m_wc;
                end
              end
            end
          end
        endcase
      end
    end
  end

  // ---------------- controller (BC or RT) ----------------
  typedef enum logic [2:0] {C_IDLE, C_GAP, C_SEND, C_DRAIN, C_WAIT_STAT, C_NEXT} cst_e;
  cst_e        cst;
  logic [$clog2(STATUS_TIMEOUT+MSG_GAP+RESP_GAP+1)-1:0] c_cnt;
  logic [6:0]  c_total;       // words to send in all (BC)
  logic [6:0]  c_pos;         // first word of the current message
  logic [5:0]  c_n;           // data words in the current message
  logic [5:0]  c_wi;          // next word to load: 0 = command/status, k = data word k
  logic [15:0] c_first;       // command or status word
  logic        c_rt_tx;       // RT answering a transmit command
  logic [1:0]  c_try;         // resends of the current message so far (BC)

  assign txr_addr = c_pos + 7'((c_wi == 6'd0) ? 6'd0 : c_wi - 6'd1);
  assign wt_cmd   = (c_wi == 6'd0);
  assign wt_data  = (c_wi == 6'd0) ? c_first : txr_data;
  assign wt_start = (cst == C_SEND) && wt_ready;

  logic [15:0] status_word;
  assign status_word = {RT_ADDR, 11'd0};

  // transfer length, captured whenever the controller is idle (used in the BC role)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_total <= '0;
    else if (cst == C_IDLE && write_done_i) c_total <= tx_len_i;
  end

  wire [6:0] c_rem = c_total - c_pos;
  wire [5:0] c_chunk = (c_rem > 7'd32) ? 6'd32 : c_rem[5:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst <= C_IDLE; c_cnt <= '0; c_pos <= '0; c_n <= '0; c_wi <= '0;
      c_first <= '0; c_rt_tx <= 1'b0; c_try <= '0; trans_done_o <= 1'b0; ev_msg_o <= 1'b0;
      ev_no_status_o <= 1'b0;
    end else begin
      trans_done_o   <= 1'b0;
      ev_msg_o       <= 1'b0;
      ev_no_status_o <= 1'b0;
      case (cst)
        C_IDLE: begin
          if (IS_BC) begin
            if (write_done_i && tx_len_i != '0) begin
              c_pos   <= '0;
              c_try   <= '0;
              c_cnt   <= '0;
              cst     <= C_GAP;
            end
          end else if (w_in && rw_cmd && rw_ok && rcmd.rt_addr == RT_ADDR && !mode_code) begin
            // RT: transmit command -> status + data; receive command -> wait for the data
            c_rt_tx <= rcmd.tr;
            c_pos   <= '0;
            c_first <= status_word;
            c_wi    <= '0;
            if (rcmd.tr) begin
              c_n   <= wc_words(rcmd.wc);
              c_cnt <= ($bits(c_cnt))'(RESP_GAP);
              cst   <= C_GAP;
            end else begin
              c_n   <= '0;
              cst   <= C_NEXT;                  // wait for the message to be captured
              c_cnt <= ($bits(c_cnt))'(STATUS_TIMEOUT);
            end
          end
        end
        C_NEXT: begin   // RT receive: answer once the monitor has the whole message
          if (m_done_ok) begin
            c_cnt <= ($bits(c_cnt))'(RESP_GAP);
            cst   <= C_GAP;
          end else if (c_cnt == '0 || (w_in && rw_cmd)) cst <= C_IDLE;
          else if (w_in) c_cnt <= ($bits(c_cnt))'(STATUS_TIMEOUT);
          else c_cnt <= c_cnt - 1'b1;
        end
        C_GAP: begin
          if (c_cnt != '0) c_cnt <= c_cnt - 1'b1;
          else begin
            if (IS_BC) begin
              c_n     <= c_chunk;
              c_first <= {TGT_ADDR, 1'b0, SUBADDR, c_chunk[4:0]};
            end
            c_wi <= '0;
            cst  <= C_SEND;
          end
        end
        C_SEND: if (wt_ready) begin
          if (c_wi == c_n) cst <= C_DRAIN;
          else c_wi <= c_wi + 1'b1;
        end
        C_DRAIN: if (!wt_busy) begin
          if (IS_BC) begin
            if (TGT_ADDR == MIL_BCAST) begin
              ev_msg_o <= 1'b1;
              c_pos    <= c_pos + 7'(c_n);
              c_cnt    <= ($bits(c_cnt))'(MSG_GAP);
              cst      <= (c_pos + 7'(c_n) >= c_total) ? C_IDLE : C_GAP;
              trans_done_o <= (c_pos + 7'(c_n) >= c_total);
            end else begin
              c_cnt <= ($bits(c_cnt))'(STATUS_TIMEOUT);
              cst   <= C_WAIT_STAT;
            end
          end else begin
            ev_msg_o     <= 1'b1;
            trans_done_o <= c_rt_tx;
            cst          <= C_IDLE;
          end
        end
        C_WAIT_STAT: begin
          if (c_cnt == '0 && 32'(c_try) < RETRIES) begin
            // no status: send the same message again
            ev_no_status_o <= 1'b1;
            c_try <= c_try + 1'b1;
            c_cnt <= ($bits(c_cnt))'(MSG_GAP);
            cst   <= C_GAP;
          end else if ((w_in && rw_cmd && rw_ok && rcmd.rt_addr == TGT_ADDR) || c_cnt == '0) begin
            ev_no_status_o <= (c_cnt == '0);
            ev_msg_o <= 1'b1;
            c_try    <= '0;
            c_pos    <= c_pos + 7'(c_n);
            c_cnt    <= ($bits(c_cnt))'(MSG_GAP);
            if (c_pos + 7'(c_n) >= c_total) begin
              trans_done_o <= 1'b1;
              cst <= C_IDLE;
            end else cst <= C_GAP;
          end else c_cnt <= c_cnt - 1'b1;
        end
        default: cst <= C_IDLE;
      endcase
    end
  end

  // the transmitter is loaded only when it can accept a word
  a_load_ready: assert property (@(posedge clk) disable iff (!rst_n) wt_start |-> wt_ready);
endmodule
