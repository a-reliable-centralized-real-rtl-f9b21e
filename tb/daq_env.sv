// daq_env - the world around the collection module, for the end-to-end testbenches.
//
// Behavioural models of everything outside the FPGA, connected to the top level's ports: a host
// that sends control frames and parses the outgoing Ethernet frames (preamble, addresses,
// EtherType and CRC are checked), three MIL-STD-1553B terminals (one per 1553 channel, all on
// bus A), an ARINC-429 transmitter and receiver, and two RS-422 UARTs. It also makes the clock
// (50 MHz) and the reset. All traffic runs in parallel:
//   - control frames dispatch data to all six channels (plus one frame with a bad CRC);
//   - RT1 receives a 32-word message with a one-bit error (corrected), a message with a
//     two-bit error (dropped, no status), then answers a transmit command with dispatched data;
//   - BC2 broadcasts its dispatched 12 words (no status expected); a broadcast 12-word message
//     from another controller is then monitored;
//   - BC1 sends its 47 dispatched words as a 32-word and a 15-word message, each answered with
//     a status word; a 32 + 15 word pair from another controller is merged into one packet; a
//     last 3-word transfer gets no status reply, so it must be sent twice and reported;
//   - ARINC: 16 good words and one with bad parity arrive, 2 dispatched words go out;
//   - RS-422: a 9-byte packet, a 40-byte packet that overflows the 16-word slot, and 3
//     dispatched words that go out with the end-of-frame byte.
// The next two frames after the traffic must be well formed and the last must hold every slot
// as sent (with zero padding). Every event output is counted and the test fails if any
// mechanism never occurs; the overrun is taken from a second copy of the top whose cycle is
// shorter than one Ethernet frame (only in the shortened run). It prints TB_RESULT and ends
// the simulation.
//
// FULL = 0 expects the top at shortened bit times (1553 8 clocks, ARINC and RS-422 16 clocks
// per bit); FULL = 1 expects the top's default parameters.
module daq_env
  import daq_pkg::*;
#(
  parameter bit FULL = 1'b0
)(
  output logic            clk,
  output logic            rst_n,
  input  logic [7:0]      eth_txd_o,
  input  logic            eth_tx_en_o,
  output logic [7:0]      eth_rxd_i,
  output logic            eth_rx_dv_i,
  output logic [2:0]      mil_bus_sel_i,
  input  logic [2:0][1:0] mil_tx_p_o,
  input  logic [2:0][1:0] mil_tx_n_o,
  output logic [2:0][1:0] mil_rx_p_i,
  output logic [2:0][1:0] mil_rx_n_i,
  input  logic            a429_tx_hi_o,
  input  logic            a429_tx_lo_o,
  output logic            a429_rx_hi_i,
  output logic            a429_rx_lo_i,
  input  logic [1:0]      rs422_txd_o,
  output logic [1:0]      rs422_rxd_i,
  input  daq_events_t     ev_o,
  input  daq_events_t     ev_fast     // events of a copy with a very short cycle (overrun)
);
  localparam int MB  = FULL ? 50 : 8;
  localparam int AB  = FULL ? 500 : 16;
  localparam int UB  = FULL ? 434 : 16;
  localparam logic [47:0] OWN = 48'h02_00_00_00_15_53;

  initial begin clk = 0; rst_n = 0; end
  always #10 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input string what, input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ---------------- 1553 buses (bus A of each channel) ----------------
  logic [2:0] bp, bn;
  mil_bfm #(.B(MB)) u_bfm_rt1 (.clk, .tx_p(bp[0]), .tx_n(bn[0]), .rx_p(mil_rx_p_i[0][0]), .rx_n(mil_rx_n_i[0][0]));
  mil_bfm #(.B(MB)) u_bfm_bc2 (.clk, .tx_p(bp[1]), .tx_n(bn[1]), .rx_p(mil_rx_p_i[1][0]), .rx_n(mil_rx_n_i[1][0]));
  mil_bfm #(.B(MB)) u_bfm_bc1 (.clk, .tx_p(bp[2]), .tx_n(bn[2]), .rx_p(mil_rx_p_i[2][0]), .rx_n(mil_rx_n_i[2][0]));
  for (genvar k = 0; k < 3; k++) begin : g_bus
    assign mil_rx_p_i[k] = {1'b0, bp[k] | mil_tx_p_o[k][0]};
    assign mil_rx_n_i[k] = {1'b0, bn[k] | mil_tx_n_o[k][0]};
  end

  // ---------------- event counters ----------------
  int n_corr = 0, n_uncorr = 0, n_nostat = 0, n_a_ok = 0, n_a_bad = 0, n_a_pkt = 0;
  int n_mpkt [3] = '{0, 0, 0}, n_mmsg [3] = '{0, 0, 0};
  int n_rpkt [2] = '{0, 0}, n_rovf [2] = '{0, 0};
  int n_td [6] = '{0, 0, 0, 0, 0, 0};
  int n_ebad = 0, n_disp = 0, n_frame = 0, n_ovr = 0;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 3; k++) begin
      if (ev_o.mil_corrected[k]) n_corr++;
      if (ev_o.mil_uncorr[k]) n_uncorr++;
      if (ev_o.mil_no_status[k]) n_nostat++;
      if (ev_o.mil_pkt[k]) n_mpkt[k]++;
      if (ev_o.mil_msg[k]) n_mmsg[k]++;
    end
    for (int k = 0; k < 2; k++) begin
      if (ev_o.rs422_pkt[k]) n_rpkt[k]++;
      if (ev_o.rs422_overflow[k]) n_rovf[k]++;
    end
    for (int k = 0; k < 6; k++) if (ev_o.trans_done[k]) n_td[k]++;
    if (ev_o.a429_word_ok) n_a_ok++;
    if (ev_o.a429_word_bad) n_a_bad++;
    if (ev_o.a429_pkt) n_a_pkt++;
    if (ev_o.eth_cmd_bad) n_ebad++;
    if (ev_o.dispatch) n_disp++;
    if (ev_o.frame) n_frame++;
    if (ev_fast.overrun) n_ovr++;
  end

  // ---------------- host: outgoing frame parser ----------------
  function automatic logic [31:0] crc_of(input logic [7:0] q [$], input int from, input int to);
    logic [31:0] c = 32'hFFFFFFFF;
    for (int i = from; i < to; i++)
      for (int b = 0; b < 8; b++) begin
        logic fb;
        fb = c[0] ^ q[i][b];
        c = c >> 1;
        if (fb) c = c ^ 32'hEDB88320;
      end
    return ~c;
  endfunction

  logic [7:0] fb [$];
  logic [7:0] last_pl [$];
  int n_rx_frames = 0, n_rx_bad = 0;
  logic prev_en = 0;
  always @(posedge clk) if (rst_n) begin
    if (eth_tx_en_o) fb.push_back(eth_txd_o);
    else if (prev_en) begin
      logic ok;
      int n;
      logic [31:0] c;
      n = fb.size();
      ok = (n == 8 + 14 + 2 * FRAME_WORDS + 4);
      if (ok) begin
        for (int i = 0; i < 7; i++) if (fb[i] != 8'h55) ok = 0;
        if (fb[7] != 8'hD5) ok = 0;
        for (int i = 0; i < 6; i++) if (fb[8 + i] != 8'hFF || fb[14 + i] != OWN[47 - 8 * i -: 8]) ok = 0;
        if ({fb[20], fb[21]} != ETH_TYPE_DAQ) ok = 0;
        c = crc_of(fb, 8, n - 4);
        if ({fb[n - 1], fb[n - 2], fb[n - 3], fb[n - 4]} != c) ok = 0;
      end
      if (ok) begin
        n_rx_frames++;
        last_pl.delete();
        for (int i = 22; i < n - 4; i++) last_pl.push_back(fb[i]);
      end else n_rx_bad++;
      fb.delete();
    end
    prev_en = eth_tx_en_o;
  end

  // ---------------- host: control frame sender ----------------
  task automatic eth_send(input int ch, input logic [15:0] w [$], input logic bad);
    logic [7:0] q [$];
    logic [31:0] c;
    for (int i = 0; i < 7; i++) q.push_back(8'h55);
    q.push_back(8'hD5);
    for (int i = 0; i < 6; i++) q.push_back(OWN[47 - 8 * i -: 8]);
    for (int i = 0; i < 6; i++) q.push_back(8'h10 + 8'(i));
    q.push_back(ETH_TYPE_DAQ[15:8]); q.push_back(ETH_TYPE_DAQ[7:0]);
    q.push_back(8'(ch)); q.push_back(8'(w.size()));
    foreach (w[i]) begin q.push_back(w[i][15:8]); q.push_back(w[i][7:0]); end
    while (q.size() < 8 + 14 + 46) q.push_back(8'h00);
    c = crc_of(q, 8, q.size());
    for (int i = 0; i < 4; i++) q.push_back(c[8 * i +: 8]);
    if (bad) q[30] = q[30] ^ 8'h20;
    foreach (q[i]) begin
      @(negedge clk); eth_rx_dv_i = 1; eth_rxd_i = q[i];
    end
    @(negedge clk); eth_rx_dv_i = 0; eth_rxd_i = 0;
    repeat (12) @(negedge clk);
  endtask

  // ---------------- ARINC models ----------------
  logic [31:0] a_rx_words [$];
  logic [31:0] a_sh;
  int a_nb = 0, a_gap = 0;
  logic a_prev = 0;
  always @(negedge clk) if (rst_n) begin
    logic act;
    act = a429_tx_hi_o | a429_tx_lo_o;
    if (act && !a_prev) begin a_sh = {a429_tx_hi_o, a_sh[31:1]}; a_nb++; a_gap = 0; end
    else if (!act) begin
      a_gap++;
      if (a_gap == 2 * AB && a_nb > 0) begin
        if (a_nb == 32) a_rx_words.push_back(a_sh);
        a_nb = 0;
      end
    end
    a_prev = act;
  end
  task automatic a_send(input logic [31:0] w);
    for (int i = 0; i < 32; i++) begin
      a429_rx_hi_i = w[i]; a429_rx_lo_i = ~w[i];
      repeat (AB / 2) @(negedge clk);
      a429_rx_hi_i = 0; a429_rx_lo_i = 0;
      repeat (AB - AB / 2) @(negedge clk);
    end
    repeat (4 * AB) @(negedge clk);
  endtask

  // ---------------- RS-422 models ----------------
  task automatic u_send(input int k, input logic [7:0] b);
    rs422_rxd_i[k] = 0; repeat (UB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rs422_rxd_i[k] = b[i]; repeat (UB) @(negedge clk); end
    rs422_rxd_i[k] = 1; repeat (UB) @(negedge clk);
  endtask
  logic [7:0] u_rx_bytes [$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge clk);
      if (rst_n && !rs422_txd_o[0]) begin
        repeat (UB + UB / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin b[i] = rs422_txd_o[0]; repeat (UB) @(negedge clk); end
        u_rx_bytes.push_back(b);
      end
    end
  end

  // ---------------- stimulus ----------------
  logic [15:0] exp_slot [NUM_CH][$];
  logic [15:0] d_rt1 [$], d_bc2 [$], d_bc1 [$], d_rs1 [$], d_rs2 [$], d_ar [$];
  logic eth_done = 0;

  initial begin
    eth_rxd_i = 0; eth_rx_dv_i = 0; mil_bus_sel_i = 3'b000;
    a429_rx_hi_i = 0; a429_rx_lo_i = 0; rs422_rxd_i = 2'b11;
    for (int i = 0; i < 5; i++) d_rt1.push_back(16'hA000 + 16'(i));
    for (int i = 0; i < 12; i++) d_bc2.push_back(16'($urandom));
    for (int i = 0; i < 47; i++) d_bc1.push_back(16'($urandom));
    for (int i = 0; i < 3; i++) d_rs1.push_back(16'($urandom) & 16'h7E7E);
    for (int i = 0; i < 2; i++) d_rs2.push_back(16'($urandom) & 16'h7E7E);
    for (int i = 0; i < 4; i++) d_ar.push_back(16'($urandom));
    repeat (5) @(negedge clk); rst_n = 1; repeat (5) @(negedge clk);

    fork
      // ===== host commands =====
      begin
        eth_send(CH_MIL_BC1, d_bc1, 1'b0);
        eth_send(CH_MIL_BC2, d_bc2, 1'b0);
        eth_send(CH_RS422_1, d_rs1, 1'b1);     // bad CRC: must be dropped
        eth_send(CH_RS422_1, d_rs1, 1'b0);
        eth_send(CH_RS422_2, d_rs2, 1'b0);
        eth_send(CH_ARINC, d_ar, 1'b0);
        eth_send(CH_MIL_RT1, d_rt1, 1'b0);
        eth_done = 1;
        check("six commands dispatched, bad one dropped", n_disp == 6 && n_ebad == 1);
      end
      // ===== RT1 =====
      begin
        logic [15:0] pk [32];
        foreach (pk[i]) pk[i] = 16'($urandom);
        u_bfm_rt1.send(1, {5'd1, 1'b0, 5'd3, 5'd0});
        for (int i = 0; i < 32; i++) u_bfm_rt1.send(0, pk[i], (i == 4) ? 23'h000100 : 23'h0);
        u_bfm_rt1.idle(40 * MB);
        check("RT1 status after receive", u_bfm_rt1.rw.size() == 34 && u_bfm_rt1.rc[33] &&
              u_bfm_rt1.rok[33] && u_bfm_rt1.rw[33] == {5'd1, 11'd0});
        foreach (pk[i]) exp_slot[CH_MIL_RT1].push_back(pk[i]);
        u_bfm_rt1.rw.delete(); u_bfm_rt1.rc.delete(); u_bfm_rt1.rok.delete();
        u_bfm_rt1.send(1, {5'd1, 1'b0, 5'd3, 5'd5});
        for (int i = 0; i < 5; i++) u_bfm_rt1.send(0, 16'h5555, (i == 2) ? 23'h000410 : 23'h0);
        u_bfm_rt1.idle(60 * MB);
        check("RT1 silent after double error", u_bfm_rt1.rw.size() == 6);
        wait (eth_done);
        u_bfm_rt1.rw.delete(); u_bfm_rt1.rc.delete(); u_bfm_rt1.rok.delete();
        u_bfm_rt1.send(1, {5'd1, 1'b1, 5'd3, 5'd5});
        u_bfm_rt1.idle(200 * MB);
        check("RT1 transmit response", u_bfm_rt1.rw.size() == 7);
        if (u_bfm_rt1.rw.size() == 7) begin
          logic ok;
          ok = u_bfm_rt1.rc[1] && u_bfm_rt1.rw[1] == {5'd1, 11'd0};
          for (int i = 0; i < 5; i++)
            if (u_bfm_rt1.rc[2 + i] || !u_bfm_rt1.rok[2 + i] || u_bfm_rt1.rw[2 + i] != d_rt1[i]) ok = 0;
          check("RT1 transmit data from host", ok);
        end
      end
      // ===== BC2: dispatched broadcast, then a monitored broadcast from elsewhere =====
      begin
        logic [15:0] pk [12];
        while (u_bfm_bc2.rw.size() < 13) @(negedge clk);
        begin
          logic ok;
          ok = u_bfm_bc2.rc[0] && u_bfm_bc2.rw[0][15:11] == 5'd31 && !u_bfm_bc2.rw[0][10] &&
                     u_bfm_bc2.rw[0][4:0] == 5'd12;
          for (int i = 0; i < 12; i++) if (u_bfm_bc2.rw[1 + i] != d_bc2[i]) ok = 0;
          check("BC2 command and data", ok);
        end
        while (n_td[CH_MIL_BC2] == 0) @(negedge clk);
        check("BC2 broadcast needs no status", n_nostat == 0 && u_bfm_bc2.rw.size() == 13);
        u_bfm_bc2.idle(20 * MB);
        foreach (pk[i]) pk[i] = 16'($urandom);
        u_bfm_bc2.send(1, {5'd31, 1'b0, 5'd3, 5'd12});
        for (int i = 0; i < 12; i++) u_bfm_bc2.send(0, pk[i], (i == 11) ? 23'h400000 : 23'h0);
        u_bfm_bc2.idle(10 * MB);
        foreach (pk[i]) exp_slot[CH_MIL_BC2].push_back(pk[i]);
      end
      // ===== BC1: 32 + 15 split with status replies, then a monitored 32 + 15 pair =====
      begin
        logic [15:0] pk [47];
        for (int m = 0; m < 2; m++) begin
          int n;
          n = (m == 0) ? 32 : 15;
          while (u_bfm_bc1.rw.size() < 1 + n) @(negedge clk);
          begin
            logic ok;
            ok = u_bfm_bc1.rc[0] && u_bfm_bc1.rw[0][15:11] == 5'd1 && u_bfm_bc1.rw[0][4:0] == 5'(n);
            for (int i = 0; i < n; i++)
              if (u_bfm_bc1.rc[1 + i] || !u_bfm_bc1.rok[1 + i] || u_bfm_bc1.rw[1 + i] != d_bc1[32 * m + i]) ok = 0;
            check("BC1 message", ok);
          end
          u_bfm_bc1.idle(5 * MB);
          u_bfm_bc1.rw.delete(); u_bfm_bc1.rc.delete(); u_bfm_bc1.rok.delete();
          u_bfm_bc1.send(1, {5'd1, 11'd0});
          u_bfm_bc1.idle(MB);
          u_bfm_bc1.rw.delete(); u_bfm_bc1.rc.delete(); u_bfm_bc1.rok.delete();
        end
        while (n_td[CH_MIL_BC1] == 0) @(negedge clk);
        u_bfm_bc1.idle(40 * MB);
        foreach (pk[i]) pk[i] = 16'($urandom);
        u_bfm_bc1.send(1, {5'd1, 1'b0, 5'd2, 5'd0});
        for (int i = 0; i < 32; i++) u_bfm_bc1.send(0, pk[i], (i == 20) ? 23'h000001 : 23'h0);
        u_bfm_bc1.idle(8 * MB);
        u_bfm_bc1.send(1, {5'd1, 1'b0, 5'd2, 5'd15});
        for (int i = 0; i < 15; i++) u_bfm_bc1.send(0, pk[32 + i]);
        u_bfm_bc1.idle(8 * MB);
        foreach (pk[i]) exp_slot[CH_MIL_BC1].push_back(pk[i]);
        // a transfer that no RT answers
        wait (eth_done);
        eth_send(CH_MIL_BC1, d_rs1, 1'b0);
        while (n_td[CH_MIL_BC1] < 2) @(negedge clk);
        check("BC1 missing status reported after one resend", n_nostat == 2);
      end
      // ===== ARINC receive =====
      begin
        for (int i = 0; i < 17; i++) begin
          logic [31:0] w;
          w[30:0] = 31'($urandom);
          w[31] = ~^w[30:0];
          if (i == 8) w[31] = ~w[31];            // bad parity
          else begin exp_slot[CH_ARINC].push_back(w[31:16]); exp_slot[CH_ARINC].push_back(w[15:0]); end
          a_send(w);
        end
      end
      // ===== ARINC transmit =====
      begin
        while (n_td[CH_ARINC] == 0) @(negedge clk);
        repeat (4 * AB) @(negedge clk);
        check("ARINC words sent", a_rx_words.size() == 2);
        if (a_rx_words.size() == 2)
          for (int i = 0; i < 2; i++)
            check("ARINC sent word", a_rx_words[i] ==
                  {~^{d_ar[2 * i][14:0], d_ar[2 * i + 1]}, d_ar[2 * i][14:0], d_ar[2 * i + 1]});
      end
      // ===== RS-422 channel 1: 9-byte packet in, 3 words out =====
      begin
        logic [7:0] b [9];
        foreach (b[i]) b[i] = 8'($urandom) & 8'h7F;
        foreach (b[i]) u_send(0, b[i]);
        u_send(0, 8'hF0);
        for (int i = 0; i < 4; i++) exp_slot[CH_RS422_1].push_back({b[2 * i], b[2 * i + 1]});
        exp_slot[CH_RS422_1].push_back({b[8], 8'h00});
        while (n_td[CH_RS422_1] == 0) @(negedge clk);
        repeat (12 * UB) @(negedge clk);
        check("RS-422 bytes sent", u_rx_bytes.size() == 7);
        if (u_rx_bytes.size() == 7) begin
          logic ok;
          ok = u_rx_bytes[6] == 8'hF0;
          for (int i = 0; i < 3; i++) if ({u_rx_bytes[2 * i], u_rx_bytes[2 * i + 1]} != d_rs1[i]) ok = 0;
          check("RS-422 sent data and end of frame", ok);
        end
      end
      // ===== RS-422 channel 2: 40-byte packet overflows the 16-word slot =====
      begin
        logic [7:0] b [40];
        foreach (b[i]) b[i] = 8'($urandom) & 8'h7F;
        foreach (b[i]) u_send(1, b[i]);
        u_send(1, 8'hF3);
        for (int i = 0; i < 16; i++) exp_slot[CH_RS422_2].push_back({b[2 * i], b[2 * i + 1]});
      end
    join

    // ===== the next frames must carry everything =====
    begin
      int f0;
      f0 = n_rx_frames;
      while (n_rx_frames < f0 + 2) @(negedge clk);
    end
    check("frames well formed", n_rx_frames >= 2 && n_rx_bad == 0);
    begin
      int base;
      base = 0;
      for (int k = 0; k < NUM_CH; k++) begin
        logic ok;
        ok = 1;
        for (int i = 0; i < slot_words(ch_id_e'(k)); i++) begin
          logic [15:0] e, g;
          e = (i < exp_slot[k].size()) ? exp_slot[k][i] : 16'h0000;
          g = {last_pl[2 * (base + i)], last_pl[2 * (base + i) + 1]};
          if (e != g) begin
            ok = 0;
            if (failures < 20) $display("slot %0d word %0d: got %h expected %h", k, i, g, e);
          end
        end
        check($sformatf("frame slot %0d", k), ok);
        base += slot_words(ch_id_e'(k));
      end
    end

    // ===== every mechanism must have happened =====
    check("ev: 1553 single error corrected", n_corr >= 3);
    check("ev: 1553 double error rejected", n_uncorr >= 1);
    check("ev: 1553 missing status", n_nostat >= 1);
    for (int k = 0; k < 3; k++) check($sformatf("ev: 1553 packet %0d", k), n_mpkt[k] >= 1);
    for (int k = 0; k < 3; k++) check($sformatf("ev: 1553 message %0d", k), n_mmsg[k] >= 1);
    check("ev: BC1 merge (two messages, one packet)", n_mmsg[2] >= 2 && n_mpkt[2] == 1);
    check("ev: ARINC words", n_a_ok == 16 && n_a_bad == 1 && n_a_pkt == 1);
    check("ev: RS-422 packets", n_rpkt[0] == 1 && n_rpkt[1] == 1);
    check("ev: RS-422 overflow", n_rovf[1] >= 1 && n_rovf[0] == 0);
    for (int k = 0; k < 6; k++) check($sformatf("ev: trans_done %0d", k), n_td[k] == ((k == CH_MIL_BC1) ? 2 : 1));
    check("ev: bad control frame", n_ebad == 1);
    check("ev: dispatch", n_disp == 7);
    check("ev: frame", n_frame >= 2);
    if (!FULL) check("ev: overrun", n_ovr >= 1);
    $display("events: corr=%0d uncorr=%0d nostat=%0d mpkt=%0d/%0d/%0d mmsg=%0d/%0d/%0d a=%0d/%0d/%0d rs=%0d/%0d ovf=%0d disp=%0d frame=%0d ovr=%0d",
             n_corr, n_uncorr, n_nostat, n_mpkt[0], n_mpkt[1], n_mpkt[2], n_mmsg[0], n_mmsg[1], n_mmsg[2],
             n_a_ok, n_a_bad, n_a_pkt, n_rpkt[0], n_rpkt[1], n_rovf[1], n_disp, n_frame, n_ovr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
