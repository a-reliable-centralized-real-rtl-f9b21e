// tb_mil1553_channel - self-checking test of one MIL-STD-1553B channel in both roles.
//
// RT role (RT address 1, 32-word packets): a bus-controller model sends a 32-word receive
// message (status expected, packet captured and read back through the buffer port), a message
// with one corrupted bit (corrected, still answered), a message with a double error (discarded,
// no status), and a transmit command (status plus words from the transmit area, TRANS_DONE).
// BC role (target RT 1, 47-word packets): 47 words written through the buffer port go out as
// a 32-word and a 15-word receive message, each answered by a remote-terminal model; the word
// count, command words, message length (33 x 26 bit times) and TRANS_DONE are checked. A
// message that gets no status is sent once more and then reported twice; a message whose
// second attempt is answered completes normally. Then another controller sends a 32 + 15 word message pair to
// RT 1 and the monitor must merge it into one 47-word packet.
module tb_mil1553_channel;
  import daq_pkg::*;
  localparam int B = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input string what, input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ---------------- two channels, two buses ----------------
  logic        we [2];
  logic [7:0]  addr [2];
  logic [15:0] din [2], dout [2];
  logic        wd [2];
  logic [6:0]  txlen [2];
  logic        tdone [2], rxv [2], rxb [2];
  logic [6:0]  rxl [2];
  logic [1:0]  tp [2], tn [2];
  logic        evc [2], evu [2], evp [2], evm [2], evns [2];
  logic        bp [2], bn [2];

  mil_bfm #(.B(B)) u_bfm0 (.clk, .tx_p(bp[0]), .tx_n(bn[0]), .rx_p(bp[0] | tp[0][0]), .rx_n(bn[0] | tn[0][0]));
  mil_bfm #(.B(B)) u_bfm1 (.clk, .tx_p(bp[1]), .tx_n(bn[1]), .rx_p(bp[1] | tp[1][1]), .rx_n(bn[1] | tn[1][1]));

  mil1553_channel #(.CLKS_PER_BIT(B), .IS_BC(1'b0), .RT_ADDR(5'd1), .MON_ADDR(5'd1), .PKT_WORDS(32)) u_rt (
    .clk, .rst_n, .ram_we_i(we[0]), .ram_addr_i(addr[0]), .ram_din_i(din[0]), .ram_dout_o(dout[0]),
    .write_done_i(wd[0]), .tx_len_i(txlen[0]), .trans_done_o(tdone[0]), .rx_valid_o(rxv[0]),
    .rx_bank_o(rxb[0]), .rx_len_o(rxl[0]), .bus_sel_i(1'b0), .tx_p_o(tp[0]), .tx_n_o(tn[0]),
    .rx_p_i({1'b0, bp[0] | tp[0][0]}), .rx_n_i({1'b0, bn[0] | tn[0][0]}),
    .ev_corrected_o(evc[0]), .ev_uncorr_o(evu[0]), .ev_pkt_o(evp[0]), .ev_msg_o(evm[0]), .ev_no_status_o(evns[0]));

  // the BC uses the reserve bus
  mil1553_channel #(.CLKS_PER_BIT(B), .IS_BC(1'b1), .TGT_ADDR(5'd1), .MON_ADDR(5'd1), .PKT_WORDS(47)) u_bc (
    .clk, .rst_n, .ram_we_i(we[1]), .ram_addr_i(addr[1]), .ram_din_i(din[1]), .ram_dout_o(dout[1]),
    .write_done_i(wd[1]), .tx_len_i(txlen[1]), .trans_done_o(tdone[1]), .rx_valid_o(rxv[1]),
    .rx_bank_o(rxb[1]), .rx_len_o(rxl[1]), .bus_sel_i(1'b1), .tx_p_o(tp[1]), .tx_n_o(tn[1]),
    .rx_p_i({bp[1] | tp[1][1], 1'b0}), .rx_n_i({bn[1] | tn[1][1], 1'b0}),
    .ev_corrected_o(evc[1]), .ev_uncorr_o(evu[1]), .ev_pkt_o(evp[1]), .ev_msg_o(evm[1]), .ev_no_status_o(evns[1]));

  int n_corr = 0, n_pkt [2] = '{0, 0}, n_tdone [2] = '{0, 0}, n_ns = 0;
  always @(posedge clk) if (rst_n) begin
    if (evc[0]) n_corr++;
    for (int k = 0; k < 2; k++) begin
      if (evp[k]) n_pkt[k]++;
      if (tdone[k]) n_tdone[k]++;
    end
    if (evns[1]) n_ns++;
  end

  task automatic ram_write(input int k, input int a, input logic [15:0] d);
    @(negedge clk); we[k] = 1; addr[k] = 8'(a); din[k] = d;
    @(negedge clk); we[k] = 0;
  endtask
  task automatic ram_read(input int k, input int a, output logic [15:0] d);
    @(negedge clk); addr[k] = 8'(a);
    @(negedge clk); d = dout[k];
  endtask
  task automatic wait_clks(input int n); repeat (n) @(negedge clk); endtask
  task automatic clear0(); u_bfm0.rw.delete(); u_bfm0.rc.delete(); u_bfm0.rok.delete(); endtask
  task automatic clear1(); u_bfm1.rw.delete(); u_bfm1.rc.delete(); u_bfm1.rok.delete(); endtask

  logic [15:0] pk [47];
  logic [15:0] rd;

  initial begin
    for (int k = 0; k < 2; k++) begin we[k] = 0; addr[k] = 0; din[k] = 0; wd[k] = 0; txlen[k] = 0; end
    wait_clks(3); rst_n = 1; wait_clks(3);

    // ===== RT role =====
    // 1. BC -> RT1 receive, 32 words
    foreach (pk[i]) pk[i] = 16'($urandom);
    clear0();
    u_bfm0.send(1, {5'd1, 1'b0, 5'd3, 5'd0});
    for (int i = 0; i < 32; i++) u_bfm0.send(0, pk[i]);
    u_bfm0.idle(40 * B);
    check("RT status after receive", u_bfm0.rw.size() >= 34 && u_bfm0.rc[33] && u_bfm0.rok[33] &&
                                     u_bfm0.rw[33][15:11] == 5'd1);
    check("RT packet flag", rxv[0] && rxl[0] == 7'd32 && n_pkt[0] == 1);
    begin
      logic okp = 1;
      for (int i = 0; i < 32; i++) begin
        ram_read(0, (rxb[0] ? 192 : 128) + i, rd);
        if (rd != pk[i]) okp = 0;
      end
      check("RT packet contents", okp);
    end
    // 2. one corrupted code bit in word 5: corrected, answered
    clear0();
    foreach (pk[i]) pk[i] = 16'($urandom);
    u_bfm0.send(1, {5'd1, 1'b0, 5'd3, 5'd0});
    for (int i = 0; i < 32; i++) u_bfm0.send(0, pk[i], (i == 5) ? 23'h000400 : 23'h0);
    u_bfm0.idle(40 * B);
    check("RT corrected word counted", n_corr == 1);
    check("RT answered corrected message", u_bfm0.rw.size() >= 34 && u_bfm0.rc[33]);
    begin
      ram_read(0, (rxb[0] ? 192 : 128) + 5, rd);
      check("RT corrected word stored", rd == pk[5] && n_pkt[0] == 2);
    end
    // 3. double error: discarded, no status
    clear0();
    u_bfm0.send(1, {5'd1, 1'b0, 5'd3, 5'd0});
    for (int i = 0; i < 32; i++) u_bfm0.send(0, 16'h1234, (i == 7) ? 23'h000410 : 23'h0);
    u_bfm0.idle(60 * B);
    check("RT silent after double error", u_bfm0.rw.size() == 33 && n_pkt[0] == 2);
    // 4. message to another RT: ignored
    clear0();
    u_bfm0.send(1, {5'd4, 1'b0, 5'd3, 5'd2});
    u_bfm0.send(0, 16'h1111); u_bfm0.send(0, 16'h2222);
    u_bfm0.idle(60 * B);
    check("RT ignores other address", u_bfm0.rw.size() == 3);
    // 5. transmit command: status + 5 words from the transmit area
    for (int i = 0; i < 5; i++) ram_write(0, i, 16'hA000 + 16'(i));
    clear0();
    u_bfm0.send(1, {5'd1, 1'b1, 5'd3, 5'd5});
    u_bfm0.idle(200 * B);
    check("RT transmit response length", u_bfm0.rw.size() == 7);
    if (u_bfm0.rw.size() == 7) begin
      check("RT transmit status", u_bfm0.rc[1] && u_bfm0.rw[1][15:11] == 5'd1);
      for (int i = 0; i < 5; i++)
        check("RT transmit data", !u_bfm0.rc[2 + i] && u_bfm0.rok[2 + i] && u_bfm0.rw[2 + i] == 16'hA000 + 16'(i));
    end
    check("RT trans_done", n_tdone[0] == 1);

    // ===== BC role =====
    foreach (pk[i]) pk[i] = 16'($urandom);
    for (int i = 0; i < 47; i++) ram_write(1, i, pk[i]);
    clear1();
    @(negedge clk); wd[1] = 1; txlen[1] = 7'd47; @(negedge clk); wd[1] = 0;
    begin
      int t1;
      // act as RT 1: answer each message with a status word
      for (int m = 0; m < 2; m++) begin
        int n, tstart;
        n = (m == 0) ? 32 : 15;
        tstart = -1;
        while (u_bfm1.rw.size() < 1 + n) begin
          @(negedge clk);
          if (tstart < 0 && (tp[1][1] ^ tn[1][1])) tstart = $time / 10;
          if (tp[1][1] ^ tn[1][1]) t1 = $time / 10 + 1;
        end
        check("BC command word", u_bfm1.rc[0] && u_bfm1.rok[0] &&
              u_bfm1.rw[0] == {5'd1, 1'b0, 5'd1, 5'(n == 32 ? 0 : n)});
        begin
          logic okd = 1;
          for (int i = 0; i < n; i++)
            if (u_bfm1.rc[1 + i] || !u_bfm1.rok[1 + i] || u_bfm1.rw[1 + i] != pk[m * 32 + i]) okd = 0;
          check("BC data words", okd);
        end
        check("BC message time (1+n) x 26 bit times",
              t1 - tstart >= (1 + n) * 26 * B - 2 && t1 - tstart <= (1 + n) * 26 * B + 2);
        u_bfm1.idle(5 * B);
        clear1();
        u_bfm1.send(1, {5'd1, 11'd0});      // STA
        u_bfm1.idle(B);
        clear1();
      end
      wait_clks(30 * B);
      check("BC trans_done after two messages", n_tdone[1] == 1 && n_ns == 0);
    end
    // missing status: one resend, then the controller moves on
    clear1();
    @(negedge clk); wd[1] = 1; txlen[1] = 7'd3; @(negedge clk); wd[1] = 0;
    wait_clks(2 * (4 * 26 * B + 70 * B));
    check("BC reports missing status", n_ns == 2 && n_tdone[1] == 2);
    check("BC resends the message once", u_bfm1.rw.size() == 8 && u_bfm1.rc[0] && u_bfm1.rc[4] &&
          u_bfm1.rw[4] == u_bfm1.rw[0] && u_bfm1.rw[0] == {5'd1, 1'b0, 5'd1, 5'd3});
    // the resend is answered
    clear1();
    @(negedge clk); wd[1] = 1; txlen[1] = 7'd2; @(negedge clk); wd[1] = 0;
    while (u_bfm1.rw.size() < 6) @(negedge clk);
    u_bfm1.idle(5 * B);
    u_bfm1.send(1, {5'd1, 11'd0});
    u_bfm1.idle(40 * B);
    check("BC resend answered", n_ns == 3 && n_tdone[1] == 3);

    // ===== monitor merge: 32 + 15 word pair to RT 1 from another controller =====
    wait_clks(40 * B);
    clear1();
    foreach (pk[i]) pk[i] = 16'($urandom);
    u_bfm1.send(1, {5'd1, 1'b0, 5'd2, 5'd0});
    for (int i = 0; i < 32; i++) u_bfm1.send(0, pk[i]);
    u_bfm1.idle(8 * B);
    check("no packet after first session", n_pkt[1] == 0);
    u_bfm1.send(1, {5'd1, 1'b0, 5'd2, 5'd15});
    for (int i = 0; i < 15; i++) u_bfm1.send(0, pk[32 + i]);
    u_bfm1.idle(8 * B);
    check("merged packet", n_pkt[1] == 1 && rxv[1] && rxl[1] == 7'd47);
    begin
      logic okp = 1;
      for (int i = 0; i < 47; i++) begin
        ram_read(1, (rxb[1] ? 192 : 128) + i, rd);
        if (rd != pk[i]) okp = 0;
      end
      check("merged packet contents", okp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog: bfm1 words %0d, bc state %0d", u_bfm1.rw.size(), u_bc.cst);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
