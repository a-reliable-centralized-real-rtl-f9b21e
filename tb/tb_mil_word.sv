// tb_mil_word - self-checking test of the 1553 word transmitter and receiver.
//
// The transmitter drives the receiver through a line the testbench can corrupt. The
// testbench decodes the transmitted waveform itself (sync shape, Manchester halves, 23 code
// bits, data bits at their code positions) and checks the word length of 26 bit times. It
// then checks what the receiver delivers: clean words, words with one inverted code bit
// (corrected, ERR_1BIT), words with two inverted bits (rejected, ERR_2BIT) and a back-to-back
// burst.
module tb_mil_word;
  import daq_pkg::*;
  localparam int B = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, cmd, ready, busy, tp, tn;
  logic [15:0] data;
  logic flip;
  logic vld, ok, rcmd, e1, e2, pok, merr;
  logic [15:0] rword;
  logic [22:0] rcode, rcorr;
  logic [4:0]  rloc;
  int checks = 0, failures = 0;

  mil_word_tx #(.CLKS_PER_BIT(B)) u_tx (.clk, .rst_n, .start_i(start), .cmd_sync_i(cmd),
    .data_i(data), .ready_o(ready), .busy_o(busy), .tx_p_o(tp), .tx_n_o(tn));
  // line corruption swaps the pair, i.e. inverts the level
  mil_word_rx #(.CLKS_PER_BIT(B)) u_rx (.clk, .rst_n, .rx_p_i(flip ? tn : tp),
    .rx_n_i(flip ? tp : tn), .word_valid_o(vld), .word_ok_o(ok), .cmd_sync_o(rcmd),
    .word_o(rword), .code_o(rcode), .corrected_o(rcorr), .err_loc_o(rloc), .err_1bit_o(e1),
    .err_2bit_o(e2), .parity_ok_o(pok), .manch_err_o(merr));

  task automatic check(input string what, input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  int dpos [17] = '{2, 4, 5, 6, 8, 9, 10, 11, 12, 13, 14, 16, 17, 18, 19, 20, 21};

  // received-word log
  logic [15:0] got_w [$];
  logic        got_c [$], got_ok [$], got_e1 [$], got_e2 [$];
  always @(posedge clk) if (rst_n && vld) begin
    got_w.push_back(rword); got_c.push_back(rcmd); got_ok.push_back(ok);
    got_e1.push_back(e1);   got_e2.push_back(e2);
  end

  // waveform decoder: samples the transmitted line at the middle of each half bit
  task automatic sample_word(output logic sync_pos, output logic [22:0] c, output int len,
                             output logic manch_ok);
    logic h1, h2;
    int t0;
    while (!(tp ^ tn)) @(negedge clk);
    t0 = $time / 10;
    repeat (B / 4) @(negedge clk);
    sync_pos = tp;
    manch_ok = 1;
    repeat (B) @(negedge clk);  if (tp != sync_pos) manch_ok = 0;   // 1.25 bit: still first
    repeat (B) @(negedge clk);  if (tp == sync_pos) manch_ok = 0;   // 2.25 bit: second level
    repeat (B * 3 / 4 + B / 4) @(negedge clk);                        // 3.25 bit
    for (int i = 22; i >= 0; i--) begin
      h1 = tp;
      repeat (B / 2) @(negedge clk);
      h2 = tp;
      if (h1 == h2 || !(tp ^ tn)) manch_ok = 0;
      c[i] = h1;
      if (i > 0) repeat (B / 2) @(negedge clk);
    end
    while (tp ^ tn) @(negedge clk);
    len = $time / 10 - t0;
  endtask

  task automatic send(input logic c, input logic [15:0] w);
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1; cmd = c; data = w;
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    logic sp, mok;
    logic [22:0] cw;
    int len;
    logic [16:0] dd;
    start = 0; cmd = 0; data = 0; flip = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);

    // 1. waveform of a command word and of a data word
    for (int k = 0; k < 2; k++) begin
      logic [15:0] w;
      w = (k == 0) ? 16'h0C21 : 16'hBEEF;
      fork
        send(k == 0, w);
        sample_word(sp, cw, len, mok);
      join
      for (int i = 0; i < 17; i++) dd[i] = cw[dpos[i]];
      check("sync shape", sp == (k == 0));
      check("manchester halves", mok);
      check("data bits in code", dd[15:0] == w && dd[16] == ~^w);
      check("code parity", ^cw == 1'b0);
      check("word length 26 bit times", len >= 26 * B - 1 && len <= 26 * B + 1);
      repeat (3 * B) @(posedge clk);
    end
    check("rx clean 1", got_w.size() == 2 && got_w[0] == 16'h0C21 && got_c[0] && got_ok[0]
                       && got_w[1] == 16'hBEEF && !got_c[1] && got_ok[1]);
    got_w.delete(); got_c.delete(); got_ok.delete(); got_e1.delete(); got_e2.delete();

    // 2. single inverted code bit: corrected
    for (int n = 0; n < 20; n++) begin
      logic [15:0] w;
      int bitn;
      w = 16'($urandom);
      bitn = $urandom_range(0, 22);
      fork
        send(0, w);
        begin
          while (!(tp ^ tn)) @(posedge clk);
          repeat (3 * B + (22 - bitn) * B) @(posedge clk);
          flip = 1; repeat (B) @(posedge clk); flip = 0;
        end
      join
      while (busy) @(posedge clk);
      repeat (B) @(posedge clk);
      check("single error corrected", got_w.size() == 1 && got_w[0] == w && got_ok[0] &&
                                      got_e1[0] && !got_e2[0]);
      got_w.delete(); got_c.delete(); got_ok.delete(); got_e1.delete(); got_e2.delete();
      repeat (3 * B) @(posedge clk);
    end

    // 3. two inverted code bits: detected, word rejected
    for (int n = 0; n < 20; n++) begin
      logic [15:0] w;
      int b1;
      w = 16'($urandom);
      b1 = $urandom_range(2, 22);
      fork
        send(0, w);
        begin
          while (!(tp ^ tn)) @(posedge clk);
          repeat (3 * B + (22 - b1) * B) @(posedge clk);
          flip = 1; repeat (B) @(posedge clk); flip = 0;
          repeat (B) @(posedge clk);
          flip = 1; repeat (B) @(posedge clk); flip = 0;
        end
      join
      while (busy) @(posedge clk);
      repeat (B) @(posedge clk);
      check("double error rejected", got_w.size() == 1 && !got_ok[0] && got_e2[0] && !got_e1[0]);
      got_w.delete(); got_c.delete(); got_ok.delete(); got_e1.delete(); got_e2.delete();
      repeat (3 * B) @(posedge clk);
    end

    // 4. back-to-back burst: command then 31 data words, no gaps
    begin
      logic [15:0] ws [32];
      int t_start, t_end;
      foreach (ws[i]) ws[i] = 16'($urandom);
      t_start = -1;
      fork
        for (int i = 0; i < 32; i++) send(i == 0, ws[i]);
        begin
          while (!(tp ^ tn)) @(negedge clk);
          t_start = $time / 10;
          while (tp ^ tn) @(negedge clk);
          t_end = $time / 10;
        end
      join
      repeat (2 * B) @(posedge clk);
      check("burst continuous", t_end - t_start >= 32 * 26 * B - 2 && t_end - t_start <= 32 * 26 * B + 2);
      check("burst count", got_w.size() == 32);
      if (got_w.size() == 32)
        for (int i = 0; i < 32; i++)
          check("burst word", got_w[i] == ws[i] && got_c[i] == (i == 0) && got_ok[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
