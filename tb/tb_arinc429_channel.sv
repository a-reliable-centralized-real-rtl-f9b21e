// tb_arinc429_channel - self-checking test of the ARINC-429 channel with its TX line looped
// back to its RX line. 32 16-bit words (16 ARINC words) written through the buffer port are
// sent after WRITE_DONE; TRANS_DONE must follow after 16 x 36 bit times. The receive side
// must deliver them as one packet with the parity bit in bit 32. A word damaged on the line
// is not stored, so the next packet is completed by later words.
module tb_arinc429_channel;
  localparam int B = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we, wd, tdone, rxv, rxb, thi, tlo, swap;
  logic [7:0] addr;
  logic [15:0] din, dout;
  logic [6:0] txlen, rxl;
  logic evok, evbad, evpkt;
  int checks = 0, failures = 0, n_bad = 0, n_pkt = 0, n_td = 0;
  task automatic check(input string what, input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask
  arinc429_channel #(.CLKS_PER_BIT(B), .PKT_WORDS(32)) dut (
    .clk, .rst_n, .ram_we_i(we), .ram_addr_i(addr), .ram_din_i(din), .ram_dout_o(dout),
    .write_done_i(wd), .tx_len_i(txlen), .trans_done_o(tdone), .rx_valid_o(rxv), .rx_bank_o(rxb),
    .rx_len_o(rxl), .a429_tx_hi_o(thi), .a429_tx_lo_o(tlo),
    .a429_rx_hi_i(swap ? tlo : thi), .a429_rx_lo_i(swap ? thi : tlo),
    .ev_word_ok_o(evok), .ev_word_bad_o(evbad), .ev_pkt_o(evpkt));
  always @(posedge clk) if (rst_n) begin
    if (evbad) n_bad++;
    if (evpkt) n_pkt++;
    if (tdone) n_td++;
  end
  task automatic ram_write(input int a, input logic [15:0] d);
    @(negedge clk); we = 1; addr = 8'(a); din = d; @(negedge clk); we = 0;
  endtask
  task automatic ram_read(input int a, output logic [15:0] d);
    @(negedge clk); addr = 8'(a); @(negedge clk); d = dout;
  endtask
  logic [15:0] w [32];
  initial begin
    int t0, t1;
    logic [15:0] rd;
    logic okp;
    we = 0; wd = 0; addr = 0; din = 0; txlen = 0; swap = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    foreach (w[i]) w[i] = 16'($urandom);
    for (int i = 0; i < 32; i++) ram_write(i, w[i]);
    @(negedge clk); wd = 1; txlen = 7'd32; @(negedge clk); wd = 0;
    t0 = $time / 10;
    while (n_td == 0) @(negedge clk);
    t1 = $time / 10;
    check("16 words x 36 bit times", t1 - t0 >= 16 * 36 * B && t1 - t0 <= 16 * 36 * B + 16 * 6);
    repeat (4 * B) @(negedge clk);
    check("packet complete", n_pkt == 1 && rxv && rxl == 7'd32);
    okp = 1;
    for (int i = 0; i < 16; i++) begin
      logic [31:0] sent;
      logic [15:0] h, l;
      sent = {~^{w[2*i][14:0], w[2*i+1]}, w[2*i][14:0], w[2*i+1]};
      ram_read((rxb ? 192 : 128) + 2 * i, h);
      ram_read((rxb ? 192 : 128) + 2 * i + 1, l);
      if ({h, l} != sent) okp = 0;
    end
    check("packet contents with parity", okp);
    // damaged word: swap the lines during bit 3 of the second word
    fork
      begin @(negedge clk); wd = 1; txlen = 7'd32; @(negedge clk); wd = 0; end
      begin
        repeat (36 * B + 3 * B + 4) @(negedge clk);
        swap = 1; repeat (B) @(negedge clk); swap = 0;
      end
    join
    while (n_td == 1) @(negedge clk);
    repeat (4 * B) @(negedge clk);
    check("damaged word rejected", n_bad == 1 && n_pkt == 1);
    // one more word completes the second packet
    @(negedge clk); wd = 1; txlen = 7'd2; @(negedge clk); wd = 0;
    while (n_td == 2) @(negedge clk);
    repeat (4 * B) @(negedge clk);
    check("second packet after 16 good words", n_pkt == 2);
    ram_read((rxb ? 192 : 128) + 0, rd);
    check("second packet starts with word 0", rd == {~^{w[0][14:0], w[1]}, w[0][14:0]});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
