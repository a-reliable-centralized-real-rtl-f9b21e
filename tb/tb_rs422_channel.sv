// tb_rs422_channel - self-checking test of the RS-422 channel. A serial model sends
// variable-length packets closed by the end-of-frame byte (even and odd byte counts, and one
// longer than the slot, which must be cut at 18 words and flagged); each must appear as one
// packet of the right length in the receive buffer. Then words written through the buffer
// port are sent after WRITE_DONE: the model decodes the bytes, checks the trailing
// end-of-frame byte and TRANS_DONE.
module tb_rs422_channel;
  localparam int B = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we, wd, tdone, rxv, rxb, txd, rxd, evp, evo;
  logic [7:0] addr;
  logic [15:0] din, dout;
  logic [6:0] txlen, rxl;
  int checks = 0, failures = 0, n_pkt = 0, n_ovf = 0, n_td = 0;
  task automatic check(input string what, input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask
  rs422_channel #(.CLKS_PER_BIT(B), .MAX_WORDS(18)) dut (
    .clk, .rst_n, .ram_we_i(we), .ram_addr_i(addr), .ram_din_i(din), .ram_dout_o(dout),
    .write_done_i(wd), .tx_len_i(txlen), .trans_done_o(tdone), .rx_valid_o(rxv), .rx_bank_o(rxb),
    .rx_len_o(rxl), .txd_o(txd), .rxd_i(rxd), .ev_pkt_o(evp), .ev_overflow_o(evo));
  always @(posedge clk) if (rst_n) begin
    if (evp) n_pkt++;
    if (evo) n_ovf++;
    if (tdone) n_td++;
  end
  task automatic ser_byte(input logic [7:0] b);
    rxd = 0; repeat (B) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (B) @(negedge clk); end
    rxd = 1; repeat (B) @(negedge clk);
  endtask
  task automatic ram_write(input int a, input logic [15:0] d);
    @(negedge clk); we = 1; addr = 8'(a); din = d; @(negedge clk); we = 0;
  endtask
  task automatic ram_read(input int a, output logic [15:0] d);
    @(negedge clk); addr = 8'(a); @(negedge clk); d = dout;
  endtask
  // serial decoder for the transmit line
  logic [7:0] tb_got [$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge clk);
      if (rst_n && !txd) begin
        repeat (B / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin repeat (B) @(negedge clk); b[i] = txd; end
        repeat (B) @(negedge clk);
        tb_got.push_back(b);
      end
    end
  end
  initial begin
    logic [7:0] by [$];
    logic [15:0] rd;
    int lens [3] = '{10, 7, 40};
    we = 0; wd = 0; addr = 0; din = 0; txlen = 0; rxd = 1;
    repeat (3) @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
    for (int p = 0; p < 3; p++) begin
      logic okp;
      int nw;
      by.delete();
      for (int i = 0; i < lens[p]; i++) by.push_back(8'($urandom_range(0, 8'hEF)));
      foreach (by[i]) ser_byte(by[i]);
      ser_byte(8'hF0);
      repeat (2 * B) @(negedge clk);
      nw = (lens[p] + 1) / 2;
      if (nw > 18) nw = 18;
      check("packet count", n_pkt == p + 1);
      check("packet length from end-of-frame bits", rxl == 7'(nw));
      okp = 1;
      for (int i = 0; i < nw; i++) begin
        logic [15:0] e;
        e = {by[2 * i], (2 * i + 1 < lens[p]) ? by[2 * i + 1] : 8'h00};
        ram_read((rxb ? 192 : 128) + i, rd);
        if (rd != e) okp = 0;
      end
      check("packet contents", okp);
    end
    check("overflow flagged", n_ovf > 0);
    // transmit 4 words
    for (int i = 0; i < 4; i++) ram_write(i, 16'h1020 + 16'(i * 16'h0101));
    tb_got.delete();
    @(negedge clk); wd = 1; txlen = 7'd4; @(negedge clk); wd = 0;
    while (n_td == 0) @(negedge clk);
    repeat (2 * B) @(negedge clk);
    check("tx byte count with trailer", tb_got.size() == 9);
    if (tb_got.size() == 9) begin
      logic okt = 1;
      for (int i = 0; i < 4; i++) begin
        logic [15:0] e;
        e = 16'h1020 + 16'(i * 16'h0101);
        if (tb_got[2 * i] != e[15:8] || tb_got[2 * i + 1] != e[7:0]) okt = 0;
      end
      check("tx bytes high first", okt);
      check("tx end-of-frame byte", tb_got[8][7:4] == 4'hF);
    end
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
