// tb_eth_mac - self-checking test of the Ethernet transmitter and receiver.
//
// The transmitter sends control frames whose payload comes from a testbench memory with a
// one-clock read latency; the testbench parses the byte stream itself (preamble, delimiter,
// addresses, type, payload, padding to 46 bytes, CRC-32 computed bit by bit here, frame length)
// and loops it into the receiver, which must report the command (channel, count) and write
// the words to the command buffer port. Frames with one corrupted byte (in the payload and in
// the destination address) must be rejected.
module tb_eth_mac;
  import daq_pkg::*;
  localparam logic [47:0] MAC = 48'h02_00_00_00_15_53;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, txen, rxdv, corrupt;
  logic [10:0] len, pla;
  logic [7:0] pld, txd, rxd;
  logic cwe, cvalid, bad;
  logic [6:0] caddr, clen;
  logic [15:0] cdata;
  logic [2:0] cch;
  logic [7:0] pmem [2048];
  int checks = 0, failures = 0, n_valid = 0, n_bad = 0;
  int corrupt_at;
  task automatic check(input string what, input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask
  eth_tx_mac #(.SRC_MAC(48'h02_00_00_00_00_99), .DST_MAC(MAC)) u_tx (
    .clk, .rst_n, .start_i(start), .len_i(len), .pl_addr_o(pla), .pl_data_i(pld),
    .busy_o(busy), .done_o(done), .txd_o(txd), .tx_en_o(txen));
  always_ff @(posedge clk) pld <= pmem[pla];
  int byte_no;
  always @(posedge clk) if (!txen) byte_no <= 0; else byte_no <= byte_no + 1;
  assign rxd  = (corrupt && byte_no == corrupt_at) ? txd ^ 8'h01 : txd;
  assign rxdv = txen;
  eth_rx_mac #(.OWN_MAC(MAC)) u_rx (.clk, .rst_n, .rxd_i(rxd), .rx_dv_i(rxdv),
    .cmd_we_o(cwe), .cmd_addr_o(caddr), .cmd_data_o(cdata), .cmd_valid_o(cvalid),
    .cmd_ch_o(cch), .cmd_len_o(clen), .ev_bad_o(bad));
  logic [15:0] cbuf [128];
  always @(posedge clk) if (rst_n) begin
    if (cwe) cbuf[caddr] <= cdata;
    if (cvalid) n_valid++;
    if (bad) n_bad++;
  end
  // captured frame
  logic [7:0] fr [$];
  always @(posedge clk) if (rst_n && txen) fr.push_back(txd);

  function automatic logic [31:0] crc_bitwise(input logic [7:0] q [$], input int from, input int to);
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

  task automatic send_frame(input int nbytes);
    @(negedge clk); start = 1; len = 11'(nbytes); @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    start = 0; len = 0; corrupt = 0; corrupt_at = 0;
    repeat (3) @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
    for (int f = 0; f < 2; f++) begin
      int nw, nb, plen;
      logic [31:0] fcs;
      logic okh;
      nw = (f == 0) ? 5 : 47;
      nb = 2 + 2 * nw;
      pmem[0] = (f == 0) ? 8'd3 : 8'd1;
      pmem[1] = 8'(nw);
      for (int i = 0; i < 2 * nw; i++) pmem[2 + i] = 8'($urandom);
      fr.delete();
      send_frame(nb);
      plen = (nb < 46) ? 46 : nb;
      check("frame length", fr.size() == 8 + 14 + plen + 4);
      okh = 1;
      for (int i = 0; i < 7; i++) if (fr[i] != 8'h55) okh = 0;
      if (fr[7] != 8'hD5) okh = 0;
      for (int i = 0; i < 6; i++) if (fr[8 + i] != MAC[47 - 8 * i -: 8]) okh = 0;
      if (fr[20] != 8'h88 || fr[21] != 8'hB5) okh = 0;
      check("preamble, address, type", okh);
      okh = 1;
      for (int i = 0; i < plen; i++) if (fr[22 + i] != ((i < nb) ? pmem[i] : 8'h00)) okh = 0;
      check("payload and padding", okh);
      fcs = crc_bitwise(fr, 8, 22 + plen);
      check("FCS", {fr[22 + plen + 3], fr[22 + plen + 2], fr[22 + plen + 1], fr[22 + plen]} == fcs);
      repeat (4) @(negedge clk);
      check("command decoded", n_valid == f + 1 && cch == 3'(pmem[0]) && clen == 7'(nw));
      okh = 1;
      for (int i = 0; i < nw; i++) if (cbuf[i] != {pmem[2 + 2 * i], pmem[3 + 2 * i]}) okh = 0;
      check("command words", okh);
    end
    // corrupted frame
    corrupt = 1; corrupt_at = 30;
    send_frame(12);
    corrupt = 0;
    repeat (4) @(negedge clk);
    check("bad CRC rejected", n_valid == 2 && n_bad == 1);
    corrupt = 1; corrupt_at = 9;
    send_frame(12);
    corrupt = 0;
    repeat (4) @(negedge clk);
    check("bad address rejected", n_valid == 2 && n_bad == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
