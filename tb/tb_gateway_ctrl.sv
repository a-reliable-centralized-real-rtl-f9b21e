// tb_gateway_ctrl - self-checking test of the gateway controller with behavioural channel
// buffers (one-clock read latency) and a behavioural Ethernet transmitter that reads the
// payload bytes.
//
// Downstream: a command for each channel is written into the command buffer; the words must
// land in that channel's transmit area only, followed by its WRITE_DONE with the count.
// Upstream: channels hold packets in bank 0 or 1 (RS_422_1 a short one, MIL_BC2 none); at the
// cycle tick the 314-byte payload must hold the six slots in frame order with zero padding.
// A tick while the transmitter is still busy must be reported as an overrun. The cycle period
// is checked between two frames.
module tb_gateway_ctrl;
  import daq_pkg::*;
  localparam int CYC = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input string what, input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  logic cmd_we, cmd_valid, tx_start, tx_busy, evd, evf, evo;
  logic [6:0] cmd_addr, cmd_len, ch_tx_len;
  logic [15:0] cmd_data, ch_din;
  logic [2:0] cmd_ch;
  logic [10:0] tx_len, pl_addr;
  logic [7:0] pl_data;
  logic [NUM_CH-1:0] ch_we, ch_wd, rxv, rxb;
  logic [7:0] ch_addr;
  logic [15:0] ch_dout [NUM_CH];
  logic [6:0] rxl [NUM_CH];

  gateway_ctrl #(.CYCLE_CLKS(CYC)) dut (
    .clk, .rst_n, .cmd_we_i(cmd_we), .cmd_addr_i(cmd_addr), .cmd_data_i(cmd_data),
    .cmd_valid_i(cmd_valid), .cmd_ch_i(cmd_ch), .cmd_len_i(cmd_len),
    .tx_start_o(tx_start), .tx_len_o(tx_len), .pl_addr_i(pl_addr), .pl_data_o(pl_data),
    .tx_busy_i(tx_busy), .ch_we_o(ch_we), .ch_addr_o(ch_addr), .ch_din_o(ch_din),
    .ch_dout_i(ch_dout), .ch_write_done_o(ch_wd), .ch_tx_len_o(ch_tx_len),
    .ch_rx_valid_i(rxv), .ch_rx_bank_i(rxb), .ch_rx_len_i(rxl),
    .ev_dispatch_o(evd), .ev_frame_o(evf), .ev_overrun_o(evo));

  // behavioural channel buffers
  logic [15:0] cmem [NUM_CH][256];
  int n_wd [NUM_CH];
  logic [6:0] wd_len [NUM_CH];
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NUM_CH; k++) begin
      ch_dout[k] <= cmem[k][ch_addr];
      if (ch_we[k]) cmem[k][ch_addr] <= ch_din;
      if (ch_wd[k]) begin n_wd[k]++; wd_len[k] = ch_tx_len; end
    end
  end
  // behavioural transmitter: reads len bytes, one per clock
  logic [7:0] pay [$];
  int n_frames = 0, n_overrun = 0, t_frame [$];
  logic hold_busy = 0;
  initial begin
    tx_busy = 0; pl_addr = 0;
    forever begin
      @(posedge clk);
      if (rst_n && tx_start) begin
        int n;
        n = tx_len;
        t_frame.push_back($time / 10);
        pay.delete();
        #1 tx_busy = 1;
        for (int i = 0; i <= n; i++) begin
          if (i < n) pl_addr = 11'(i);
          @(posedge clk);
          if (i > 0) pay.push_back(pl_data);
          #1;
        end
        while (hold_busy) @(posedge clk);
        #1 tx_busy = 0;
        n_frames++;
      end
    end
  end
  always @(posedge clk) if (rst_n && evo) n_overrun++;

  int base [NUM_CH] = '{0, 18, 50, 62, 109, 125};
  int slot [NUM_CH] = '{18, 32, 12, 47, 16, 32};

  initial begin
    cmd_we = 0; cmd_valid = 0; cmd_addr = 0; cmd_data = 0; cmd_ch = 0; cmd_len = 0;
    rxv = '0; rxb = '0;
    foreach (rxl[k]) rxl[k] = 0;
    foreach (n_wd[k]) n_wd[k] = 0;
    for (int k = 0; k < NUM_CH; k++) for (int a = 0; a < 256; a++) cmem[k][a] = 16'hDEAD;
    repeat (3) @(negedge clk); rst_n = 1;
    // ---- downstream ----
    for (int k = 0; k < NUM_CH; k++) begin
      int n;
      logic ok;
      n = 3 + 7 * k;
      for (int i = 0; i < n; i++) begin
        @(negedge clk); cmd_we = 1; cmd_addr = 7'(i); cmd_data = 16'(k * 256 + i);
      end
      @(negedge clk); cmd_we = 0; cmd_valid = 1; cmd_ch = 3'(k); cmd_len = 7'(n);
      @(negedge clk); cmd_valid = 0;
      repeat (n + 10) @(negedge clk);
      check("write_done to the addressed channel", n_wd[k] == 1 && wd_len[k] == 7'(n));
      ok = 1;
      for (int i = 0; i < n; i++) if (cmem[k][i] != 16'(k * 256 + i)) ok = 0;
      for (int j = 0; j < NUM_CH; j++) if (j != k && cmem[j][0] != (j < k ? 16'(j * 256) : 16'hDEAD)) ok = 0;
      check("words in the addressed transmit area only", ok);
    end
    // ---- upstream ----
    for (int k = 0; k < NUM_CH; k++) begin
      rxb[k] = k[0];
      for (int i = 0; i < 64; i++) cmem[k][(k[0] ? 192 : 128) + i] = 16'(16'h1000 * (k + 1) + i);
      rxl[k] = 7'(slot[k]);
      rxv[k] = (k != CH_MIL_BC2);
    end
    rxl[CH_RS422_1] = 7'd5;
    while (n_frames == 0) @(negedge clk);
    check("payload 314 bytes", pay.size() == 314);
    if (pay.size() == 314) begin
      logic ok = 1;
      for (int k = 0; k < NUM_CH; k++)
        for (int i = 0; i < slot[k]; i++) begin
          logic [15:0] e, g;
          e = (!rxv[k] || i >= rxl[k]) ? 16'h0000 : 16'(16'h1000 * (k + 1) + i);
          g = {pay[2 * (base[k] + i)], pay[2 * (base[k] + i) + 1]};
          if (e != g) begin ok = 0; $display("slot %0d word %0d got %h exp %h", k, i, g, e); end
        end
      check("slots in frame order with padding", ok);
    end
    while (n_frames == 1) @(negedge clk);
    check("processing cycle period", t_frame.size() == 2 && t_frame[1] - t_frame[0] == CYC);
    // overrun: keep the transmitter busy over a tick
    hold_busy = 1;
    repeat (3 * CYC) @(negedge clk);
    hold_busy = 0;
    check("overrun reported", n_overrun >= 1);
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
