// tb_daq_rates - the collection module at its default parameters under periodic traffic at
// the source rates: BC2 broadcasts a 12-word packet every 20 ms (50 Hz), BC1 sends its 47
// words as a 32 + 15 word pair every 50 ms (20 Hz), and a bus controller sends 32 words to
// RT1 every 20 ms. Every word carries its packet's sequence number in the high byte and its
// index in the low byte.
//
// Eight 20 ms frames are parsed. Each MIL slot must hold one whole packet (one sequence
// number, indices in order: no torn or mixed packets); consecutive frames must carry
// consecutive BC2 and RT1 packets (nothing lost at 50 Hz); the BC1 slot must always show the
// latest BC1 packet, each one in two or three frames. No cycle may overrun and no word may
// need repair on a clean line. Runs about 8 million clocks (160 ms).
module tb_daq_rates;
  import daq_pkg::*;
  localparam int B = 50;
  localparam int CYC = 1_000_000;
  localparam int SLOT_BASE [3] = '{18, 50, 62};   // RT1, BC2, BC1 slot starts in the frame
  localparam int SLOT_LEN [3] = '{32, 12, 47};

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input string what, input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  logic [7:0]      eth_txd_o;
  logic            eth_tx_en_o;
  logic [2:0][1:0] mil_tx_p_o, mil_tx_n_o, mil_rx_p_i, mil_rx_n_i;
  logic            a429_tx_hi_o, a429_tx_lo_o;
  logic [1:0]      rs422_txd_o;
  daq_events_t     ev_o;
  logic [2:0]      bp, bn;

  vessel_daq_top dut (
    .clk, .rst_n, .eth_txd_o, .eth_tx_en_o, .eth_rxd_i(8'h00), .eth_rx_dv_i(1'b0),
    .mil_bus_sel_i(3'b000), .mil_tx_p_o, .mil_tx_n_o, .mil_rx_p_i, .mil_rx_n_i,
    .a429_tx_hi_o, .a429_tx_lo_o, .a429_rx_hi_i(1'b0), .a429_rx_lo_i(1'b0),
    .rs422_txd_o, .rs422_rxd_i(2'b11), .ev_o);

  mil_bfm #(.B(B)) u_rt1 (.clk, .tx_p(bp[0]), .tx_n(bn[0]), .rx_p(mil_rx_p_i[0][0]), .rx_n(mil_rx_n_i[0][0]));
  mil_bfm #(.B(B)) u_bc2 (.clk, .tx_p(bp[1]), .tx_n(bn[1]), .rx_p(mil_rx_p_i[1][0]), .rx_n(mil_rx_n_i[1][0]));
  mil_bfm #(.B(B)) u_bc1 (.clk, .tx_p(bp[2]), .tx_n(bn[2]), .rx_p(mil_rx_p_i[2][0]), .rx_n(mil_rx_n_i[2][0]));
  for (genvar k = 0; k < 3; k++) begin : g_bus
    assign mil_rx_p_i[k] = {1'b0, bp[k] | mil_tx_p_o[k][0]};
    assign mil_rx_n_i[k] = {1'b0, bn[k] | mil_tx_n_o[k][0]};
  end

  // payload of every frame
  logic [7:0] fb [$];
  logic [15:0] frames [$][FRAME_WORDS];
  logic prev_en = 0;
  always @(posedge clk) if (rst_n) begin
    if (eth_tx_en_o) fb.push_back(eth_txd_o);
    else if (prev_en) begin
      logic [15:0] f [FRAME_WORDS];
      if (fb.size() == 8 + 14 + 2 * FRAME_WORDS + 4) begin
        for (int i = 0; i < FRAME_WORDS; i++) f[i] = {fb[22 + 2 * i], fb[23 + 2 * i]};
        frames.push_back(f);
      end else failures++;
      fb.delete();
    end
    prev_en = eth_tx_en_o;
  end

  // packet and fault events
  int n_pkt [3] = '{0, 0, 0};
  int n_bad = 0;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 3; c++) if (ev_o.mil_pkt[c]) n_pkt[c]++;
    if (ev_o.overrun || ev_o.mil_uncorr != '0 || ev_o.mil_corrected != '0) n_bad++;
  end

  // sources
  initial begin
    repeat (5) @(negedge clk); rst_n = 1;
    fork
      begin   // BC2: 50 Hz broadcast
        repeat (300_000) @(negedge clk);
        for (int s = 1; s <= 8; s++) begin
          u_bc2.send(1, {5'd31, 1'b0, 5'd3, 5'd12});
          for (int i = 0; i < 12; i++) u_bc2.send(0, {8'(s), 8'(i)});
          u_bc2.idle(CYC - 13 * 26 * B);
        end
      end
      begin   // RT1: 32 words every 20 ms, status replies ignored
        repeat (500_000) @(negedge clk);
        for (int s = 1; s <= 8; s++) begin
          u_rt1.send(1, {5'd1, 1'b0, 5'd3, 5'd0});
          for (int i = 0; i < 32; i++) u_rt1.send(0, {8'(s), 8'(i)});
          u_rt1.idle(CYC - 33 * 26 * B);
        end
      end
      begin   // BC1: 32 + 15 words every 50 ms
        repeat (700_000) @(negedge clk);
        for (int s = 1; s <= 4; s++) begin
          u_bc1.send(1, {5'd1, 1'b0, 5'd2, 5'd0});
          for (int i = 0; i < 32; i++) u_bc1.send(0, {8'(s), 8'(i)});
          u_bc1.idle(100 * B);
          u_bc1.send(1, {5'd1, 1'b0, 5'd2, 5'd15});
          for (int i = 32; i < 47; i++) u_bc1.send(0, {8'(s), 8'(i)});
          u_bc1.idle(2 * CYC + CYC / 2 - 50 * 26 * B);
        end
      end
    join_none
    while (frames.size() < 8) @(negedge clk);
    // frame k is sent at (k + 1) * 20 ms; frame 0 precedes all traffic
    // frame k leaves at (k + 1) * 20 ms; BC2 and RT1 packets arrive at 6 and 10 ms into each
    // period, BC1 packets at 14, 64, 114, 164 ms
    for (int k = 0; k < 8; k++) begin
      int seq [3];
      for (int c = 0; c < 3; c++) begin
        logic ok;
        ok = 1;
        seq[c] = int'(frames[k][SLOT_BASE[c]][15:8]);
        for (int i = 0; i < SLOT_LEN[c]; i++)
          if (frames[k][SLOT_BASE[c] + i] != {8'(seq[c]), 8'(i)}) ok = 0;
        check($sformatf("frame %0d slot %0d holds one whole packet", k, c), ok);
      end
      $display("frame %0d: RT1 packet %0d, BC2 packet %0d, BC1 packet %0d", k, seq[0], seq[1], seq[2]);
      check($sformatf("frame %0d: BC2 packet %0d", k, k + 1), seq[1] == k + 1);
      check($sformatf("frame %0d: RT1 packet %0d", k, k + 1), seq[0] == k + 1);
      check($sformatf("frame %0d: latest BC1 packet", k), seq[2] == ((k + 1) * 20 - 14) / 50 + 1);
    end
    check("8 RT1 and 8 BC2 packets, BC1 packets", n_pkt[0] == 8 && n_pkt[1] == 8 && n_pkt[2] >= 3);
    check("no overrun, no repaired or rejected word", n_bad == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (9_500_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
