// tb_vessel_daq_top - end-to-end test of the collection module at shortened timing.
//
// The top level runs with 8 clocks per 1553 bit, 16 per ARINC-429 and RS-422 bit and a
// 40,000-clock processing cycle, so that the whole scenario of daq_env (commands to every
// channel, traffic on every bus, checks of the outgoing frames and of every event) takes about
// 220,000 clocks. A second copy with a 200-clock cycle, shorter than one 314-byte frame, has
// idle inputs and must report processing-cycle overruns. daq_env prints the result.
module tb_vessel_daq_top;
  import daq_pkg::*;
  logic            clk, rst_n;
  logic [7:0]      eth_txd_o, eth_rxd_i;
  logic            eth_tx_en_o, eth_rx_dv_i;
  logic [2:0]      mil_bus_sel_i;
  logic [2:0][1:0] mil_tx_p_o, mil_tx_n_o, mil_rx_p_i, mil_rx_n_i;
  logic            a429_tx_hi_o, a429_tx_lo_o, a429_rx_hi_i, a429_rx_lo_i;
  logic [1:0]      rs422_txd_o, rs422_rxd_i;
  daq_events_t     ev_o, ev_fast;

  vessel_daq_top #(.MIL_CLKS_PER_BIT(8), .A429_CLKS_PER_BIT(16), .UART_CLKS_PER_BIT(16),
                   .CYCLE_CLKS(40_000)) dut (.*);

  vessel_daq_top #(.MIL_CLKS_PER_BIT(8), .A429_CLKS_PER_BIT(16), .UART_CLKS_PER_BIT(16),
                   .CYCLE_CLKS(200)) u_fast (
    .clk, .rst_n, .eth_txd_o(), .eth_tx_en_o(), .eth_rxd_i(8'h00), .eth_rx_dv_i(1'b0),
    .mil_bus_sel_i(3'b000), .mil_tx_p_o(), .mil_tx_n_o(), .mil_rx_p_i('0), .mil_rx_n_i('0),
    .a429_tx_hi_o(), .a429_tx_lo_o(), .a429_rx_hi_i(1'b0), .a429_rx_lo_i(1'b0),
    .rs422_txd_o(), .rs422_rxd_i(2'b11), .ev_o(ev_fast));

  daq_env #(.FULL(1'b0)) u_env (.*);

  // watchdog
  initial begin
    repeat (600_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", u_env.checks, u_env.failures + 1);
    $finish;
  end
endmodule
