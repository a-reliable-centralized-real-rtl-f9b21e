// tb_vessel_daq_top_full - the end-to-end test at full size.
//
// The top level is instantiated without parameter overrides: 50 MHz clock, 1 Mbit/s 1553
// buses, 100 kbit/s ARINC-429, 115200 baud RS-422 and a 20 ms (1,000,000-clock) processing
// cycle. daq_env runs the same scenario and checks as in tb_vessel_daq_top, except the
// overrun, which cannot occur with a 20 ms cycle. It runs about 2.1 million clocks.
module tb_vessel_daq_top_full;
  import daq_pkg::*;
  logic            clk, rst_n;
  logic [7:0]      eth_txd_o, eth_rxd_i;
  logic            eth_tx_en_o, eth_rx_dv_i;
  logic [2:0]      mil_bus_sel_i;
  logic [2:0][1:0] mil_tx_p_o, mil_tx_n_o, mil_rx_p_i, mil_rx_n_i;
  logic            a429_tx_hi_o, a429_tx_lo_o, a429_rx_hi_i, a429_rx_lo_i;
  logic [1:0]      rs422_txd_o, rs422_rxd_i;
  daq_events_t     ev_o, ev_fast;

  vessel_daq_top dut (.*);

  assign ev_fast = '0;
  daq_env #(.FULL(1'b1)) u_env (.*);

  // watchdog
  initial begin
    repeat (6_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", u_env.checks, u_env.failures + 1);
    $finish;
  end
endmodule
