// uart_tx - asynchronous serial transmitter for an RS-422/485 line.
//
// Frame: one start bit (0), 8 data bits LSB first, one stop bit (1); the line idles at 1.
// Format and rate are this design's choice (8N1, 115200 baud at 50 MHz): the published
// design states only that RS-422 runs asynchronous serial transmission. start_i is taken
// when ready_o is high; ready_o returns after the stop bit.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  input  logic [7:0] data_i,
  output logic       ready_o,
  output logic       txd_o
);
  logic [9:0] sh;
  logic [3:0] nbit;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;
  logic active;
  assign ready_o = !active;
  assign txd_o   = active ? sh[0] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '1; nbit <= '0; cnt <= '0; active <= 1'b0;
    end else if (!active) begin
      if (start_i) begin
        sh <= {1'b1, data_i, 1'b0}; nbit <= '0; cnt <= '0; active <= 1'b1;
      end
    end else if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
      cnt <= '0;
      sh  <= {1'b1, sh[9:1]};
      if (nbit == 4'd9) active <= 1'b0;
      else nbit <= nbit + 1'b1;
    end else cnt <= cnt + 1'b1;
  end
endmodule
