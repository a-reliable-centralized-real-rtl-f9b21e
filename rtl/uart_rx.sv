// uart_rx - asynchronous serial receiver for an RS-422/485 line.
//
// 8N1 frames (start, 8 data bits LSB first, stop). The input is synchronised, a falling edge
// starts a frame, the start bit is confirmed at its middle and every following bit is sampled
// at its middle. byte_valid_o pulses with the byte once the stop bit has been sampled;
// frame_err_o is high with it when the stop bit was 0 (the byte is then not used).
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd_i,
  output logic       byte_valid_o,
  output logic       frame_err_o,
  output logic [7:0] byte_o
);
  logic [1:0] s;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s <= 2'b11; else s <= {s[0], rxd_i};
  wire rx = s[1];

  logic active;
  logic [3:0] nbit;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;
  logic [7:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; nbit <= '0; cnt <= '0; sh <= '0;
      byte_valid_o <= 1'b0; frame_err_o <= 1'b0; byte_o <= '0;
    end else begin
      byte_valid_o <= 1'b0;
      if (!active) begin
        if (!rx) begin active <= 1'b1; nbit <= '0; cnt <= ($bits(cnt))'(CLKS_PER_BIT / 2 - 1); end
      end else if (cnt != '0) cnt <= cnt - 1'b1;
      else begin
        cnt <= ($bits(cnt))'(CLKS_PER_BIT - 1);
        if (nbit == 4'd0) begin
          if (rx) active <= 1'b0;        // glitch, not a start bit
          else nbit <= 4'd1;
        end else if (nbit <= 4'd8) begin
          sh   <= {rx, sh[7:1]};
          nbit <= nbit + 1'b1;
        end else begin
          active       <= 1'b0;
          byte_valid_o <= 1'b1;
          frame_err_o  <= !rx;
          byte_o       <= sh;
        end
      end
    end
  end
endmodule
