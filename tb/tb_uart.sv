// tb_uart - self-checking test of the 8N1 serial transmitter and receiver: the testbench
// samples the transmitted frame itself (start bit, 8 data bits LSB first, stop bit, 10 bit
// times), checks received bytes on loopback, and a frame with a broken stop bit.
module tb_uart;
  localparam int B = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, ready, txd, line, brk;
  logic [7:0] data, rb;
  logic rv, fe;
  int checks = 0, failures = 0;
  task automatic check(input string what, input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask
  uart_tx #(.CLKS_PER_BIT(B)) u_tx (.clk, .rst_n, .start_i(start), .data_i(data), .ready_o(ready), .txd_o(txd));
  assign line = brk ? 1'b0 : txd;
  uart_rx #(.CLKS_PER_BIT(B)) u_rx (.clk, .rst_n, .rxd_i(line), .byte_valid_o(rv), .frame_err_o(fe), .byte_o(rb));
  logic [7:0] got [$];
  logic gfe [$];
  always @(posedge clk) if (rst_n && rv) begin got.push_back(rb); gfe.push_back(fe); end
  task automatic send(input logic [7:0] d);
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1; data = d;
    @(negedge clk);
    start = 0;
  endtask
  initial begin
    start = 0; data = 0; brk = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      logic [7:0] d, s;
      logic st, sp;
      int len;
      d = 8'($urandom);
      fork
        send(d);
        begin
          while (txd) @(negedge clk);
          len = 0;
          repeat (B / 2) @(negedge clk);
          st = txd;
          for (int i = 0; i < 8; i++) begin repeat (B) @(negedge clk); s[i] = txd; end
          repeat (B) @(negedge clk);
          sp = txd;
          while (!ready) begin @(negedge clk); len++; end
        end
      join
      check("frame bits", !st && sp && s == d);
      check("frame length", len >= B / 2 - 2 && len <= B / 2 + 2);
      repeat (2 * B) @(negedge clk);
      check("loopback byte", got.size() == 1 && got[0] == d && !gfe[0]);
      got.delete(); gfe.delete();
    end
    fork
      send(8'hA5);
      begin
        while (txd) @(negedge clk);
        repeat (9 * B) @(negedge clk);
        brk = 1; repeat (B + B / 2) @(negedge clk); brk = 0;
      end
    join
    repeat (3 * B) @(negedge clk);
    check("framing error", got.size() >= 1 && gfe[0]);
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
