// tb_arinc - self-checking test of the ARINC-429 word transmitter and receiver.
//
// The testbench decodes the transmitted RZ waveform itself (pulse in the first half of each
// bit, NULL in the second, bit 1 first, odd parity in bit 32, 32 bit times plus a 4 bit time
// gap per word) and checks the receiver on the same line: good words, a word with a
// corrupted bit (parity error, rejected) and a truncated word (rejected).
module tb_arinc;
  localparam int B = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, ready, hi, lo, ihi, ilo, force_hi, force_lo, blank;
  logic [30:0] data;
  logic vld, ok;
  logic [31:0] word;
  int checks = 0, failures = 0;
  task automatic check(input string what, input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  arinc_tx #(.CLKS_PER_BIT(B)) u_tx (.clk, .rst_n, .start_i(start), .data_i(data), .ready_o(ready),
                                     .line_hi_o(hi), .line_lo_o(lo));
  assign ihi = blank ? 1'b0 : (force_hi ? lo : hi);
  assign ilo = blank ? 1'b0 : (force_hi ? hi : lo);
  arinc_rx #(.GAP_CLKS(2 * B)) u_rx (.clk, .rst_n, .line_hi_i(ihi), .line_lo_i(ilo),
                                     .word_valid_o(vld), .word_ok_o(ok), .word_o(word));
  logic [31:0] got [$];
  logic        gok [$];
  always @(posedge clk) if (rst_n && vld) begin got.push_back(word); gok.push_back(ok); end

  task automatic send(input logic [30:0] d);
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1; data = d;
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    logic [31:0] seen;
    logic okw;
    int tw;
    start = 0; data = 0; force_hi = 0; force_lo = 0; blank = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // waveform check
    for (int n = 0; n < 5; n++) begin
      logic [30:0] d;
      d = 31'($urandom);
      fork
        send(d);
        begin
          okw = 1;
          while (!(hi | lo)) @(negedge clk);
          for (int i = 0; i < 32; i++) begin
            repeat (B / 4) @(negedge clk);
            if (hi == lo) okw = 0;
            seen[i] = hi;
            repeat (B / 2) @(negedge clk);
            if (hi | lo) okw = 0;                 // NULL in the second half
            repeat (B / 4) @(negedge clk);
          end
          tw = 0;
          while (!ready) begin @(negedge clk); tw++; end
        end
      join
      check("RZ waveform", okw);
      check("bits and odd parity", seen[30:0] == d && seen[31] == ~^d);
      check("gap 4 bit times", tw >= 4 * B - 2 && tw <= 4 * B + 2);
    end
    repeat (4 * B) @(negedge clk);
    check("receiver good words", got.size() == 5 && gok[0] && gok[4]);
    got.delete(); gok.delete();
    // corrupted bit: swap the lines during bit 9
    fork
      send(31'h1234567);
      begin
        while (!(hi | lo)) @(negedge clk);
        repeat (9 * B) @(negedge clk);
        force_hi = 1; repeat (B) @(negedge clk); force_hi = 0;
      end
    join
    repeat (40 * B) @(negedge clk);
    check("parity error rejected", got.size() == 1 && !gok[0]);
    got.delete(); gok.delete();
    // truncated word: line blanked after 20 bits
    fork
      send(31'h7654321);
      begin
        while (!(hi | lo)) @(negedge clk);
        repeat (20 * B) @(negedge clk);
        blank = 1; repeat (16 * B) @(negedge clk); blank = 0;
      end
    join
    repeat (8 * B) @(negedge clk);
    check("short word rejected", got.size() == 1 && !gok[0]);
    got.delete(); gok.delete();
    send(31'h0ABCDEF);
    repeat (40 * B) @(negedge clk);
    check("word after errors", got.size() == 1 && gok[0] && got[0] == {~^31'h0ABCDEF, 31'h0ABCDEF});
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
