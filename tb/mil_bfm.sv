// mil_bfm - behavioural MIL-STD-1553B terminal for testbenches (not synthesizable).
//
// Drives one differential pair with words coded as in this design (sync, extended Hamming
// (23,17) code word, Manchester II, code bit 22 first) and decodes every word it sees on the
// pair it watches. The coding is written here from the code definition (data bits at the
// non power-of-two positions, check bits making the XOR of the 1-based positions of all ones
// zero, even overall parity), independently of the RTL encoder and decoder.
module mil_bfm #(
  parameter int B = 8            // clocks per bit
)(
  input  logic clk,
  output logic tx_p,
  output logic tx_n,
  input  logic rx_p,
  input  logic rx_n
);
  int dpos [17] = '{2, 4, 5, 6, 8, 9, 10, 11, 12, 13, 14, 16, 17, 18, 19, 20, 21};

  function automatic logic [22:0] enc(input logic [15:0] w);
    logic [22:0] c = '0;
    logic [16:0] d = {~^w, w};
    int s = 0;
    for (int k = 0; k < 17; k++) c[dpos[k]] = d[k];
    for (int i = 0; i < 22; i++) if (c[i]) s ^= (i + 1);
    for (int j = 0; j < 5; j++) c[(1 << j) - 1] = s[j];
    c[22] = ^c[21:0];
    return c;
  endfunction

  // decoded words
  logic [15:0] rw [$];
  logic        rc [$];
  logic        rok [$];

  initial begin tx_p = 0; tx_n = 0; end

  task automatic drive(input logic lvl, input int clks);
    tx_p = lvl; tx_n = ~lvl;
    repeat (clks) @(negedge clk);
  endtask

  // send one word; flip inverts the listed code bits (line noise)
  task automatic send(input logic cmd, input logic [15:0] w, input logic [22:0] flip = '0);
    logic [22:0] c;
    c = enc(w) ^ flip;
    drive(cmd, 3 * B / 2);
    drive(~cmd, 3 * B / 2);
    for (int i = 22; i >= 0; i--) begin
      drive(c[i], B / 2);
      drive(~c[i], B / 2);
    end
  endtask

  task automatic idle(input int clks);
    tx_p = 0; tx_n = 0;
    repeat (clks) @(negedge clk);
  endtask

  // receiver: watches the rx pair; words may follow back to back
  initial begin
    logic s0, more;
    logic [22:0] c;
    forever begin
      @(negedge clk);
      more = rx_p ^ rx_n;
      if (more) repeat (B / 4) @(negedge clk);
      while (more) begin
        // here: a quarter bit into a sync
        s0 = rx_p;
        repeat (3 * B) @(negedge clk);       // first code bit, first quarter
        for (int i = 22; i >= 0; i--) begin
          c[i] = rx_p;
          repeat (B) @(negedge clk);
        end
        begin
          int s;
          logic [16:0] d;
          s = 0;
          for (int i = 0; i < 22; i++) if (c[i]) s ^= (i + 1);
          for (int k = 0; k < 17; k++) d[k] = c[dpos[k]];
          rw.push_back(d[15:0]);
          rc.push_back(s0);
          rok.push_back(s == 0 && ^c == 0 && ^d == 1'b1);
        end
        more = rx_p ^ rx_n;                  // a quarter bit into the next word, if any
      end
    end
  end
endmodule
