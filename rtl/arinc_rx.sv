// arinc_rx - ARINC-429 word receiver (the RX "ARINC driver").
//
// Every bit of an ARINC-429 word starts with a pulse on line_hi_i (a 1) or line_lo_i (a 0);
// the receiver takes a bit on each rising pulse, so it follows the sender's rate without
// configuration. Bits are collected LSB first (bit 1 = label bit first). When the line has
// been NULL for GAP_CLKS clocks the word is closed: exactly 32 bits with odd parity make
// word_ok_o high; a wrong count or parity sets it low. word_valid_o pulses once per closed
// word. Inputs are synchronised with two flip-flops. Only words with word_ok_o are used
// further on ("only verified payload data is forwarded").
module arinc_rx #(
  parameter int unsigned GAP_CLKS = 1000     // 2 bit times at 100 kbit/s, 50 MHz
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        line_hi_i,
  input  logic        line_lo_i,
  output logic        word_valid_o,
  output logic        word_ok_o,
  output logic [31:0] word_o
);
  logic [2:0] hi_s, lo_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin hi_s <= '0; lo_s <= '0; end
    else begin hi_s <= {hi_s[1:0], line_hi_i}; lo_s <= {lo_s[1:0], line_lo_i}; end
  end
  wire rise_hi = hi_s[1] && !hi_s[2];
  wire rise_lo = lo_s[1] && !lo_s[2];

  logic [31:0] sh;
  logic [5:0]  nbit;
  logic [$clog2(GAP_CLKS+1)-1:0] idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; nbit <= '0; idle <= '0;
      word_valid_o <= 1'b0; word_ok_o <= 1'b0; word_o <= '0;
    end else begin
      word_valid_o <= 1'b0;
      if (rise_hi || rise_lo) begin
        idle <= '0;
        if (nbit < 6'd33) nbit <= nbit + 1'b1;
        sh <= {rise_hi, sh[31:1]};
      end else if (nbit != '0) begin
        if (idle == ($bits(idle))'(GAP_CLKS)) begin
          word_valid_o <= 1'b1;
          word_ok_o    <= (nbit == 6'd32) && (^sh == 1'b1);
          word_o       <= sh;
          nbit         <= '0;
          idle         <= '0;
        end else idle <= idle + 1'b1;
      end
    end
  end
endmodule
