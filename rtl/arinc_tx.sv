// arinc_tx - ARINC-429 word transmitter (the TX "ARINC driver").
//
// Sends one 32-bit ARINC-429 word in bipolar return-to-zero form on two logic lines: for a 1
// line_hi_o pulses during the first half of the bit time, for a 0 line_lo_o does; both are low
// in the second half (the NULL level). Bit 1 of the word (data_i[0], the first label bit) goes
// first; bit 32 is the odd parity bit, generated here over bits 1..31. After each word the line
// stays NULL for GAP_BITS bit times before ready_o returns. The rate, the parity and the gap
// are fixed in hardware, as the published design pre-configures them; their values (100 kbit/s,
// odd parity, 4 bit gap) are those of the ARINC-429 standard.
module arinc_tx #(
  parameter int unsigned CLKS_PER_BIT = 500,   // 50 MHz / 100 kbit/s
  parameter int unsigned GAP_BITS     = 4
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic [30:0] data_i,     // ARINC bits 1..31 (label in [7:0])
  output logic        ready_o,
  output logic        line_hi_o,
  output logic        line_lo_o
);
  localparam int unsigned NB = 32 + GAP_BITS;
  logic [31:0] sh;
  logic        active;
  logic [$clog2(NB+1)-1:0] nbit;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;

  assign ready_o = !active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; active <= 1'b0; nbit <= '0; cnt <= '0;
    end else if (!active) begin
      if (start_i) begin
        sh <= {~^data_i, data_i};
        active <= 1'b1; nbit <= '0; cnt <= '0;
      end
    end else if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
      cnt <= '0;
      sh  <= {1'b0, sh[31:1]};
      if (nbit == ($bits(nbit))'(NB - 1)) active <= 1'b0;
      else nbit <= nbit + 1'b1;
    end else cnt <= cnt + 1'b1;
  end

  wire first_half = active && (nbit < 32) && (cnt < ($bits(cnt))'(CLKS_PER_BIT / 2));
  assign line_hi_o = first_half &&  sh[0];
  assign line_lo_o = first_half && !sh[0];
endmodule
