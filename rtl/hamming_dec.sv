// hamming_dec - extended Hamming (23,17) decoder: single-error correction, double-error
// detection, for the MIL-STD-1553B receive path.
//
// The syndrome is the XOR of the 1-based positions of all set bits in 0..21; the overall
// parity is the XOR of all 23 bits. Overall parity wrong: a single error, at position
// `syndrome` (or in the overall parity bit itself when the syndrome is 0); that bit is inverted
// in the same cycle and err_1bit_o is set. Syndrome non-zero with correct overall parity: a
// double error; err_2bit_o is set and the word passes through uncorrected. This case split
// follows the published description and its two ILA captures (single error at location 5,
// double error giving location 0x0E). A syndrome above 22 with wrong parity cannot be a single
// error and is also reported as err_2bit_o (this design's choice). After correction the 1553
// odd parity of the 17-bit word is checked (parity_ok_o). Purely combinational.
module hamming_dec
  import daq_pkg::*;
(
  input  logic [HAM_N-1:0] code_i,       // DATA_ENCODER_RX / DATA_RECEIVED[22:0]
  output logic [HAM_N-1:0] corrected_o,  // DATA_CORRECT[22:0]
  output logic [HAM_D-1:0] data_o,       // DATA_RX_VERIFIED[16:0]
  output logic [15:0]      word_o,       // WORD_DATA[15:0]
  output logic [4:0]       syndrome_o,   // ERR_LOCATION[4:0]
  output logic             err_1bit_o,
  output logic             err_2bit_o,
  output logic             parity_ok_o   // PARITY_RESULT: 1553 odd parity holds
);
  always_comb begin
    logic [4:0] s;
    logic       ovl;
    logic [HAM_N-1:0] c;
    int unsigned k;
    s = '0;
    for (int unsigned pos = 1; pos <= 22; pos++)
      if (code_i[pos-1]) s ^= 5'(pos);
    ovl = ^code_i;
    c = code_i;
    err_1bit_o = 1'b0;
    err_2bit_o = 1'b0;
    if (ovl) begin
      if (s == 5'd0) begin
        c[22] = ~c[22];
        err_1bit_o = 1'b1;
      end else if (s <= 5'd22) begin
        c[s-1] = ~c[s-1];
        err_1bit_o = 1'b1;
      end else begin
        err_2bit_o = 1'b1;
      end
    end else if (s != 5'd0) begin
      err_2bit_o = 1'b1;
    end
    k = 0;
    data_o = '0;
    for (int unsigned pos = 1; pos <= 22; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        data_o[k] = c[pos-1];
        k++;
      end
    end
    corrected_o = c;
    syndrome_o  = s;
    word_o      = data_o[15:0];
    parity_ok_o = ^data_o;   // odd parity over 16 data bits + parity bit
  end
endmodule
