// hamming_enc - extended Hamming (23,17) encoder for the MIL-STD-1553B word.
//
// The 17 protected bits are the 16 data bits of a 1553 word plus its odd parity bit
// (DATA_TX[16] = parity, DATA_TX[15:0] = data). Five Hamming check bits sit at code positions
// 1, 2, 4, 8, 16 (bit indices 0, 1, 3, 7, 15); the data bits fill the remaining positions in
// order, d0 at index 2 up to d16 at index 21; index 22 holds an overall even parity over
// bits 0..21. This layout and the 5 + 1 check bits follow the published code-word figure;
// the use of even overall parity was chosen so that the published ILA example word 0x0C000C is
// a valid code word. Purely combinational: the code word is valid in the same cycle.
module hamming_enc
  import daq_pkg::*;
(
  input  logic [HAM_D-1:0] data_i,   // DATA_TX[16:0]
  output logic [4:0]       check_o,  // BITS_HAMMING_TX[4:0]
  output logic             par_o,    // overall parity (index 22)
  output logic [HAM_N-1:0] code_o    // DATA_ENCODER_TX[22:0]
);
  always_comb begin
    logic [HAM_N-1:0] c;
    int unsigned k;
    c = '0;
    k = 0;
    // place data bits at non power-of-two positions 3,5,6,7,9..15,17..22 (1-based)
    for (int unsigned pos = 1; pos <= 22; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        c[pos-1] = data_i[k];
        k++;
      end
    end
    // check bit j covers every position whose index has bit j set
    for (int unsigned j = 0; j < 5; j++) begin
      logic p;
      p = 1'b0;
      for (int unsigned pos = 1; pos <= 22; pos++)
        if (((pos >> j) & 1) == 1 && (pos & (pos - 1)) != 0) p ^= c[pos-1];
      c[(1 << j) - 1] = p;
      check_o[j] = p;
    end
    c[22]  = ^c[21:0];
    par_o  = c[22];
    code_o = c;
  end
endmodule
