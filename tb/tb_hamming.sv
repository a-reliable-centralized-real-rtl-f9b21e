// tb_hamming - self-checking test of the extended Hamming (23,17) encoder and decoder.
//
// Checks the published example code word (data 0x06001 -> 0x0C000C), the published
// single-error capture (0x0C001C: location 5, corrected to 0x0C000C) and double-error capture
// (0x0C041C: location 0x0E, flagged, not corrected), then random words with no, one and two
// flipped bits against a reference built from the position table of the code. Three flipped
// bits, the limit of the code, must never come out as the word that was sent: the decoder
// either "corrects" them into a different code word, with err_1bit set, or flags them; both
// outcomes must occur, and which one is predicted from the bit positions.
module tb_hamming;
  import daq_pkg::*;
  logic [16:0] d;
  logic [4:0]  chk;
  logic        par;
  logic [22:0] code, rx, corr;
  logic [16:0] dout;
  logic [15:0] word;
  logic [4:0]  syn;
  logic        e1, e2, pok;
  int checks = 0, failures = 0;
  int n_mis = 0, n_flag = 0;

  hamming_enc u_enc (.data_i(d), .check_o(chk), .par_o(par), .code_o(code));
  hamming_dec u_dec (.code_i(rx), .corrected_o(corr), .data_o(dout), .word_o(word),
                     .syndrome_o(syn), .err_1bit_o(e1), .err_2bit_o(e2), .parity_ok_o(pok));

  // reference: data bit k sits at this bit index
  int dpos [17] = '{2, 4, 5, 6, 8, 9, 10, 11, 12, 13, 14, 16, 17, 18, 19, 20, 21};

  function automatic logic [22:0] ref_enc(input logic [16:0] x);
    logic [22:0] c = '0;
    for (int k = 0; k < 17; k++) c[dpos[k]] = x[k];
    // choose check bits so that the XOR of the 1-based positions of all ones is zero
    begin
      int s = 0;
      for (int i = 0; i < 22; i++) if (c[i]) s ^= (i + 1);
      for (int j = 0; j < 5; j++) c[(1 << j) - 1] = s[j];
    end
    c[22] = ^c[21:0];
    return c;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    // published example
    d = 17'h06001; rx = 23'h0c001c; #1;
    check("enc example", code == 23'h0c000c);
    check("1bit err flag", e1 && !e2);
    check("1bit location", syn == 5'd5);
    check("1bit corrected", corr == 23'h0c000c);
    check("1bit data", dout == 17'h06001);
    rx = 23'h0c041c; #1;
    check("2bit flags", !e1 && e2);
    check("2bit location", syn == 5'h0e);
    check("2bit uncorrected", corr == 23'h0c041c);
    rx = 23'h0c000c; #1;
    check("clean", !e1 && !e2 && syn == 0 && corr == 23'h0c000c);

    for (int n = 0; n < 4000; n++) begin
      logic [22:0] ref_c;
      int a, b, c3, sref;
      d = 17'($urandom);
      d[16] = ~^d[15:0];   // a proper 1553 word: odd parity
      #1;
      ref_c = ref_enc(d);
      check("enc random", code == ref_c && chk == {ref_c[15], ref_c[7], ref_c[3], ref_c[1], ref_c[0]}
                          && par == ref_c[22]);
      a = $urandom_range(0, 22);
      b = (a + $urandom_range(1, 22)) % 23;
      c3 = $urandom_range(0, 22);
      while (c3 == a || c3 == b) c3 = $urandom_range(0, 22);
      case (n % 4)
        0: begin rx = ref_c; #1;
           check("dec clean", !e1 && !e2 && dout == d && word == d[15:0] && pok); end
        1: begin rx = ref_c ^ (23'd1 << a); #1;
           check("dec single", e1 && !e2 && corr == ref_c && dout == d && pok &&
                 (a == 22 ? syn == 0 : syn == 5'(a + 1))); end
        2: begin rx = ref_c ^ (23'd1 << a) ^ (23'd1 << b); #1;
           check("dec double", e2 && !e1 && corr == rx); end
        default: begin
           rx = ref_c ^ (23'd1 << a) ^ (23'd1 << b) ^ (23'd1 << c3); #1;
           sref = 0;
           if (a < 22) sref ^= a + 1;
           if (b < 22) sref ^= b + 1;
           if (c3 < 22) sref ^= c3 + 1;
           if (sref > 22) begin
             n_flag++;
             check("dec triple flagged", e2 && !e1 && corr == rx);
           end else begin
             n_mis++;
             check("dec triple miscorrected", e1 && !e2 && corr != ref_c && ref_enc(dout) == corr);
           end
        end
      endcase
    end
    check("triple errors: both outcomes seen", n_mis > 0 && n_flag > 0);
    // 1553 parity check of the verified word
    d = 17'h00000; #1; rx = code; #1;
    check("parity result on bad 1553 parity", !pok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
