// mil_word_rx - MIL-STD-1553B word receiver: sync detection, Manchester II decoding and
// extended Hamming correction.
//
// The receiver watches the differential pair (rx_p_i, rx_n_i); the bus is active when the two
// differ and its level is rx_p_i. A sync is a level held 1.5 bit times (accepted within
// +/-0.25 bit time) followed by the opposite level: positive first marks a command/status word,
// negative first a data word. From the sync's middle transition the 23 code bits are sampled
// at 1/4 and 3/4 of each bit time; the first sample is the bit, equal samples are a Manchester
// error. The code word goes through hamming_dec in the same cycle, so a single-bit error is
// corrected without delay; double errors, Manchester errors and a wrong 1553 parity make the
// word invalid (word_ok_o low). Sampling is timed from the sync only, with no re-alignment on
// each mid-bit transition (this design's choice; adequate for the +/-0.1% clock tolerance of the
// standard over 26 bit times). After the last bit the receiver re-arms at once, so words that
// follow back to back are received.
//
// Outputs are registered and held; word_valid_o pulses one clock, about 0.25 bit time after the
// end of the word.
module mil_word_rx
  import daq_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 50
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_p_i,
  input  logic        rx_n_i,
  output logic        word_valid_o,
  output logic        word_ok_o,
  output logic        cmd_sync_o,
  output logic [15:0] word_o,
  output logic [HAM_N-1:0] code_o,       // word as received
  output logic [HAM_N-1:0] corrected_o,
  output logic [4:0]  err_loc_o,
  output logic        err_1bit_o,
  output logic        err_2bit_o,
  output logic        parity_ok_o,
  output logic        manch_err_o
);
  localparam int unsigned B    = CLKS_PER_BIT;
  localparam int unsigned SYNC_MIN = (3 * B) / 2 - B / 4;
  localparam int unsigned SYNC_MAX = (3 * B) / 2 + B / 4;
  localparam int unsigned FIRST = (3 * B) / 2 + B / 4;   // sync edge -> first sample
  localparam int unsigned CW = $clog2(4 * B + 1);

  typedef enum logic [2:0] {S_IDLE, S_SYNC1, S_DATA, S_TAIL, S_WAITIDLE} st_e;
  st_e st;

  logic act, lvl;
  logic [1:0] p_s, n_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin p_s <= '0; n_s <= '0; end
    else begin p_s <= {p_s[0], rx_p_i}; n_s <= {n_s[0], rx_n_i}; end
  end
  assign act = p_s[1] ^ n_s[1];
  assign lvl = p_s[1];

  logic [CW-1:0]  cnt;
  logic           l0;
  logic           half;        // 0: next sample is first half, 1: second half
  logic           samp_a;
  logic [4:0]     nbit;
  logic [HAM_N-1:0] sh;
  logic           merr;

  logic [HAM_N-1:0] dec_corr;
  logic [HAM_D-1:0] dec_data;
  logic [15:0]      dec_word;
  logic [4:0]       dec_syn;
  logic             dec_e1, dec_e2, dec_pok;
  logic [HAM_N-1:0] code_in;
  logic             last_bit;
  assign last_bit = (nbit == 5'(HAM_N - 1));
  assign code_in = {sh[HAM_N-2:0], samp_a};

  hamming_dec u_dec (.code_i(code_in), .corrected_o(dec_corr), .data_o(dec_data),
                     .word_o(dec_word), .syndrome_o(dec_syn), .err_1bit_o(dec_e1),
                     .err_2bit_o(dec_e2), .parity_ok_o(dec_pok));
  logic unused_d16;
  assign unused_d16 = dec_data[16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; l0 <= 1'b0; half <= 1'b0; samp_a <= 1'b0; nbit <= '0;
      sh <= '0; merr <= 1'b0;
      word_valid_o <= 1'b0; word_ok_o <= 1'b0; cmd_sync_o <= 1'b0; word_o <= '0;
      code_o <= '0; corrected_o <= '0; err_loc_o <= '0; err_1bit_o <= 1'b0;
      err_2bit_o <= 1'b0; parity_ok_o <= 1'b0; manch_err_o <= 1'b0;
    end else begin
      word_valid_o <= 1'b0;
      case (st)
        S_IDLE: if (act) begin
          st <= S_SYNC1; l0 <= lvl; cnt <= CW'(1);
        end
        S_SYNC1: begin
          if (!act) st <= S_IDLE;
          else if (lvl != l0) begin
            if (cnt >= CW'(SYNC_MIN) && cnt <= CW'(SYNC_MAX)) begin
              st <= S_DATA; cnt <= CW'(FIRST - 1); half <= 1'b0; nbit <= '0; merr <= 1'b0;
            end else st <= S_WAITIDLE;
          end else if (cnt > CW'(SYNC_MAX)) st <= S_WAITIDLE;
          else cnt <= cnt + 1'b1;
        end
        S_DATA: begin
          if (cnt != '0) cnt <= cnt - 1'b1;
          else if (!half) begin
            samp_a <= lvl; half <= 1'b1; cnt <= CW'(B / 2 - 1);
          end else begin
            half <= 1'b0;
            if (last_bit) begin
              // whole code word in: decode and publish
              word_valid_o <= 1'b1;
              cmd_sync_o   <= l0;
              code_o       <= code_in;
              corrected_o  <= dec_corr;
              word_o       <= dec_word;
              err_loc_o    <= dec_syn;
              err_1bit_o   <= dec_e1;
              err_2bit_o   <= dec_e2;
              parity_ok_o  <= dec_pok;
              manch_err_o  <= merr | (lvl == samp_a) | !act;
              word_ok_o    <= !(merr | (lvl == samp_a) | !act) && !dec_e2 && dec_pok;
              st  <= S_TAIL;
              cnt <= CW'(B / 4);
            end else begin
              if (lvl == samp_a || !act) merr <= 1'b1;
              sh   <= code_in;
              nbit <= nbit + 1'b1;
              cnt  <= CW'(B / 2 - 1);
            end
          end
        end
        S_TAIL: begin
          if (cnt != '0) cnt <= cnt - 1'b1;
          else if (act) begin st <= S_SYNC1; l0 <= lvl; cnt <= CW'(1); end
          else st <= S_IDLE;
        end
        default: if (!act) st <= S_IDLE;   // S_WAITIDLE
      endcase
    end
  end
endmodule
