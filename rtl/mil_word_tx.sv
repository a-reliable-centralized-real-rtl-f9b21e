// mil_word_tx - MIL-STD-1553B word transmitter with extended Hamming protection.
//
// A 16-bit word is extended with its odd parity bit (bit 16), encoded by hamming_enc into a
// 23-bit code word and sent as a Manchester II bit stream after a three-bit-time sync: command
// and status words use the positive-then-negative sync, data words the negative-then-positive
// sync, each level held 1.5 bit times. A logic 1 is sent high-then-low, a logic 0 low-then-high,
// so every bit has a transition at its midpoint. Code bit 22 goes first. A word lasts 26 bit
// times (3 sync + 23 code bits), 26 us at 1 Mbit/s, against 20 us for a plain 1553 word; the
// 26 us figure and the Manchester II format follow the published measurements, the sync shapes
// and bit order come from MIL-STD-1553B itself, the transmit order of code bits is this
// design's choice.
//
// Interface: when ready_o is high, start_i loads data_i/cmd_sync_i. ready_o is also high in
// the last clock of a word, so words can be sent back to back without a gap. The line is a
// differential pair (tx_p_o, tx_n_o); both low means the transmitter is inhibited (bus idle).
module mil_word_tx
  import daq_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 50   // 50 MHz system clock / 1 Mbit/s
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic        cmd_sync_i,   // 1: command/status sync, 0: data sync
  input  logic [15:0] data_i,
  output logic        ready_o,
  output logic        busy_o,
  output logic        tx_p_o,
  output logic        tx_n_o
);
  localparam int unsigned HALF = CLKS_PER_BIT / 2;
  localparam int unsigned NHALF = 6 + 2 * HAM_N;   // half-bit slots per word (sync = 6 halves)

  logic [HAM_N-1:0] code;
  logic [4:0]       unused_chk;
  logic             unused_par;
  hamming_enc u_enc (.data_i({~^data_i, data_i}), .check_o(unused_chk), .par_o(unused_par),
                     .code_o(code));

  logic [HAM_N-1:0] sh;         // code bits, MSB first
  logic             sync_pos;
  logic             active;
  logic [$clog2(NHALF+1)-1:0] slot;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;
  logic             lvl;

  wire last_clk = active && (slot == NHALF - 1) && (cnt == HALF - 1);
  assign ready_o = !active || last_clk;
  assign busy_o  = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      slot     <= '0;
      cnt      <= '0;
      sh       <= '0;
      sync_pos <= 1'b0;
    end else if (start_i && ready_o) begin
      active   <= 1'b1;
      slot     <= '0;
      cnt      <= '0;
      sh       <= code;
      sync_pos <= cmd_sync_i;
    end else if (active) begin
      if (cnt == HALF - 1) begin
        cnt <= '0;
        if (slot == NHALF - 1) active <= 1'b0;
        else begin
          slot <= slot + 1'b1;
          // shift after the second half of each code bit
          if (slot >= 6 && slot[0] == 1'b1) sh <= {sh[HAM_N-2:0], 1'b0};
        end
      end else cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    if (slot < 3)      lvl = sync_pos;
    else if (slot < 6) lvl = ~sync_pos;
    else               lvl = slot[0] ? ~sh[HAM_N-1] : sh[HAM_N-1];
  end

  assign tx_p_o = active & lvl;
  assign tx_n_o = active & ~lvl;
endmodule
