// sdp_ram - simple dual-port block RAM: one write port, one synchronous read port.
//
// Written as a plain array so that synthesis maps it onto on-chip block RAM; replacing the
// external RAM of earlier 1553 boards by on-chip block RAM is a central point of this design.
// The read port returns mem[rd_addr_i] one clock after the address (block RAM read latency).
// A read and a write of the same address in one clock return the old contents.
// Contents are not reset; every reader in this design only reads locations written before.
module sdp_ram #(
  parameter int unsigned DW = 16,
  parameter int unsigned AW = 7
)(
  input  logic          clk,
  input  logic          we_i,
  input  logic [AW-1:0] wr_addr_i,
  input  logic [DW-1:0] wr_data_i,
  input  logic [AW-1:0] rd_addr_i,
  output logic [DW-1:0] rd_data_o
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we_i) mem[wr_addr_i] <= wr_data_i;
    rd_data_o <= mem[rd_addr_i];
  end
endmodule
