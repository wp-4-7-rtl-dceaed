// eprom_model: behavioural model of a byte-wide EPROM for the testbenches.
// Asynchronous read: data follows the address after TACC time units. The
// contents are written by the testbench through the 'mem' array.
module eprom_model #(
  parameter int AW   = 11,
  parameter int TACC = 30
) (
  input  logic [AW-1:0] addr,
  output logic [7:0]    data
);
  logic [7:0] mem [2**AW];
  initial for (int k = 0; k < 2**AW; k++) mem[k] = 8'hFF;
  always @(addr) data <= #(TACC) mem[addr];
endmodule
