// xbar_type1: Type I switch of the layered crossbar, for one EXU input.
//
// Selects one of the three other EXUs of the same half of the cluster
// (sel = 0..2, in index order) or the output of the Type II switch (sel = 3),
// which reaches the input buses and the other half. Purely combinational.
module xbar_type1
  import paddi_pkg::*;
(
  input  logic [W-1:0] nbr [3],
  input  logic [W-1:0] t2,
  input  logic [1:0]   sel,
  output logic [W-1:0] dout
);
  assign dout = (sel == 2'd3) ? t2 : nbr[sel];
endmodule
