// xbar_type2: Type II switch of the layered crossbar, for one EXU input.
//
// Selects one of the four EXUs of the other half of the cluster
// (sel = 0..3) or one of the four input buses (sel = 4..7). Its output feeds
// the Type I switch of the same EXU input. Purely combinational.
module xbar_type2
  import paddi_pkg::*;
(
  input  logic [W-1:0] other [4],
  input  logic [W-1:0] ibus  [NIBUS],
  input  logic [2:0]   sel,
  output logic [W-1:0] dout
);
  assign dout = sel[2] ? ibus[sel[1:0]] : other[sel[1:0]];
endmodule
