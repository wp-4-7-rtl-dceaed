// shifter: logarithmic arithmetic right shifter on the B operand path.
//
// Shifts the operand right by 0..15 places in four stages of 1, 2, 4 and 8
// places (a logarithmic shifter), filling with the sign bit when sgn = 1 and
// with zeros otherwise. When the EXU is the low half of a linked 32-bit pair
// (link_lo = 1) the bits shifted in at the top come from the high half's
// operand (hi_in), so the pair shifts one 32-bit word. A high half shifts
// its own 16 bits, which is already the top of the 32-bit result.
// The logarithmic structure and the arithmetic right shift follow the
// architecture description; the 4-bit shift amount is this design's choice.
// Purely combinational.
module shifter
  import paddi_pkg::*;
#(
  parameter int WIDTH = W
) (
  input  logic [WIDTH-1:0] din,
  input  logic [WIDTH-1:0] hi_in,    // partner's operand when link_lo
  input  logic             link_lo,
  input  logic             sgn,
  input  logic [3:0]       shamt,
  output logic [WIDTH-1:0] dout
);

  // Stage s works on a double-width word {upper, lower}; only lower is kept.
  logic [2*WIDTH-1:0] st [0:4];
  logic [WIDTH-1:0]   upper;

  always_comb begin
    if (link_lo) upper = hi_in;
    else         upper = {WIDTH{sgn & din[WIDTH-1]}};
    st[0] = {upper, din};
    for (int s = 0; s < 4; s++) begin
      if (shamt[s]) st[s+1] = st[s] >> (1 << s);
      else          st[s+1] = st[s];
    end
    dout = st[4][WIDTH-1:0];
  end

endmodule
