// csel_adder: carry-select adder.
//
// The operands are cut into BLK-bit blocks. Every block above the first adds
// its bits twice, once for a carry-in of 0 and once for 1, and the real carry
// from the block below picks one sum and one carry-out, so the carry path is
// one multiplexer per block instead of one full adder per bit. Besides the
// sum and carry-out it gives the carry into the top bit, which the arithmetic
// unit needs to detect two's complement overflow. The use of a carry-select
// adder follows the architecture description; the 4-bit block size is this
// design's choice. Purely combinational.
module csel_adder #(
  parameter int WIDTH = 16,
  parameter int BLK   = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             c_msb   // carry into bit WIDTH-1
);

  localparam int NB = (WIDTH + BLK - 1) / BLK;

  logic cy;
  logic c_top;
  logic [BLK:0] s0 [NB];
  logic [BLK:0] s1 [NB];
  logic [NB*BLK-1:0] ae, be, se;

  assign ae = (NB*BLK)'(a);
  assign be = (NB*BLK)'(b);

  always_comb begin
    cy = cin;
    for (int i = 0; i < NB; i++) begin
      s0[i] = {1'b0, ae[i*BLK +: BLK]} + {1'b0, be[i*BLK +: BLK]};
      s1[i] = {1'b0, ae[i*BLK +: BLK]} + {1'b0, be[i*BLK +: BLK]} + (BLK+1)'(1);
      se[i*BLK +: BLK] = cy ? s1[i][BLK-1:0] : s0[i][BLK-1:0];
      cy               = cy ? s1[i][BLK]     : s0[i][BLK];
    end
    c_top = cy;
  end

  assign sum   = se[WIDTH-1:0];
  // carry out of bit WIDTH-1 and carry into it, from the bits of the top block
  assign c_msb = se[WIDTH-1] ^ a[WIDTH-1] ^ b[WIDTH-1];
  assign cout  = (WIDTH == NB*BLK) ? c_top
               : (a[WIDTH-1] & b[WIDTH-1]) | (c_msb & (a[WIDTH-1] ^ b[WIDTH-1]));

endmodule
