// alu: saturating arithmetic unit of an EXU.
//
// Operations (paddi_pkg::alu_op_e): pass A, pass B (the shifted operand, which
// gives the arithmetic right shift), add, subtract, maximum, minimum and
// accumulate (the pipeline register P plus B). Sums and differences saturate
// instead of wrapping, in two's complement (sgn = 1) or unsigned (sgn = 0)
// format. Addition and subtraction share one carry-select adder (B inverted and
// carry-in 1 for subtraction).
//
// The status flag is 1 when B > A, compared in the selected format; it is
// produced every cycle whatever the operation, and maximum/minimum use the
// same comparison.
//
// Two EXUs (2k low half, 2k+1 high half) can be linked into one 32-bit unit:
// the low half passes its carry and its half-word comparison up (lo_out ->
// lo_in); the high half works out the 32-bit comparison and the saturation
// and passes them back down (hi_out -> hi_in), so both halves saturate and
// select together. The set of operations, saturation, the two number formats
// and 32-bit linking follow the architecture description; the polarity of the
// flag (B > A), the accumulate operand and the link signals are this design's
// choices. Purely combinational.
module alu
  import paddi_pkg::*;
(
  input  logic [W-1:0] a,        // register file A
  input  logic [W-1:0] b,        // register file B after the shifter
  input  logic [W-1:0] p,        // pipeline register (accumulator)
  input  logic [W-1:0] b_raw,    // register file B before the shifter
  input  alu_op_e      op,
  input  logic         sgn,
  input  logic         link_lo,  // this unit is the low half of a pair
  input  logic         link_hi,  // this unit is the high half of a pair
  input  link_lo_t     lo_in,    // from the low half (used when link_hi)
  input  link_hi_t     hi_in,    // from the high half (used when link_lo)
  output link_lo_t     lo_out,
  output link_hi_t     hi_out,
  output logic [W-1:0] y,
  output logic         flag
);

  logic         arith, sub;
  logic [W-1:0] opa, opb, s;
  logic         cin, cout, c_msb;
  logic         ovf, sat_hi_own, sat, sat_hi;
  logic         gt_own, gt;
  logic [W-1:0] satval;

  assign arith = (op == OP_ADD) || (op == OP_SUB) || (op == OP_ACC);
  assign sub   = (op == OP_SUB);
  assign opa   = (op == OP_ACC) ? p : a;
  assign opb   = sub ? ~b : b;
  assign cin   = link_hi ? lo_in.carry : sub;

  csel_adder #(.WIDTH(W), .BLK(4)) u_add (
    .a(opa), .b(opb), .cin(cin), .sum(s), .cout(cout), .c_msb(c_msb)
  );

  // Overflow of this half taken as the top of the number.
  always_comb begin
    if (sgn) begin
      ovf        = c_msb ^ cout;
      sat_hi_own = s[W-1];       // wrapped to negative: positive overflow
    end else begin
      ovf        = sub ? ~cout : cout;
      sat_hi_own = ~sub;
    end
  end

  // Comparison B > A.
  always_comb begin
    if (sgn) gt_own = $signed(b) > $signed(a);
    else     gt_own = b > a;
    if (link_hi) gt = gt_own || ((a == b) && lo_in.gt);
    else if (link_lo) gt = hi_in.gt;
    else gt = gt_own;
  end

  always_comb begin
    if (link_lo) begin
      sat    = hi_in.sat;
      sat_hi = hi_in.sat_hi;
      satval = sat_hi ? '1 : '0;
    end else begin
      sat    = arith && ovf;
      sat_hi = sat_hi_own;
      if (sgn) satval = sat_hi ? {1'b0, {(W-1){1'b1}}} : {1'b1, {(W-1){1'b0}}};
      else     satval = sat_hi ? '1 : '0;
    end
  end

  always_comb begin
    unique case (op)
      OP_PASSB:                y = b;
      OP_ADD, OP_SUB, OP_ACC:  y = (arith && sat) ? satval : s;
      OP_MAX:                  y = gt ? b : a;
      OP_MIN:                  y = gt ? a : b;
      default:                 y = a;     // OP_PASSA, OP_RSV
    endcase
  end

  assign flag = gt;

  assign lo_out.carry = cout;
  assign lo_out.gt    = b > a;

  assign hi_out.b_raw  = b_raw;
  assign hi_out.gt     = gt;
  assign hi_out.sat    = arith && ovf;
  assign hi_out.sat_hi = sat_hi_own;
  assign hi_out.sgn    = sgn;

endmodule
