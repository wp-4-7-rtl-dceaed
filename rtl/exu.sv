// exu: one execution unit of the cluster (data path of one processor).
//
// Each clock the EXU executes the instruction presented on 'instr':
//   * input multiplexers choose, per register file, the crossbar input
//     (IN1 for file A, IN2 for file B) or the EXU's own result (feedback);
//   * register file A is read directly, register file B through the
//     logarithmic shifter;
//   * the arithmetic unit computes the result and the B > A status flag;
//   * the result is written back (file A at wa, file B at wb), loaded into
//     the pipeline register, and sent to the crossbar either directly or from
//     the pipeline register (instr.pipe).
// All of this completes in one clock: register reads, shifter and adder are
// combinational and the writes happen on the next rising edge. 'en' is low
// during configuration, which freezes the registers.
//
// The 32-bit link (link_lo / link_hi) joins this EXU with its partner as in
// the alu module; a low half also borrows the partner's B operand for the
// shifter. During configuration the two scan registers (A6, B6) form part of
// the global scan chain: scan_in -> A6 -> B6 -> scan_out.
//
// The structure (two six-register files, shifter on one operand, adder,
// output multiplexer, optional pipeline register, status flag) follows the
// block diagram of the EXU; the instruction fields are this design's own.
module exu
  import paddi_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  instr_t       instr,
  input  logic [W-1:0] xin1,      // crossbar input to file A
  input  logic [W-1:0] xin2,      // crossbar input to file B
  input  logic         link_lo,
  input  logic         link_hi,
  input  link_lo_t     lo_in,
  input  link_hi_t     hi_in,
  output link_lo_t     lo_out,
  output link_hi_t     hi_out,
  output logic [W-1:0] y,         // EXU output to the crossbar and buses
  output logic         flag,      // status flag B > A
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out
);

  logic [W-1:0] res, da, db, ra, rb, rbs, p;
  logic         scan_mid;

  assign da = instr.in1.fb ? res : xin1;
  assign db = instr.in2.fb ? res : xin2;

  regfile #(.WIDTH(W), .N(NREG)) u_rfa (
    .clk, .rst_n, .en,
    .waddr(instr.wa), .wdata(da), .dly(instr.dly_a), .raddr(instr.ra), .rdata(ra),
    .scan_en, .scan_in, .scan_out(scan_mid)
  );

  regfile #(.WIDTH(W), .N(NREG)) u_rfb (
    .clk, .rst_n, .en,
    .waddr(instr.wb), .wdata(db), .dly(instr.dly_b), .raddr(instr.rb), .rdata(rb),
    .scan_en, .scan_in(scan_mid), .scan_out
  );

  shifter #(.WIDTH(W)) u_sh (
    .din(rb), .hi_in(hi_in.b_raw), .link_lo, .sgn(instr.sgn), .shamt(instr.shamt), .dout(rbs)
  );

  alu u_alu (
    .a(ra), .b(rbs), .p, .b_raw(rb), .op(instr.op), .sgn(instr.sgn),
    .link_lo, .link_hi, .lo_in, .hi_in, .lo_out, .hi_out, .y(res), .flag
  );

  // Pipeline register; also the accumulator of OP_ACC.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  p <= '0;
    else if (en) p <= res;
  end

  assign y = instr.pipe ? p : res;

endmodule
