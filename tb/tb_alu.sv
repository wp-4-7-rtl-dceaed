// tb_alu: checks the arithmetic unit against a wide-integer reference model:
// every operation in signed and unsigned format, saturation at both ends,
// the B > A flag, and a linked pair (two units wired low/high) computing the
// same operations on 32-bit numbers.
module tb_alu;
  import paddi_pkg::*;
  int checks = 0, failures = 0;

  // single unit
  logic [15:0] a, b, p, y;
  alu_op_e     op;
  logic        sgn, flag;
  link_lo_t    lo_o;
  link_hi_t    hi_o;
  alu u_one (.a, .b, .p, .b_raw(b), .op, .sgn, .link_lo(1'b0), .link_hi(1'b0),
             .lo_in('0), .hi_in('0), .lo_out(lo_o), .hi_out(hi_o), .y, .flag);

  // linked pair
  logic [31:0] a32, b32, p32;
  logic [15:0] yl, yh;
  logic        fl, fh;
  link_lo_t    l2h, unused_lo;
  link_hi_t    h2l, unused_hi;
  alu u_lo (.a(a32[15:0]), .b(b32[15:0]), .p(p32[15:0]), .b_raw(b32[15:0]), .op, .sgn,
            .link_lo(1'b1), .link_hi(1'b0), .lo_in('0), .hi_in(h2l),
            .lo_out(l2h), .hi_out(unused_hi), .y(yl), .flag(fl));
  alu u_hi (.a(a32[31:16]), .b(b32[31:16]), .p(p32[31:16]), .b_raw(b32[31:16]), .op, .sgn,
            .link_lo(1'b0), .link_hi(1'b1), .lo_in(l2h), .hi_in('0),
            .lo_out(unused_lo), .hi_out(h2l), .y(yh), .flag(fh));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint val(input logic [31:0] v, input int n, input logic s);
    longint r;
    r = longint'(v & ((64'd1 << n) - 1));
    if (s && v[n-1]) r = r - (longint'(1) << n);
    return r;
  endfunction

  function automatic logic [31:0] ref_alu(input logic [31:0] av, bv, pv, input alu_op_e o,
                                          input logic s, input int n, output logic f);
    longint x, z, r, lo, hi;
    x = val(av, n, s); z = val(bv, n, s);
    lo = s ? -(longint'(1) << (n-1)) : 0;
    hi = s ? (longint'(1) << (n-1)) - 1 : (longint'(1) << n) - 1;
    f = z > x;
    case (o)
      OP_PASSB: r = z;
      OP_ADD:   r = x + z;
      OP_SUB:   r = x - z;
      OP_MAX:   r = (z > x) ? z : x;
      OP_MIN:   r = (z > x) ? x : z;
      OP_ACC:   r = val(pv, n, s) + z;
      default:  r = x;
    endcase
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return 32'(r);
  endfunction

  function automatic logic [31:0] pick(input int k);
    case ($urandom % 6)
      0: return 32'h0000_7FFF + 32'(k % 3);
      1: return 32'hFFFF_8000 - 32'(k % 3);
      2: return 32'h7FFF_FFFF;
      3: return 32'h8000_0000;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic [31:0] e;
    logic        ef;
    for (int n = 0; n < 4000; n++) begin
      op  = alu_op_e'(n % 8);
      sgn = 1'($urandom);
      a32 = pick(n); b32 = pick(n + 1); p32 = pick(n + 2);
      a = a32[15:0]; b = b32[15:0]; p = p32[15:0];
      #1;
      e = ref_alu({16'h0, a}, {16'h0, b}, {16'h0, p}, op, sgn, 16, ef);
      checks++;
      if (y !== e[15:0] || flag !== ef) begin
        failures++;
        if (failures < 10) $display("FAIL16 op=%s s=%b a=%h b=%h p=%h got %h/%b exp %h/%b",
                                    op.name(), sgn, a, b, p, y, flag, e[15:0], ef);
      end
      e = ref_alu(a32, b32, p32, op, sgn, 32, ef);
      checks++;
      if ({yh, yl} !== e || fh !== ef || fl !== ef) begin
        failures++;
        if (failures < 10) $display("FAIL32 op=%s s=%b a=%h b=%h p=%h got %h/%b%b exp %h/%b",
                                    op.name(), sgn, a32, b32, p32, {yh, yl}, fh, fl, e, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
