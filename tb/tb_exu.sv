// tb_exu: directed test of one execution unit. Each step presents one
// instruction and checks the combinational output and flag against values
// worked out by hand: loading both register files from the crossbar inputs,
// add with the shifter, subtract, feedback of the own result, the pipeline
// register and accumulation, saturation, delay-line mode, serial loading of
// the scan registers A6 and B6, and freezing while disabled.
module tb_exu;
  import paddi_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, scan_en = 0, scan_in = 0, scan_out, flag;
  instr_t i;
  logic [15:0] xin1 = 0, xin2 = 0, y;
  link_lo_t lo_out;
  link_hi_t hi_out;

  exu dut (.clk, .rst_n, .en, .instr(i), .xin1, .xin2, .link_lo(1'b0), .link_hi(1'b0),
           .lo_in('0), .hi_in('0), .lo_out, .hi_out, .y, .flag, .scan_en, .scan_in, .scan_out);

  always #50 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [15:0] ey, input logic ef);
    #1;
    checks++;
    if (y !== ey || flag !== ef) begin
      failures++;
      $display("FAIL %s: y=%h flag=%b, expected %h %b", what, y, flag, ey, ef);
    end
  endtask

  // one instruction: present it, check, then clock it in
  task automatic step(input instr_t ins, input string what, input logic [15:0] ey, input logic ef);
    i = ins;
    chk(what, ey, ef);
    @(negedge clk);
  endtask

  function automatic instr_t mk(input alu_op_e op, input int ra, rb, wa, wb,
                                input logic fb1 = 0, fb2 = 0, input int sh = 0,
                                input logic sgn = 1, pipe = 0, dly_a = 0);
    instr_t t = '0;
    t.op = op; t.ra = 3'(ra); t.rb = 3'(rb); t.wa = 3'(wa); t.wb = 3'(wb);
    t.in1.fb = fb1; t.in2.fb = fb2; t.shamt = 4'(sh); t.sgn = sgn; t.pipe = pipe;
    t.dly_a = dly_a;
    return t;
  endfunction

  initial begin
    i = '0;
    @(negedge clk); rst_n = 1; en = 1;
    xin1 = 16'd100; xin2 = 16'd40;
    step(mk(OP_PASSA, 1, 2, 1, 2), "load", 16'd0, 1'b0);            // A1=100, B2=40
    step(mk(OP_ADD, 1, 2, 3, 0, 1), "add", 16'd140, 1'b0);          // A3=140 (feedback)
    step(mk(OP_SUB, 3, 2, 0, 0, 0, 0, 2), "sub>>2", 16'd130, 1'b0); // 140-(40>>2)
    step(mk(OP_PASSA, 1, 2, 0, 0, 0, 0, 0, 1, 1), "pipe", 16'd130, 1'b0); // y=P=130
    step(mk(OP_ACC, 1, 2, 0, 0), "acc", 16'd140, 1'b0);             // P=100, +40
    step(mk(OP_ACC, 1, 2, 0, 0), "acc2", 16'd180, 1'b0);            // 140+40
    step(mk(OP_MAX, 1, 2, 0, 0), "max", 16'd100, 1'b0);
    step(mk(OP_MIN, 1, 2, 0, 0), "min", 16'd40, 1'b0);
    // B > A flag and saturation
    xin1 = 16'h7000; xin2 = 16'h2000;
    step(mk(OP_PASSB, 1, 2, 4, 4), "load2", 16'd40, 1'b0);          // A4=7000, B4=2000
    step(mk(OP_ADD, 4, 4, 0, 0), "sat+", 16'h7FFF, 1'b0);
    step(mk(OP_SUB, 1, 4, 0, 0, 0, 0, 0, 0), "usat-", 16'h0000, 1'b1); // 100-0x2000 unsigned
    step(mk(OP_SUB, 1, 4, 0, 0), "neg", 16'(100 - 16'h2000), 1'b1);
    // delay line on file A, depth 3
    for (int k = 1; k <= 4; k++) begin
      xin1 = 16'(k * 11);
      step(mk(OP_PASSA, 1, 0, 3, 0, 0, 0, 0, 1, 0, 1), "dly", (k == 1) ? 16'd100 : 16'((k - 1) * 11), 1'b0);
    end
    step(mk(OP_PASSA, 2, 0, 0, 0), "dly r2", 16'd33, 1'b0);
    step(mk(OP_PASSA, 3, 0, 0, 0), "dly r3", 16'd22, 1'b0);
    step(mk(OP_PASSA, 4, 0, 0, 0), "r4 kept", 16'h7000, 1'b0);
    // disabled: no write
    en = 0;
    step(mk(OP_PASSA, 1, 0, 1, 0), "frozen", 16'd44, 1'b0);
    en = 1;
    step(mk(OP_PASSA, 1, 0, 0, 0), "still", 16'd44, 1'b0);
    // serial load: 32 bits, the first 16 end in B6
    en = 0; scan_en = 1;
    for (int k = 31; k >= 0; k--) begin
      scan_in = 1'(32'h1234_ABCD >> k);
      @(negedge clk);
    end
    scan_en = 0; en = 1;
    step(mk(OP_PASSA, 6, 6, 0, 0), "A6", 16'hABCD, 1'b1);  // B6=1234 > A6 (signed)
    step(mk(OP_PASSB, 6, 6, 0, 0), "B6", 16'h1234, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
