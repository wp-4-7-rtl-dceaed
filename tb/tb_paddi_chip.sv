// tb_paddi_chip: end-to-end test of the whole chip at its default size.
//
// The testbench assembles two small programs into a configuration image
// (nanostore rows, scan-register constants and per-EXU configuration words,
// in the chip's serial order), places it in an EPROM model, and lets the chip
// configure itself after reset. It then runs:
//
// Global address 0:
//   * EXU 0/1: the block-depth counter example. EXU 0 adds its constant 1
//     (B6) to A6 and enables interrupt 1; EXU 1 latches the counter output
//     into B6 and compares it with A6 = 0; its flag vectors EXU 0 to word 1,
//     which clears the counter. Output bus 0 must count 1, 2, 0, 1, 2, 0 ...;
//     bus 1 carries 0 - B6 and flag output 0 the compare flag.
//   * EXU 2/3 linked: 32-bit saturating add of input buses {1,0} and a 32-bit
//     constant held in the two B6 registers, result on buses {3,2}.
//   * EXU 7: interrupt from external flag input 0, seen on flag output 1.
// Global address 2 (mode switch):
//   * EXU 4: depth-3 delay line on input bus 2, output through the pipeline
//     register; EXU 5 takes it through a Type I switch and shifts it right
//     by 2 onto bus 0.
//   * EXU 2/3: 32-bit accumulation of input buses {1,0} onto buses {3,2}.
//   * EXU 6: maximum of input bus 3 and EXU 2's output (other half, Type II
//     switch) onto bus 1.
// Every output is compared each clock with a cycle-level model of the
// programs, and each mechanism is counted; one that never occurs is a failure.
module tb_paddi_chip;
  import paddi_pkg::*;
  int checks = 0, failures = 0;

  logic             clk = 0, rst_n = 0;
  logic [2:0]       gaddr = 0;
  logic [W-1:0]     in_bus [NIBUS];
  logic [W-1:0]     out_bus [NOBUS];
  logic [NFIN-1:0]  flag_in = 0;
  logic [NFOUT-1:0] flag_out;
  logic [10:0]      eprom_addr;
  logic [7:0]       eprom_data;
  logic             running, scan_out;

  paddi_chip dut (.*);
  eprom_model #(.AW(11), .TACC(30)) u_rom (.addr(eprom_addr), .data(eprom_data));

  always #50 clk = ~clk;

  initial begin
    #(100 * 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- image
  instr_t   nano [NEXU][NWORDS];
  exu_cfg_t cfgw [NEXU];
  logic [W-1:0] a6 [NEXU], b6 [NEXU];

  function automatic instr_t ins(input int self, input alu_op_e op,
                                 input int src1 = -1, wa = 0, src2 = -1, wb = 0,
                                 input int ra = 0, rb = 0, obus = 0, ien = 0,
                                 input int sh = 0, pipe = 0, dly_a = 0);
    instr_t t = '0;
    t.op = op; t.sgn = 1'b1;
    if (src1 >= 0) t.in1 = src_sel(self, src1);
    if (src2 >= 0) t.in2 = src_sel(self, src2);
    t.wa = 3'(wa); t.wb = 3'(wb); t.ra = 3'(ra); t.rb = 3'(rb);
    t.obus = 4'(obus); t.ien = 2'(ien); t.shamt = 4'(sh); t.pipe = 1'(pipe); t.dly_a = 1'(dly_a);
    return t;
  endfunction

  localparam logic [31:0] K = 32'h0001_8000;

  task automatic build_image();
    int nb;
    logic bits [$];
    logic [NEXU*IW-1:0] rowv;
    logic [NEXU*CHAINW-1:0] chv;
    for (int e = 0; e < NEXU; e++) begin
      for (int w = 0; w < NWORDS; w++) nano[e][w] = '0;
      cfgw[e] = '0; cfgw[e].f1src = 4'd15; cfgw[e].f2src = 4'd15;
      a6[e] = '0; b6[e] = '0;
    end
    // counter (EXU 0) and compare (EXU 1)
    a6[0] = 16'd0; b6[0] = 16'd1; cfgw[0].f1src = 4'd1; cfgw[0].ivec1 = 3'd1;
    nano[0][0] = ins(0, OP_ADD, 0, 6, 0, 1, 6, 6, 4'b0001, 1);
    nano[0][1] = ins(0, OP_SUB, 0, 6, 0, 1, 6, 1, 4'b0001);
    a6[1] = 16'd0; b6[1] = 16'd0; cfgw[1].flagout = 2'b01;
    nano[1][0] = ins(1, OP_SUB, -1, 0, 0, 6, 6, 6, 4'b0010);
    // linked pair
    cfgw[2].link = 1'b1; cfgw[3].link = 1'b1;
    b6[2] = K[15:0]; b6[3] = K[31:16];
    nano[2][0] = ins(2, OP_ADD, NEXU + 0, 1, -1, 0, 1, 6, 4'b0100);
    nano[3][0] = ins(3, OP_ADD, NEXU + 1, 1, -1, 0, 1, 6, 4'b1000);
    nano[2][2] = ins(2, OP_ACC, -1, 0, NEXU + 0, 1, 0, 1, 4'b0100);
    nano[3][2] = ins(3, OP_ACC, -1, 0, NEXU + 1, 1, 0, 1, 4'b1000);
    // external interrupt
    cfgw[7].f1src = 4'd8; cfgw[7].ivec1 = 3'd5; cfgw[7].flagout = 2'b10;
    a6[7] = 16'd5; b6[7] = 16'd3;
    nano[7][0] = ins(7, OP_PASSA, -1, 0, -1, 0, 6, 6, 0, 1);
    nano[7][5] = ins(7, OP_PASSA, -1, 0, -1, 0, 1, 6, 0, 0);
    // mode 2
    nano[4][2] = ins(4, OP_PASSA, NEXU + 2, 3, -1, 0, 3, 0, 0, 0, 0, 1, 1);
    nano[5][2] = ins(5, OP_PASSB, -1, 0, 4, 1, 0, 1, 4'b0001, 0, 2);
    nano[6][2] = ins(6, OP_MAX, NEXU + 3, 1, 2, 1, 1, 1, 4'b0010);
    // serial image: rows, then the static chain; EXU 7 first, MSB first
    for (int w = 0; w < NWORDS; w++) begin
      for (int e = 0; e < NEXU; e++) rowv[e*IW +: IW] = nano[e][w];
      for (int k = NEXU*IW - 1; k >= 0; k--) bits.push_back(rowv[k]);
    end
    for (int e = 0; e < NEXU; e++) chv[e*CHAINW +: CHAINW] = {cfgw[e], b6[e], a6[e]};
    for (int k = NEXU*CHAINW - 1; k >= 0; k--) bits.push_back(chv[k]);
    nb = bits.size();
    for (int k = 0; k < nb; k++) u_rom.mem[k / 8][7 - k % 8] = bits[k];
  endtask

  // ---------------------------------------------------------------- model
  function automatic logic [31:0] sat32(input longint v);
    if (v > 64'sh7FFF_FFFF) return 32'h7FFF_FFFF;
    if (v < -64'sh8000_0000) return 32'h8000_0000;
    return 32'(v);
  endfunction

  int n_irq = 0, n_sat = 0, n_carry = 0, n_dly = 0, n_acc = 0, n_t2 = 0, n_ext = 0,
      n_mode = 0, n_cfg = 0, n_flagout = 0;

  task automatic chk(input string what, input logic [31:0] got, exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 15) $display("FAIL t=%0t %s: got %h expected %h", $time, what, got, exp_v);
    end
  endtask

  initial begin
    logic [W-1:0] cnt_prev;
    logic [31:0]  x_prev, e32, accp, b1p;
    logic         fin_prev;
    logic [W-1:0] hb2 [$];
    logic [W-1:0] b3_prev, y2_prev;
    int cyc;

    for (int k = 0; k < NIBUS; k++) in_bus[k] = '0;
    build_image();
    repeat (3) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (!running && cyc < 30000) begin @(negedge clk); cyc++; end
    chk("configured", 32'(running), 32'd1);
    if (running) n_cfg++;
    $display("configuration took %0d clocks", cyc);

    // -------- mode 0
    cnt_prev = '0; x_prev = '0; fin_prev = 0;
    for (int n = 0; n < 300; n++) begin
      logic [31:0] x;
      logic [W-1:0] eo1, eo2;
      x = (n % 7 == 3) ? 32'h7FFF_0000 + $urandom % 32'h2_0000 : $urandom;
      if (n % 11 == 5) x = 32'h0000_8000 | 32'($urandom % 16'h8000);
      {in_bus[1], in_bus[0]} = x;
      flag_in[0] = (n % 13 == 4);
      #1;
      eo1 = W'(n % 3 == 0 ? 1 : n % 3 == 1 ? 2 : 0);
      chk("counter O1", 32'(out_bus[0]), 32'(eo1));
      eo2 = W'(0) - cnt_prev;
      chk("compare O2", 32'(out_bus[1]), 32'(eo2));
      chk("flag out 0", 32'(flag_out[0]), 32'($signed(cnt_prev) > 0));
      chk("ext irq flag out 1", 32'(flag_out[1]), 32'(fin_prev));
      if (out_bus[0] == 0) n_irq++;
      if (flag_out[0]) n_flagout++;
      if (fin_prev && flag_out[1]) n_ext++;
      e32 = sat32(longint'($signed(x_prev)) + longint'($signed(K)));
      chk("32-bit add", {out_bus[3], out_bus[2]}, e32);
      if (e32 != x_prev + K) n_sat++;
      else if ({1'b0, x_prev[15:0]} + {1'b0, K[15:0]} > 17'hFFFF) n_carry++;
      cnt_prev = out_bus[0]; x_prev = x; fin_prev = flag_in[0];
      accp = {out_bus[3], out_bus[2]};
      @(negedge clk);
      // switch mode only where no interrupt is pending
      if (n > 200 && eo1 == 0) break;
    end
    flag_in = '0;

    // -------- mode 2
    gaddr = 3'd2; n_mode++;
    b1p = '0; b3_prev = '0; y2_prev = '0;
    for (int n = 0; n < 300; n++) begin
      logic [31:0] x;
      logic [W-1:0] eo1;
      x = (n < 100) ? 32'($urandom % 64) : $urandom;
      {in_bus[1], in_bus[0]} = x;
      in_bus[2] = 16'($urandom);
      in_bus[3] = 16'($urandom);
      hb2.push_back(in_bus[2]);
      #1;
      // delay line (3) + pipeline register + Type I + shifter: bus2 from 5 clocks ago >>> 2
      eo1 = (n >= 5) ? W'($signed(hb2[n - 5]) >>> 2) : '0;
      chk("delay/shift O1", 32'(out_bus[0]), 32'(eo1));
      if (n >= 5 && eo1 != 0) n_dly++;
      // 32-bit accumulator
      e32 = sat32(longint'($signed(accp)) + longint'($signed(b1p)));
      chk("32-bit acc", {out_bus[3], out_bus[2]}, e32);
      if (b1p != 0) n_acc++;
      // max of bus 3 and EXU 2 (other half)
      chk("max O2", 32'(out_bus[1]), 32'(($signed(y2_prev) > $signed(b3_prev)) ? y2_prev : b3_prev));
      if (y2_prev != 0 && $signed(y2_prev) > $signed(b3_prev)) n_t2++;
      chk("flags idle", 32'(flag_out), 32'd0);
      accp = {out_bus[3], out_bus[2]}; b1p = x;
      b3_prev = in_bus[3]; y2_prev = out_bus[2];
      @(negedge clk);
    end

    $display("mechanisms: cfg=%0d irq=%0d flagout=%0d ext_irq=%0d sat=%0d carry=%0d mode=%0d dly=%0d acc=%0d typeII=%0d",
             n_cfg, n_irq, n_flagout, n_ext, n_sat, n_carry, n_mode, n_dly, n_acc, n_t2);
    if (n_cfg == 0 || n_irq == 0 || n_flagout == 0 || n_ext == 0 || n_sat == 0 || n_carry == 0 ||
        n_mode == 0 || n_dly == 0 || n_acc == 0 || n_t2 == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
