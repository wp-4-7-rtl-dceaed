// tb_shifter: checks the logarithmic arithmetic right shifter for all shift
// amounts in signed, unsigned and linked (32-bit low half) modes against a
// reference computed with the language's shift operators.
module tb_shifter;
  int checks = 0, failures = 0;
  logic [15:0] din, hi_in, dout, exp_v;
  logic        link_lo, sgn;
  logic [3:0]  shamt;

  shifter #(.WIDTH(16)) dut (.din, .hi_in, .link_lo, .sgn, .shamt, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    for (int n = 0; n < 2000; n++) begin
      din = 16'($urandom); hi_in = 16'($urandom);
      link_lo = 1'($urandom); sgn = 1'($urandom); shamt = 4'(n);
      #1;
      w = {hi_in, din};
      if (link_lo)  exp_v = 16'(w >> shamt);
      else if (sgn) exp_v = 16'($signed(din) >>> shamt);
      else          exp_v = din >> shamt;
      checks++;
      if (dout !== exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL din=%h hi=%h l=%b s=%b sh=%0d got %h exp %h",
                                    din, hi_in, link_lo, sgn, shamt, dout, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
