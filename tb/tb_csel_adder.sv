// tb_csel_adder: checks the carry-select adder against plain integer addition
// (sum, carry out and carry into the top bit) for random and corner operands,
// at 16 bits and at an odd width that leaves a partial top block.
module tb_csel_adder;
  int checks = 0, failures = 0;
  logic [15:0] a, b, s;
  logic        cin, cout, cm;
  logic [12:0] a2, b2, s2;
  logic        cout2, cm2;

  csel_adder #(.WIDTH(16), .BLK(4)) dut  (.a, .b, .cin, .sum(s), .cout, .c_msb(cm));
  csel_adder #(.WIDTH(13), .BLK(4)) dut2 (.a(a2), .b(b2), .cin, .sum(s2), .cout(cout2), .c_msb(cm2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] ref17;
    logic [15:0] ref15;
    logic [13:0] r14;
    logic [12:0] r12;
    for (int n = 0; n < 3000; n++) begin
      if (n < 4) begin
        a = (n[0]) ? 16'hFFFF : 16'h7FFF; b = (n[1]) ? 16'h0001 : 16'h8000;
      end else begin
        a = 16'($urandom); b = 16'($urandom);
      end
      cin = 1'($urandom);
      a2 = 13'($urandom); b2 = 13'($urandom);
      #1;
      ref17 = {1'b0, a} + {1'b0, b} + 17'(cin);
      ref15 = {1'b0, a[14:0]} + {1'b0, b[14:0]} + 16'(cin);
      r14   = {1'b0, a2} + {1'b0, b2} + 14'(cin);
      r12   = {1'b0, a2[11:0]} + {1'b0, b2[11:0]} + 13'(cin);
      checks++;
      if (s !== ref17[15:0] || cout !== ref17[16] || cm !== ref15[15]) begin
        failures++;
        if (failures < 10) $display("FAIL %h+%h+%b: got %h %b %b", a, b, cin, s, cout, cm);
      end
      checks++;
      if (s2 !== r14[12:0] || cout2 !== r14[13] || cm2 !== r12[12]) begin
        failures++;
        if (failures < 10) $display("FAIL13 %h+%h+%b: got %h %b %b", a2, b2, cin, s2, cout2, cm2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
