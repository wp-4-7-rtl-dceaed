// tb_regfile: checks the six-register file against a reference array:
// random normal-mode writes and reads, delay-line shifts of varying length,
// serial loading of register 6 through the scan path and its scan output,
// and that nothing changes while 'en' is low.
module tb_regfile;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, en = 0, dly = 0, scan_en = 0, scan_in = 0, scan_out;
  logic [2:0]  waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] m [1:6];

  regfile #(.WIDTH(16), .N(6)) dut (.*);

  always #50 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int k = 1; k <= 6; k++) begin
      raddr = 3'(k); #1;
      checks++;
      if (rdata !== m[k]) begin
        failures++;
        if (failures < 10) $display("FAIL r%0d got %h exp %h", k, rdata, m[k]);
      end
    end
  endtask

  initial begin
    for (int k = 1; k <= 6; k++) m[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    // serial load of register 6 with a constant
    scan_en = 1;
    for (int i = 15; i >= 0; i--) begin
      scan_in = 1'(16'hA5C3 >> i);
      @(negedge clk);
    end
    scan_en = 0;
    m[6] = 16'hA5C3;
    checks++;
    if (scan_out !== 1'b1) failures++;
    check_all();
    // random operation
    for (int n = 0; n < 400; n++) begin
      en    = ($urandom % 8) != 0;
      dly   = ($urandom % 3) == 0;
      waddr = 3'($urandom);
      wdata = 16'($urandom);
      @(negedge clk);
      if (en && waddr >= 1 && waddr <= 6) begin
        if (dly) begin
          for (int k = 6; k >= 2; k--) if (k <= waddr) m[k] = m[k-1];
          m[1] = wdata;
        end else m[waddr] = wdata;
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
