// tb_exu_ctl: checks the per-EXU control: the serially loaded configuration
// word, the global address in normal operation, vectoring to IVEC1/IVEC2 one
// cycle after an enabled flag, the priority of interrupt 1, and that a flag
// without its enable, or while disabled, has no effect.
module tb_exu_ctl;
  import paddi_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, flag1 = 0, flag2 = 0, scan_en = 0, scan_in = 0, scan_out;
  logic [2:0] gaddr = 0, addr;
  logic [1:0] ien = 0;
  exu_cfg_t cfg, want;

  exu_ctl dut (.*);

  always #50 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [2:0] ea);
    #1;
    checks++;
    if (addr !== ea) begin
      failures++;
      $display("FAIL %s: addr=%0d expected %0d", what, addr, ea);
    end
  endtask

  initial begin
    want = '0;
    want.ivec1 = 3'd5; want.ivec2 = 3'd3; want.f1src = 4'd2; want.link = 1'b1;
    @(negedge clk); rst_n = 1;
    scan_en = 1;
    for (int k = CFGW - 1; k >= 0; k--) begin
      scan_in = want[k];
      @(negedge clk);
    end
    scan_en = 0;
    checks++;
    if (cfg !== want) begin failures++; $display("FAIL cfg %h", cfg); end
    en = 1;
    for (int g = 0; g < 8; g++) begin gaddr = 3'(g); chk("gaddr", 3'(g)); @(negedge clk); end
    gaddr = 3'd1;
    flag1 = 1; ien = 2'b00; chk("no enable", 3'd1); @(negedge clk);
    chk("no enable next", 3'd1);
    ien = 2'b01; @(negedge clk);          // flag seen with IEN1
    flag1 = 0; ien = 2'b00;
    chk("vector 1", 3'd5); @(negedge clk);
    chk("back", 3'd1);
    flag2 = 1; ien = 2'b10; @(negedge clk);
    chk("vector 2", 3'd3);
    flag1 = 1; ien = 2'b11; @(negedge clk);
    chk("priority", 3'd5);
    en = 0; @(negedge clk);
    chk("disabled", 3'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
