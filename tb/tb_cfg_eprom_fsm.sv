// tb_cfg_eprom_fsm: the EPROM reader streams random EPROM contents while the
// consumer takes bits at random moments. The bit stream is compared with the
// contents (most significant bit first) and the access wait after each new
// address is checked to be exactly ACCESS clocks.
module tb_cfg_eprom_fsm;
  int checks = 0, failures = 0;
  localparam int AW = 11;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, bit_valid, bit_out, take = 0;
  logic [AW-1:0] eprom_addr;
  logic [7:0] eprom_data;

  cfg_eprom_fsm #(.AW(AW), .ACCESS(2)) dut (.*);
  eprom_model #(.AW(AW), .TACC(30)) u_rom (.addr(eprom_addr), .data(eprom_data));

  always #50 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nb, last_change, waits;
    for (int k = 0; k < 64; k++) u_rom.mem[k] = 8'($urandom);
    @(negedge clk); rst_n = 1;
    start = 1; @(negedge clk); start = 0;
    nb = 0; last_change = 0; waits = 0;
    for (int cyc = 0; nb < 64 * 8 && cyc < 5000; cyc++) begin
      take = 1'($urandom);
      #1;
      if (bit_valid && take) begin
        checks++;
        if (bit_out !== u_rom.mem[nb / 8][7 - nb % 8]) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d", nb);
        end
        nb++;
      end
      if (!bit_valid) waits++;
      @(negedge clk);
    end
    // each of the 64 bytes costs ACCESS = 2 waiting clocks
    checks++;
    if (waits != 64 * 2 || nb != 512) begin
      failures++; $display("FAIL waits=%0d bits=%0d", waits, nb);
    end
    stop = 1; @(negedge clk); stop = 0; #1;
    checks++;
    if (bit_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
