// tb_nanostore: loads all eight rows serially through the scan register
// (53 bits each, most significant first) with random words, reads every row
// back on the instruction port, then captures one row into the scan
// register and shifts it out to compare it bit by bit.
module tb_nanostore;
  import paddi_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, scan_en = 0, scan_in = 0, scan_out, capture = 0, wr = 0;
  logic [2:0] waddr = 0, raddr = 0;
  instr_t rdata;
  logic [IW-1:0] img [NWORDS];

  nanostore dut (.*);

  always #50 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int r = 0; r < NWORDS; r++) begin
      img[r] = {21'($urandom), $urandom};
      scan_en = 1;
      for (int k = IW - 1; k >= 0; k--) begin scan_in = img[r][k]; @(negedge clk); end
      scan_en = 0; wr = 1; waddr = 3'(r);
      @(negedge clk);
      wr = 0;
    end
    for (int r = NWORDS - 1; r >= 0; r--) begin
      raddr = 3'(r); #1;
      checks++;
      if (rdata !== img[r]) begin failures++; $display("FAIL row %0d %h", r, rdata); end
    end
    raddr = 3'd5; capture = 1; @(negedge clk); capture = 0;
    scan_en = 1;
    for (int k = IW - 1; k >= 0; k--) begin
      checks++;
      if (scan_out !== img[5][k]) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
