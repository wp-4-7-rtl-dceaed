// tb_cfg_seq_fsm: drives the configuration sequencer (with small bit counts)
// from a bit source that is ready at random moments, and checks the number
// of nanostore shifts before each row write, the row sequence, the number of
// static-chain shifts, and that 'running' rises only at the end.
module tb_cfg_seq_fsm;
  int checks = 0, failures = 0;
  localparam int NROW = 8, NBROW = 7, NBCH = 5;
  logic clk = 0, rst_n = 0, start, stop, bit_valid = 0, take, nano_shift, nano_wr, chain_shift, running;
  logic [2:0] row;

  cfg_seq_fsm #(.NROW(NROW), .NBROW(NBROW), .NBCH(NBCH)) dut (.*);

  always #50 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ns, nw, nc, starts;
    @(negedge clk); rst_n = 1;
    ns = 0; nw = 0; nc = 0; starts = 0;
    for (int cyc = 0; cyc < 2000 && !running; cyc++) begin
      bit_valid = 1'($urandom);
      #1;
      if (start) starts++;
      if (take !== (nano_shift | chain_shift)) begin failures++; checks++; end
      if (nano_shift) ns++;
      if (chain_shift) begin
        nc++;
        if (nw != NROW) begin checks++; failures++; end
      end
      if (nano_wr) begin
        checks++;
        if (ns != NBROW || int'(row) != nw) begin
          failures++; $display("FAIL row write %0d after %0d shifts, row=%0d", nw, ns, row);
        end
        ns = 0; nw++;
      end
      @(negedge clk);
    end
    checks++;
    if (!running || nw != NROW || nc != NBCH || starts != 1 || !stop) begin
      failures++; $display("FAIL end: running=%b rows=%0d chain=%0d starts=%0d", running, nw, nc, starts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
