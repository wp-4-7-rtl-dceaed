// regfile: one of the two register files of an EXU.
//
// Six 16-bit registers, addressed 1..6, with one write port and one read port
// (dual-ported). The read is combinational so an instruction reads, computes
// and writes back within a single clock. Register 6 is a scan register: while
// scan_en is high it shifts serially (scan_in -> bit 0 ... bit 15 -> scan_out),
// which is how it is initialised with a constant at set-up time or used for
// scan test; otherwise it is an ordinary register.
//
// Delay-line mode (dly = 1): a write to address w shifts registers 1..w, the
// new value entering register 1 and register k taking register k-1, so the
// file delays a stream by w cycles for pipelining and retiming. In normal mode
// only register w is written. The six registers, the scan register and the
// delay-line use follow the architecture description; the shifting order and
// the use of the write address as the delay length are this design's choice.
//
// Timing: writes and scan shifts on the rising clock edge when en/scan_en is
// high; reset clears all registers.
module regfile
  import paddi_pkg::*;
#(
  parameter int WIDTH = W,
  parameter int N     = NREG
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,       // execution enabled
  input  logic [2:0]       waddr,    // 0 = no write, 1..N
  input  logic [WIDTH-1:0] wdata,
  input  logic             dly,      // delay-line mode
  input  logic [2:0]       raddr,    // 1..N (others read 0)
  output logic [WIDTH-1:0] rdata,
  input  logic             scan_en,
  input  logic             scan_in,
  output logic             scan_out
);

  logic [WIDTH-1:0] r [1:N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= N; k++) r[k] <= '0;
    end else if (scan_en) begin
      r[N] <= {r[N][WIDTH-2:0], scan_in};
    end else if (en && waddr != 3'd0 && int'(waddr) <= N) begin
      if (dly) begin
        for (int k = 1; k <= N; k++) begin
          if (k == 1)               r[k] <= wdata;
          else if (k <= int'(waddr)) r[k] <= r[k-1];
        end
      end else begin
        r[waddr] <= wdata;
      end
    end
  end

  always_comb begin
    rdata = '0;
    for (int k = 1; k <= N; k++)
      if (int'(raddr) == k) rdata = r[k];
  end

  assign scan_out = r[N][WIDTH-1];

endmodule
