// exu_ctl: local control of one EXU (the CTL box beside each EXU).
//
// Chooses the nanostore address the EXU executes. Normally this is the 3-bit
// global address broadcast by the external sequencer. Each EXU has two
// interrupt flags, whose sources (another EXU's status flag or an external
// flag pin) are fixed at set-up time, and two interrupt vectors. When the
// instruction being executed has IEN1 (or IEN2) set and flag 1 (or 2) is high,
// the EXU executes the instruction at IVEC1 (or IVEC2) in the next cycle
// instead of the global address; interrupt 1 wins over interrupt 2.
//
// The module also holds the EXU's static configuration word (exu_cfg_t),
// loaded serially through the global scan chain while scan_en is high
// (scan_in enters bit 0, scan_out is the top bit).
//
// Interrupt enables in the instruction, per-EXU flag sources and vectors and
// the one-cycle delay follow the architecture description and its counter
// example; the priority of interrupt 1 over 2 is this design's choice.
module exu_ctl
  import paddi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [2:0] gaddr,
  input  logic [1:0] ien,      // from the current instruction
  input  logic       flag1,
  input  logic       flag2,
  output logic [2:0] addr,     // nanostore read address
  output exu_cfg_t   cfg,
  input  logic       scan_en,
  input  logic       scan_in,
  output logic       scan_out
);

  logic irq1_q, irq2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq1_q <= 1'b0;
      irq2_q <= 1'b0;
    end else begin
      irq1_q <= en & ien[0] & flag1;
      irq2_q <= en & ien[1] & flag2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cfg <= '0;
    else if (scan_en) cfg <= {cfg[CFGW-2:0], scan_in};
  end

  assign scan_out = cfg[CFGW-1];

  always_comb begin
    if (irq1_q)      addr = cfg.ivec1;
    else if (irq2_q) addr = cfg.ivec2;
    else             addr = gaddr;
  end

endmodule
