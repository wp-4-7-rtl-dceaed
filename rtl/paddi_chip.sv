// paddi_chip: reconfigurable multiprocessor for real-time data paths.
//
// A cluster of eight 16-bit execution units (EXUs) joined by a layered
// crossbar. Each EXU has its own 8-word nanostore; an external sequencer
// broadcasts one 3-bit address per clock (gaddr) and every EXU executes the
// word it stores at that address (or at an interrupt vector), so the eight
// units run eight different operations per clock with one set of address
// pins. The crossbar routes data between the EXUs and four 16-bit input and
// four 16-bit output buses (128 data pins) under instruction control, and
// routes status flags between EXUs and two flag pins in each direction under
// static control.
//
// After reset the configuration controller (cfg_eprom_fsm + cfg_seq_fsm)
// reads the set-up image from a byte-wide EPROM and shifts it through the
// global shift register: eight times NEXU*53 bits, each followed by a write
// of one nanostore row, then NEXU*49 bits for the static chain (per EXU:
// configuration word, B6, A6, most significant bit first, EXU 7 first).
// 'running' then rises and execution starts. scan_out is the end of the
// static chain.
//
// EXUs 2k and 2k+1 are linked into one 32-bit unit when both have the link
// bit of their configuration word set; 2k is the low half.
//
// The cluster size, the nanostore size and width, the 3-bit broadcast
// address, serial EPROM configuration and the two-level crossbar follow the
// architecture description; bus counts, flag pin counts, the EPROM size and
// the bit order of the image are this design's choices. The two-phase clock
// of the chip is modelled as one rising-edge clock.
module paddi_chip
  import paddi_pkg::*;
#(
  parameter int AW = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       gaddr,
  input  logic [W-1:0]     in_bus   [NIBUS],
  output logic [W-1:0]     out_bus  [NOBUS],
  input  logic [NFIN-1:0]  flag_in,
  output logic [NFOUT-1:0] flag_out,
  output logic [AW-1:0]    eprom_addr,
  input  logic [7:0]       eprom_data,
  output logic             running,
  output logic             scan_out
);

  // configuration controller
  logic start, stop, bit_valid, bit_d, take;
  logic nano_shift, nano_wr, chain_shift;
  logic [2:0] row;

  cfg_eprom_fsm #(.AW(AW)) u_eprom (
    .clk, .rst_n, .start, .stop, .eprom_addr, .eprom_data,
    .bit_valid, .bit_out(bit_d), .take
  );

  cfg_seq_fsm u_seq (
    .clk, .rst_n, .start, .stop, .bit_valid, .take,
    .nano_shift, .nano_wr, .row, .chain_shift, .running
  );

  // per-EXU signals
  instr_t           instr   [NEXU];
  exu_cfg_t         cfg     [NEXU];
  logic [2:0]       addr    [NEXU];
  logic [W-1:0]     exu_y   [NEXU];
  logic [W-1:0]     xin1    [NEXU];
  logic [W-1:0]     xin2    [NEXU];
  port_sel_t        sel1    [NEXU];
  port_sel_t        sel2    [NEXU];
  logic [NOBUS-1:0] obus_en [NEXU];
  logic [NEXU-1:0]  exu_flag, flag1, flag2;
  link_lo_t         lo_out  [NEXU];
  link_hi_t         hi_out  [NEXU];
  logic [NEXU:0]    nano_chain;
  logic [NEXU:0]    st_chain;

  assign nano_chain[0] = bit_d;
  assign st_chain[0]   = bit_d;

  for (genvar i = 0; i < NEXU; i++) begin : g_exu
    localparam int PARTNER = i ^ 1;
    logic st_mid;
    logic lnk_lo, lnk_hi;

    assign lnk_lo = (i % 2 == 0) && cfg[i].link && cfg[PARTNER].link;
    assign lnk_hi = (i % 2 == 1) && cfg[i].link && cfg[PARTNER].link;

    nanostore u_ns (
      .clk, .scan_en(nano_shift), .scan_in(nano_chain[i]), .scan_out(nano_chain[i+1]),
      .capture(1'b0), .wr(nano_wr), .waddr(row), .raddr(addr[i]), .rdata(instr[i])
    );

    exu u_exu (
      .clk, .rst_n, .en(running), .instr(instr[i]),
      .xin1(xin1[i]), .xin2(xin2[i]),
      .link_lo(lnk_lo), .link_hi(lnk_hi),
      .lo_in(lo_out[PARTNER]), .hi_in(hi_out[PARTNER]),
      .lo_out(lo_out[i]), .hi_out(hi_out[i]),
      .y(exu_y[i]), .flag(exu_flag[i]),
      .scan_en(chain_shift), .scan_in(st_chain[i]), .scan_out(st_mid)
    );

    exu_ctl u_ctl (
      .clk, .rst_n, .en(running), .gaddr, .ien(instr[i].ien),
      .flag1(flag1[i]), .flag2(flag2[i]), .addr(addr[i]), .cfg(cfg[i]),
      .scan_en(chain_shift), .scan_in(st_mid), .scan_out(st_chain[i+1])
    );

    assign sel1[i]    = instr[i].in1;
    assign sel2[i]    = instr[i].in2;
    assign obus_en[i] = running ? instr[i].obus : '0;
  end

  crossbar u_xbar (
    .clk, .en(running), .exu_y, .in_bus, .sel1, .sel2, .obus_en,
    .xin1, .xin2, .out_bus, .exu_flag, .flag_in, .cfg, .flag1, .flag2, .flag_out
  );

  assign scan_out = st_chain[NEXU];

endmodule
