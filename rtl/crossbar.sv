// crossbar: layered crossbar switch connecting the eight EXUs and the I/O.
//
// Data: each of the 16 EXU inputs (IN1 and IN2 of every EXU) has a Type I
// switch choosing one of its three neighbours in the same half of the
// cluster (EXUs 0-3 and 4-7 form the halves) or its Type II switch, which in
// turn chooses one of the four EXUs of the other half or one of the input
// buses. The selections come from the executing instructions, so the data
// routing can change every cycle. Each output bus is driven by the EXU(s)
// whose instruction enables that bus; if several do, the lowest-numbered wins
// and an assertion reports the conflict (the tri-state drivers of the chip
// are replaced by multiplexers).
//
// Status flags: the routing is static. Each EXU's two interrupt flags come
// from the source set in its configuration word (an EXU's flag or an external
// flag input), and each external flag output is the OR of the flags of the
// EXUs configured to drive it.
//
// The two switch layers, the per-cycle data routing and the static flag
// routing follow the architecture description; the number of buses (four in,
// four out, 16 bits: 128 pins), the priority and the flag OR are this
// design's choices. Purely combinational.
module crossbar
  import paddi_pkg::*;
(
  input  logic       clk,                 // only for the assertion
  input  logic       en,
  input  logic [W-1:0] exu_y   [NEXU],
  input  logic [W-1:0] in_bus  [NIBUS],
  input  port_sel_t  sel1      [NEXU],
  input  port_sel_t  sel2      [NEXU],
  input  logic [NOBUS-1:0] obus_en [NEXU],
  output logic [W-1:0] xin1    [NEXU],
  output logic [W-1:0] xin2    [NEXU],
  output logic [W-1:0] out_bus [NOBUS],
  input  logic [NEXU-1:0]  exu_flag,
  input  logic [NFIN-1:0]  flag_in,
  input  exu_cfg_t   cfg       [NEXU],
  output logic [NEXU-1:0]  flag1,
  output logic [NEXU-1:0]  flag2,
  output logic [NFOUT-1:0] flag_out
);

  for (genvar i = 0; i < NEXU; i++) begin : g_port
    localparam int H = i / 4;
    logic [W-1:0] other [4];
    logic [W-1:0] nbr   [3];
    logic [W-1:0] t2a, t2b;

    for (genvar k = 0; k < 4; k++) begin : g_other
      assign other[k] = exu_y[(1 - H) * 4 + k];
    end
    for (genvar k = 0; k < 3; k++) begin : g_nbr
      localparam int L = (k < i % 4) ? k : k + 1;
      assign nbr[k] = exu_y[H * 4 + L];
    end

    xbar_type2 u_t2a (.other, .ibus(in_bus), .sel(sel1[i].t2), .dout(t2a));
    xbar_type1 u_t1a (.nbr,   .t2(t2a),      .sel(sel1[i].t1), .dout(xin1[i]));
    xbar_type2 u_t2b (.other, .ibus(in_bus), .sel(sel2[i].t2), .dout(t2b));
    xbar_type1 u_t1b (.nbr,   .t2(t2b),      .sel(sel2[i].t1), .dout(xin2[i]));
  end

  always_comb begin
    for (int k = 0; k < NOBUS; k++) begin
      out_bus[k] = '0;
      for (int i = NEXU - 1; i >= 0; i--)
        if (obus_en[i][k]) out_bus[k] = exu_y[i];
    end
  end

  function automatic logic pick_flag(input logic [3:0] src, input logic [NEXU-1:0] f,
                                     input logic [NFIN-1:0] fin);
    if (src < 4'(NEXU))             return f[src[2:0]];
    else if (src < 4'(NEXU + NFIN)) return fin[$clog2(NFIN)'(src - 4'(NEXU))];
    else                            return 1'b0;
  endfunction

  always_comb begin
    flag_out = '0;
    for (int i = 0; i < NEXU; i++) begin
      flag1[i] = pick_flag(cfg[i].f1src, exu_flag, flag_in);
      flag2[i] = pick_flag(cfg[i].f2src, exu_flag, flag_in);
      flag_out = flag_out | ({NFOUT{exu_flag[i]}} & cfg[i].flagout);
    end
  end

  // At most one EXU drives each output bus.
  for (genvar k = 0; k < NOBUS; k++) begin : g_chk
    logic [NEXU-1:0] drv;
    for (genvar i = 0; i < NEXU; i++) begin : g_d
      assign drv[i] = obus_en[i][k];
    end
    a_one_driver: assert property (@(posedge clk) en |-> $onehot0(drv))
      else $error("output bus %0d driven by several EXUs", k);
  end

endmodule
