// paddi_pkg: types and constants shared by the reconfigurable multiprocessor.
//
// The cluster holds eight 16-bit execution units (EXUs). Each EXU executes one
// 53-bit instruction per clock, read from its own 8-word nanostore at an
// address broadcast by an external sequencer. The eight EXUs, their counts,
// the 53-bit instruction width and the 8-word store follow the architecture
// description; the layout of the fields inside the instruction word and the
// static per-EXU configuration word are this design's own choice, since only
// the word width is specified.
package paddi_pkg;

  localparam int W      = 16;  // EXU data width (two linked EXUs make 32 bits)
  localparam int NEXU   = 8;   // EXUs in the cluster
  localparam int NREG   = 6;   // registers per register file
  localparam int NWORDS = 8;   // nanostore words (3-bit global address)
  localparam int IW     = 53;  // instruction word width
  localparam int NIBUS  = 4;   // 16-bit input buses  (4 in + 4 out = 128 pins)
  localparam int NOBUS  = 4;   // 16-bit output buses
  localparam int NFIN   = 2;   // external status flag inputs
  localparam int NFOUT  = 2;   // status flags routed off chip

  // Arithmetic unit operations.
  typedef enum logic [2:0] {
    OP_PASSA = 3'd0,  // result = A
    OP_PASSB = 3'd1,  // result = B after the shifter (arithmetic right shift)
    OP_ADD   = 3'd2,  // result = sat(A + B)
    OP_SUB   = 3'd3,  // result = sat(A - B)
    OP_MAX   = 3'd4,  // result = max(A, B)
    OP_MIN   = 3'd5,  // result = min(A, B)
    OP_ACC   = 3'd6,  // result = sat(P + B), P = pipeline register (accumulator)
    OP_RSV   = 3'd7   // reserved, behaves as OP_PASSA
  } alu_op_e;

  // Crossbar selection for one EXU input port (Type I then Type II switch).
  //   fb = 1 : take this EXU's own result (local feedback, "THIS_EXU")
  //   t1 = 0..2 : one of the three other EXUs of the same half, in index order
  //   t1 = 3    : the output of this input's Type II switch
  //   t2 = 0..3 : EXU 0..3 of the other half, t2 = 4..7 : input bus 0..3
  typedef struct packed {
    logic       fb;
    logic [1:0] t1;
    logic [2:0] t2;
  } port_sel_t;

  // 53-bit nanostore word. Register addresses are 1..6; a write address of 0
  // writes nothing.
  typedef struct packed {
    logic [11:0] rsv;       // unused, reads as stored
    logic [1:0]  ien;       // interrupt enables: ien[0] = IEN1, ien[1] = IEN2
    logic [NOBUS-1:0] obus; // drive output bus k with this EXU's output
    logic        pipe;      // output taken from the pipeline register
    logic        sgn;       // 1 = two's complement, 0 = unsigned
    alu_op_e     op;
    logic [3:0]  shamt;     // arithmetic right shift of the B operand
    logic        dly_b;     // register file B in delay-line mode
    logic        dly_a;     // register file A in delay-line mode
    logic [2:0]  rb;        // read address, file B
    logic [2:0]  wb;        // write address, file B
    logic [2:0]  ra;        // read address, file A
    logic [2:0]  wa;        // write address, file A
    port_sel_t   in2;       // source of register file B (EXU input IN2)
    port_sel_t   in1;       // source of register file A (EXU input IN1)
  } instr_t;

  // Static (set-up time) configuration of one EXU, excluding the two scan
  // registers (A6, B6) which sit in front of it in the configuration chain.
  // Flag sources: 0..7 = status flag of EXU 0..7, 8..9 = external flag
  // input 0..1, 10..15 = constant 0.
  typedef struct packed {
    logic             link;     // pair with the partner EXU (2k,2k+1) into 32 bits
    logic [3:0]       f1src;    // source of interrupt flag 1
    logic [3:0]       f2src;    // source of interrupt flag 2
    logic [2:0]       ivec1;    // interrupt vector 1
    logic [2:0]       ivec2;    // interrupt vector 2
    logic [NFOUT-1:0] flagout;  // route this EXU's flag to external flag k
  } exu_cfg_t;

  localparam int CFGW   = $bits(exu_cfg_t);   // 17
  localparam int CHAINW = 2 * W + CFGW;       // per-EXU static chain, 49 bits

  // Signals a linked low-half EXU sends to its high-half partner.
  typedef struct packed {
    logic carry;   // carry out of the low 16 bits of the adder
    logic gt;      // low halves: B > A (unsigned)
  } link_lo_t;

  // Signals a linked high-half EXU sends back to its low-half partner.
  typedef struct packed {
    logic [W-1:0] b_raw;  // high half of B before the shifter
    logic         gt;     // 32-bit B > A
    logic         sat;    // 32-bit result saturated
    logic         sat_hi; // saturated towards the maximum (else minimum)
    logic         sgn;    // high half operates in two's complement
  } link_hi_t;

  // Crossbar selection for EXU 'self' taking data from global source 'src'
  // (0..7 = EXU, 8..11 = input bus); src == self selects local feedback.
  function automatic port_sel_t src_sel(input int self, input int src);
    port_sel_t s;
    int k;
    s = '0;
    if (src == self) begin
      s.fb = 1'b1;
    end else if (src < NEXU && (src / 4) == (self / 4)) begin
      k = src % 4;
      if (k > self % 4) k = k - 1;
      s.t1 = 2'(k);
    end else begin
      s.t1 = 2'd3;
      s.t2 = (src < NEXU) ? 3'(src % 4) : 3'(4 + src - NEXU);
    end
    return s;
  endfunction

endpackage
