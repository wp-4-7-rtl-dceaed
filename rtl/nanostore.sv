// nanostore: the 8-word by 53-bit SRAM instruction store of one EXU.
//
// At set-up time a word is shifted serially into the master-slave scan
// register at the store's I/O (scan_in enters bit 0, scan_out is bit 52;
// the scan registers of all EXUs form one global shift register) and is then
// written into row 'waddr' by a one-cycle 'wr' pulse. With 'capture' the scan
// register instead loads the word at 'raddr', so the store can be read back
// through the chain. At run time the row at 'raddr' (the locally selected
// 3-bit address) is decoded into the 53-bit instruction combinationally, so
// every instruction completes in one clock.
//
// Word count, width, serial configuration and the scan register at the I/O
// follow the architecture description and its SRAM schematic; the cells,
// pre-amplifier and row decoder are represented by an array. The array has
// no reset: it is only read after configuration.
module nanostore
  import paddi_pkg::*;
(
  input  logic       clk,
  input  logic       scan_en,
  input  logic       scan_in,
  output logic       scan_out,
  input  logic       capture,
  input  logic       wr,
  input  logic [2:0] waddr,
  input  logic [2:0] raddr,
  output instr_t     rdata
);

  logic [IW-1:0] mem [NWORDS];
  logic [IW-1:0] sr;

  always_ff @(posedge clk) begin
    if (scan_en)      sr <= {sr[IW-2:0], scan_in};
    else if (capture) sr <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (wr) mem[waddr] <= sr;
  end

  assign scan_out = sr[IW-1];
  assign rdata    = instr_t'(mem[raddr]);

endmodule
