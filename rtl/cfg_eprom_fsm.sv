// cfg_eprom_fsm: EPROM reader of the configuration controller (FSM 1 of 2).
//
// After 'start' it reads a standard byte-wide EPROM from address 0 upwards:
// it drives the address, waits ACCESS clocks for the EPROM's access time,
// latches the byte and offers its bits, most significant first, one per
// 'take' (bit_valid / bit_out / take handshake: a bit moves when bit_valid
// and take are both high). When the byte is used up it fetches the next one.
// 'stop' returns it to idle. The EPROM needs no control signal other than the
// address (chip and output enable tied active).
//
// That two on-chip state machines produce the configuration signals and drive
// a standard EPROM directly follows the architecture description; the split
// of work between them, the access wait and the bit order are this design's
// choices.
module cfg_eprom_fsm #(
  parameter int AW     = 11,   // address width (2 KB EPROM)
  parameter int ACCESS = 2     // clocks from address to valid data
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          stop,
  output logic [AW-1:0] eprom_addr,
  input  logic [7:0]    eprom_data,
  output logic          bit_valid,
  output logic          bit_out,
  input  logic          take
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_BITS} state_e;

  state_e      state;
  logic [7:0]  byte_q;
  logic [2:0]  nbit;     // bits left minus one
  logic [$clog2(ACCESS+1)-1:0] wcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      eprom_addr <= '0;
      byte_q     <= '0;
      nbit       <= '0;
      wcnt       <= '0;
    end else if (stop) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          eprom_addr <= '0;
          wcnt       <= '0;
          state      <= S_WAIT;
        end
        S_WAIT: begin
          if (int'(wcnt) == ACCESS - 1) begin
            byte_q <= eprom_data;
            nbit   <= 3'd7;
            state  <= S_BITS;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        S_BITS: if (take) begin
          byte_q <= {byte_q[6:0], 1'b0};
          nbit   <= nbit - 3'd1;
          if (nbit == 3'd0) begin
            eprom_addr <= eprom_addr + 1'b1;
            wcnt       <= '0;
            state      <= S_WAIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign bit_valid = (state == S_BITS);
  assign bit_out   = byte_q[7];

endmodule
