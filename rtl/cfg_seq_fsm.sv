// cfg_seq_fsm: configuration sequencer (FSM 2 of 2).
//
// Consumes the serial bit stream from the EPROM reader and drives the global
// shift register. For each nanostore row r = 0..NWORDS-1 it shifts
// NEXU*IW bits into the nanostore scan registers (nano_shift) and then
// writes them into row r of every nanostore (nano_wr, row). It then shifts
// NEXU*CHAINW bits into the static chain (chain_shift), which holds each
// EXU's two scan registers A6 and B6 and its configuration word, and finally
// raises 'running' so the EXUs start executing. One bit moves per clock while
// the reader has one ready.
//
// Serial set-up of the nanostores through their scan registers follows the
// architecture description; the order of rows and chains is this design's
// choice.
module cfg_seq_fsm
  import paddi_pkg::*;
#(
  parameter int NROW  = NWORDS,
  parameter int NBROW = NEXU * IW,      // bits per nanostore row, all EXUs
  parameter int NBCH  = NEXU * CHAINW   // bits of the static chain
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       start,        // to the EPROM reader
  output logic       stop,
  input  logic       bit_valid,
  output logic       take,
  output logic       nano_shift,
  output logic       nano_wr,
  output logic [2:0] row,
  output logic       chain_shift,
  output logic       running
);

  typedef enum logic [2:0] {S_START, S_NANO, S_WR, S_CHAIN, S_RUN} state_e;

  localparam int CW = $clog2((NBROW > NBCH ? NBROW : NBCH) + 1);

  state_e        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_START;
      cnt   <= '0;
      row   <= '0;
    end else begin
      unique case (state)
        S_START: begin
          cnt   <= '0;
          row   <= '0;
          state <= S_NANO;
        end
        S_NANO: if (bit_valid) begin
          if (int'(cnt) == NBROW - 1) begin
            cnt   <= '0;
            state <= S_WR;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_WR: begin
          if (int'(row) == NROW - 1) state <= S_CHAIN;
          else                       state <= S_NANO;
          row <= row + 3'd1;
        end
        S_CHAIN: if (bit_valid) begin
          if (int'(cnt) == NBCH - 1) state <= S_RUN;
          else                       cnt   <= cnt + 1'b1;
        end
        S_RUN: ;
        default: state <= S_START;
      endcase
    end
  end

  assign start       = (state == S_START);
  assign stop        = (state == S_RUN);
  assign take        = bit_valid && (state == S_NANO || state == S_CHAIN);
  assign nano_shift  = bit_valid && (state == S_NANO);
  assign chain_shift = bit_valid && (state == S_CHAIN);
  assign nano_wr     = (state == S_WR);
  assign running     = (state == S_RUN);

endmodule
