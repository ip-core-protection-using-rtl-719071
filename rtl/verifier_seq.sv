// verifier_seq: the verifier's probing sequence for proof of authorship.
//
// For each codeword of a database (entries 0 .. cw_count-1) it sends the
// codeword as one side-channel frame, then the four commands as separate
// frames, always in the same order: turn off, data to zeros, normal
// operation, deselect.  After each command it waits HOLD_CYCLES cycles so that
// the behaviour of the system can be observed and recorded against the
// active codeword and command (cur_index, cur_cmd, cmd_strobe).  There is no
// feedback from the chip; the observer decides which codeword worked.  The
// hold time and the database size are this design's choices.
//
// Interface: clk, rst_n, start, cw_db/cw_count (database); a frame request
// port to sc_transmitter (tx_start, tx_bits, tx_nbits, tx_done);
// busy, done, cur_index, cur_cmd, cmd_strobe (one cycle when a command frame
// has been sent completely).
module verifier_seq
  import ipp_pkg::*;
#(
  parameter int unsigned NUM_CW      = 8,
  parameter int unsigned CW_LEN      = 80,
  parameter int unsigned HOLD_CYCLES = 262144
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  input  logic [NUM_CW-1:0][CW_LEN-1:0]   cw_db,
  input  logic [$clog2(NUM_CW+1)-1:0]     cw_count,
  output logic                            tx_start,
  output logic [CW_LEN-1:0]               tx_bits,
  output logic [$clog2(CW_LEN+1)-1:0]     tx_nbits,
  input  logic                            tx_done,
  output logic                            busy,
  output logic                            done,
  output logic [$clog2(NUM_CW+1)-1:0]     cur_index,
  output cmd_t                            cur_cmd,
  output logic                            cmd_strobe
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [2:0] {
    S_IDLE, S_SEND_CW, S_WAIT_CW, S_SEND_CMD, S_WAIT_CMD, S_HOLD
  } seq_state_t;

  localparam int unsigned IW = $clog2(NUM_CW + 1);
  localparam int unsigned LW = $clog2(CW_LEN + 1);
  localparam int unsigned TW = $clog2(HOLD_CYCLES + 1);

  seq_state_t    st;
  logic [TW-1:0] hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; hold <= '0; cur_index <= '0; cur_cmd <= CMD_OFF;
      tx_start <= 1'b0; tx_bits <= '0; tx_nbits <= '0;
      busy <= 1'b0; done <= 1'b0; cmd_strobe <= 1'b0;
    end else begin
      tx_start   <= 1'b0;
      done       <= 1'b0;
      cmd_strobe <= 1'b0;
      unique case (st)
        S_IDLE: if (start && cw_count != '0) begin
          cur_index <= '0;
          busy      <= 1'b1;
          st        <= S_SEND_CW;
        end
        S_SEND_CW: begin
          tx_bits  <= cw_db[cur_index[IW-1:0]];
          tx_nbits <= LW'(CW_LEN);
          tx_start <= 1'b1;
          st       <= S_WAIT_CW;
        end
        S_WAIT_CW: if (tx_done) begin
          cur_cmd <= CMD_OFF;
          st      <= S_SEND_CMD;
        end
        S_SEND_CMD: begin
          tx_bits  <= CW_LEN'(cur_cmd);
          tx_nbits <= LW'(CMD_BITS);
          tx_start <= 1'b1;
          st       <= S_WAIT_CMD;
        end
        S_WAIT_CMD: if (tx_done) begin
          cmd_strobe <= 1'b1;
          hold       <= '0;
          st         <= S_HOLD;
        end
        S_HOLD: begin
          if (hold == TW'(HOLD_CYCLES - 1)) begin
            if (cur_cmd == CMD_DESELECT) begin
              if (cur_index + 1'b1 == cw_count) begin
                busy <= 1'b0;
                done <= 1'b1;
                st   <= S_IDLE;
              end else begin
                cur_index <= cur_index + 1'b1;
                st        <= S_SEND_CW;
              end
            end else begin
              cur_cmd <= cmd_t'(cur_cmd + 2'd1);
              st      <= S_SEND_CMD;
            end
          end else begin
            hold <= hold + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
