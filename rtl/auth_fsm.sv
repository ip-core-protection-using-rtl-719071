// auth_fsm: the protection state machine.
//
// In ST_AUTH the core runs normally and every received bit is shifted into a
// CW_BITS-long register that is compared with the secret codeword (first
// received bit = most significant codeword bit).  A match moves to
// ST_NORMAL, where the core still runs normally and the machine takes
// commands.  Commands are CMD_BITS = 2 bits each, counted from the codeword
// match on (encoding is this design's choice):
//   0 turn the core off (ST_OFF: enable low, all outputs zero)
//   1 data outputs to zero, control outputs kept (ST_ZEROS)
//   2 back to normal operation (ST_NORMAL)
//   3 deselect: back to ST_AUTH, the core runs normally again
// Commands are accepted in ST_NORMAL, ST_OFF and ST_ZEROS.
//
// Interface: bit_valid/bit_data from the receiver, codeword (constant in a
// netlist core); state, core_off and zero_data out.  A command takes effect
// the cycle after its last bit.
module auth_fsm
  import ipp_pkg::*;
#(
  parameter int unsigned CW_LEN = 80
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bit_valid,
  input  logic              bit_data,
  input  logic [CW_LEN-1:0] codeword,
  output prot_state_t       state,
  output logic              core_off,
  output logic              zero_data
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned FILL_W = $clog2(CW_LEN + 1);

  logic [CW_LEN-1:0]   shreg;
  logic [CW_LEN-1:0]   shreg_next;
  logic [FILL_W-1:0]   fill;        // bits received since entering ST_AUTH
  logic [CMD_BITS-1:0] cmd_sh;
  logic [CMD_BITS-1:0] cmd_word;
  logic [$clog2(CMD_BITS)-1:0] cmd_cnt;

  assign shreg_next = {shreg[CW_LEN-2:0], bit_data};
  assign cmd_word   = {cmd_sh[CMD_BITS-2:0], bit_data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_AUTH;
      shreg   <= '0;
      fill    <= '0;
      cmd_sh  <= '0;
      cmd_cnt <= '0;
    end else if (bit_valid) begin
      if (state == ST_AUTH) begin
        shreg <= shreg_next;
        if (fill != FILL_W'(CW_LEN)) fill <= fill + 1'b1;
        if (fill >= FILL_W'(CW_LEN - 1) && shreg_next == codeword) begin
          state   <= ST_NORMAL;
          cmd_cnt <= '0;
        end
      end else begin
        cmd_sh <= cmd_word;
        if (cmd_cnt == $bits(cmd_cnt)'(CMD_BITS - 1)) begin
          cmd_cnt <= '0;
          unique case (cmd_t'(cmd_word))
            CMD_OFF:      state <= ST_OFF;
            CMD_ZEROS:    state <= ST_ZEROS;
            CMD_NORMAL:   state <= ST_NORMAL;
            CMD_DESELECT: begin
              state <= ST_AUTH;
              fill  <= '0;
            end
          endcase
        end else begin
          cmd_cnt <= cmd_cnt + 1'b1;
        end
      end
    end
  end

  assign core_off  = (state == ST_OFF);
  assign zero_data = (state == ST_OFF) || (state == ST_ZEROS);

  // Turning the core off always implies zero outputs.
  a_off_zero: assert property (@(posedge clk) disable iff (!rst_n) core_off |-> zero_data);
endmodule
