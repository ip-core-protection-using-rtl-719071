// tb_auth_fsm: feeds bit streams straight into the protection state
// machine: a wrong codeword, commands before authentication, the codeword
// after random bits, every command from every command state, deselect and
// commands after deselect.
//
// The codeword length and the order of the commands follow the published
// method; the 2-bit command encoding is this design's own.
module tb_auth_fsm;
  timeunit 1ns; timeprecision 1ps;
  import ipp_pkg::*;
  localparam logic [79:0] CW = 80'hC3A5_19E7_5B20_D48F_6E13;
  logic clk = 0, rst_n = 0;
  logic bv = 0, bd = 0;
  prot_state_t st;
  logic off, zero;
  int checks = 0, failures = 0;

  auth_fsm dut (.clk(clk), .rst_n(rst_n), .bit_valid(bv), .bit_data(bd), .codeword(CW),
                .state(st), .core_off(off), .zero_data(zero));

  always #10 clk = ~clk;

  task automatic send_bits(input logic [127:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) begin
      @(negedge clk); bv = 1; bd = v[i];
      @(negedge clk); bv = 0;
      repeat (3) @(negedge clk);
    end
  endtask

  task automatic expect_state(input prot_state_t e, input bit eoff, input bit ezero, input string msg);
    checks++;
    if (st != e || off != eoff || zero != ezero) begin
      failures++;
      $display("FAIL: %s: state=%0d off=%0d zero=%0d", msg, st, off, zero);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #35 rst_n = 1;
    expect_state(ST_AUTH, 0, 0, "reset");
    send_bits(128'(CW ^ 80'h1), 80);
    expect_state(ST_AUTH, 0, 0, "wrong codeword");
    send_bits(128'h0, 2);                        // "off" while not authenticated
    expect_state(ST_AUTH, 0, 0, "command ignored before codeword");
    send_bits(128'h2D, 7);                       // random prefix
    send_bits(128'(CW), 80);
    expect_state(ST_NORMAL, 0, 0, "codeword accepted");
    send_bits(128'(CMD_OFF), 2);
    expect_state(ST_OFF, 1, 1, "turn off");
    send_bits(128'(CMD_ZEROS), 2);
    expect_state(ST_ZEROS, 0, 1, "zeros from off");
    send_bits(128'(CMD_OFF), 2);
    expect_state(ST_OFF, 1, 1, "off from zeros");
    send_bits(128'(CMD_NORMAL), 2);
    expect_state(ST_NORMAL, 0, 0, "normal from off");
    send_bits(128'(CMD_ZEROS), 2);
    expect_state(ST_ZEROS, 0, 1, "zeros");
    send_bits(128'(CMD_NORMAL), 2);
    expect_state(ST_NORMAL, 0, 0, "normal from zeros");
    send_bits(128'(CMD_ZEROS), 2);
    send_bits(128'(CMD_DESELECT), 2);
    expect_state(ST_AUTH, 0, 0, "deselect from zeros");
    send_bits(128'(CMD_OFF), 2);
    expect_state(ST_AUTH, 0, 0, "command after deselect ignored");
    // the tail of the old codeword is not enough after deselect
    send_bits(128'(CW[1:0]), 2);
    expect_state(ST_AUTH, 0, 0, "no re-authentication without full codeword");
    send_bits(128'(CW), 80);
    expect_state(ST_NORMAL, 0, 0, "authenticate again");
    send_bits(128'(CMD_OFF), 2);
    send_bits(128'(CMD_DESELECT), 2);
    expect_state(ST_AUTH, 0, 0, "deselect from off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
