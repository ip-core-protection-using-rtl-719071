// tb_codeword_sizes: the protection state machine at the four codeword
// lengths 32, 64, 80 and 128 bits.  Four instances listen to one bit stream,
// each with its own random codeword.  For each length in turn the bench sends
// that codeword with one bit flipped (all must stay in authentication), the
// true codeword (only the matching instance may leave authentication), then
// off, zeros, normal and deselect.  Every instance's state is checked after
// every step, so a codeword of one length must never unlock another.
//
// The four lengths are the ones for which the published method reports its
// resource use; the 80-bit case is the length used in the case study.  The
// codeword values are random and the 2-bit command encoding is this design's.
module tb_codeword_sizes;
  timeunit 1ns; timeprecision 1ps;
  import ipp_pkg::*;
  localparam int NS = 4;
  localparam int LEN [NS] = '{32, 64, 80, 128};

  logic clk = 0, rst_n = 0;
  logic bv = 0, bd = 0;
  logic [127:0] cw [NS];
  prot_state_t st [NS];
  logic off [NS];
  logic zero [NS];
  int checks = 0, failures = 0;
  int accepted [NS];

  auth_fsm #(.CW_LEN(32))  u32  (.clk, .rst_n, .bit_valid(bv), .bit_data(bd), .codeword(cw[0][31:0]),
                                 .state(st[0]), .core_off(off[0]), .zero_data(zero[0]));
  auth_fsm #(.CW_LEN(64))  u64  (.clk, .rst_n, .bit_valid(bv), .bit_data(bd), .codeword(cw[1][63:0]),
                                 .state(st[1]), .core_off(off[1]), .zero_data(zero[1]));
  auth_fsm #(.CW_LEN(80))  u80  (.clk, .rst_n, .bit_valid(bv), .bit_data(bd), .codeword(cw[2][79:0]),
                                 .state(st[2]), .core_off(off[2]), .zero_data(zero[2]));
  auth_fsm #(.CW_LEN(128)) u128 (.clk, .rst_n, .bit_valid(bv), .bit_data(bd), .codeword(cw[3]),
                                 .state(st[3]), .core_off(off[3]), .zero_data(zero[3]));

  always #10 clk = ~clk;

  task automatic send_bits(input logic [127:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) begin
      @(negedge clk); bv = 1; bd = v[i];
      @(negedge clk); bv = 0;
      repeat (2) @(negedge clk);
    end
  endtask

  // Instance 'sel' must be in state e; every other one in authentication.
  task automatic expect_all(input int sel, input prot_state_t e, input string msg);
    prot_state_t want;
    for (int k = 0; k < NS; k++) begin
      want = (k == sel) ? e : ST_AUTH;
      checks++;
      if (st[k] != want || off[k] != (want == ST_OFF) ||
          zero[k] != (want == ST_OFF || want == ST_ZEROS)) begin
        failures++;
        $display("FAIL: %s: %0d-bit instance in state %0d, expected %0d", msg, LEN[k], st[k], want);
      end
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NS; k++) begin
      cw[k] = {$urandom, $urandom, $urandom, $urandom};
      accepted[k] = 0;
    end
    #35 rst_n = 1;
    expect_all(-1, ST_AUTH, "reset");
    for (int k = 0; k < NS; k++) begin
      send_bits(cw[k] ^ (128'h1 << (LEN[k] / 2)), LEN[k]);
      expect_all(-1, ST_AUTH, "codeword with one bit flipped");
      send_bits(cw[k], LEN[k]);
      expect_all(k, ST_NORMAL, "codeword accepted");
      if (st[k] == ST_NORMAL) accepted[k]++;
      send_bits(128'(CMD_OFF), CMD_BITS);
      expect_all(k, ST_OFF, "off");
      send_bits(128'(CMD_ZEROS), CMD_BITS);
      expect_all(k, ST_ZEROS, "zeros");
      send_bits(128'(CMD_NORMAL), CMD_BITS);
      expect_all(k, ST_NORMAL, "normal");
      send_bits(128'(CMD_DESELECT), CMD_BITS);
      expect_all(-1, ST_AUTH, "deselect");
    end
    for (int k = 0; k < NS; k++) begin
      checks++;
      if (accepted[k] != 1) begin
        failures++;
        $display("FAIL: %0d-bit codeword never accepted", LEN[k]);
      end
      $display("%0d-bit codeword: accepted %0d time(s)", LEN[k], accepted[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
