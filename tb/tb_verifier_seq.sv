// tb_verifier_seq: the probing order with a stand-in transmitter that
// completes each frame after a fixed time: for every database entry the
// codeword frame and then the commands off, zeros, normal, deselect, each
// followed by the hold time.
module tb_verifier_seq;
  timeunit 1ns; timeprecision 1ps;
  import ipp_pkg::*;
  localparam int HOLD = 50;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0][79:0] db;
  logic tx_start, tx_done = 0, busy, done, strobe;
  logic [79:0] tx_bits;
  logic [6:0] tx_nbits;
  logic [3:0] idx;
  cmd_t cmd;
  int checks = 0, failures = 0;
  logic [79:0] frames[$];
  int lens[$];
  int last_done = 0, cyc = 0;

  verifier_seq #(.HOLD_CYCLES(HOLD)) dut (.clk(clk), .rst_n(rst_n), .start(start), .cw_db(db),
    .cw_count(4'd3), .tx_start(tx_start), .tx_bits(tx_bits), .tx_nbits(tx_nbits),
    .tx_done(tx_done), .busy(busy), .done(done), .cur_index(idx), .cur_cmd(cmd),
    .cmd_strobe(strobe));

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // stand-in transmitter
  initial forever begin
    @(posedge clk);
    if (rst_n && tx_start) begin
      frames.push_back(tx_bits);
      lens.push_back(int'(tx_nbits));
      repeat (20) @(posedge clk);
      tx_done <= 1;
      @(posedge clk);
      tx_done <= 0;
      last_done = cyc;
    end
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) db[i] = {$urandom, $urandom, $urandom};
    #35 rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    checks++;
    if (frames.size() != 15) begin failures++; $display("FAIL: %0d frames", frames.size()); end
    for (int k = 0; k < 3 && frames.size() >= 5; k++) begin
      checks++;
      if (frames.pop_front() != db[k] || lens.pop_front() != 80) begin
        failures++; $display("FAIL: entry %0d codeword frame", k);
      end
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (frames.pop_front() != 80'(c) || lens.pop_front() != 2) begin
          failures++; $display("FAIL: entry %0d command %0d", k, c);
        end
      end
    end
    checks++;
    if (cyc - last_done < HOLD) begin failures++; $display("FAIL: hold after last command too short"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
