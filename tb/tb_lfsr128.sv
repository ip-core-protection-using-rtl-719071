// tb_lfsr128: compares the generator with a reference model of the
// polynomial x^128 + x^126 + x^101 + x^99 + 1 kept here, checks that it holds
// while disabled and that out_valid follows the enable.
module tb_lfsr128;
  timeunit 1ns; timeprecision 1ps;
  localparam logic [127:0] SEED = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3211;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] data;
  logic valid;
  logic [127:0] ref_s;
  int checks = 0, failures = 0;

  lfsr128 dut (.clk(clk), .rst_n(rst_n), .en(en), .data(data), .out_valid(valid));

  always #10 clk = ~clk;

  function automatic logic [127:0] step(input logic [127:0] s);
    // taps numbered 1..128 from the least significant bit
    int taps[4] = '{128, 126, 101, 99};
    logic b = 0;
    foreach (taps[i]) b ^= s[taps[i] - 1];
    return {s[126:0], b};
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_s = SEED;
    #35 rst_n = 1;
    @(negedge clk);
    en = 1;
    for (int i = 0; i < 2000; i++) begin
      if (i == 700) en = 0;
      if (i == 760) en = 1;
      @(negedge clk);
      if (i < 700 || i >= 760) ref_s = step(ref_s);
      checks++;
      if (data != ref_s[3:0] || dut.state != ref_s || valid != en && i != 700 && i != 760) begin
        failures++;
        $display("FAIL: step %0d data=%h ref=%h", i, data, ref_s[3:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
