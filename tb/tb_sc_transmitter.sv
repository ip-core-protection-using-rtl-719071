// tb_sc_transmitter: samples the control wires in the middle of every half
// bit and compares with the line code worked out here: V0 start half bit,
// then (V1,V0) for 0 and (V0,V1) for 1, then the V1 gap; checks the frame
// length (1 + 2n + 6) * 1024 cycles and the V_reset code when powered off.
//
// The expected half-bit length of 1024 cycles is the published value.
module tb_sc_transmitter;
  timeunit 1ns; timeprecision 1ps;
  localparam int HALF = 1024;
  logic clk = 0, rst_n = 0, start = 0, poff = 0;
  logic [79:0] bits = '0;
  logic [6:0] nbits = '0;
  logic c1, c0, busy, done;
  int checks = 0, failures = 0;
  int cyc = 0, done_cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (done) done_cyc = cyc;
  end

  sc_transmitter dut (.clk(clk), .rst_n(rst_n), .start(start), .bits(bits), .nbits(nbits),
    .power_off(poff), .c1(c1), .c0(c0), .busy(busy), .done(done));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic frame(input logic [79:0] v, input int n);
    bit exp[$];
    int t0;
    exp.push_back(0);
    for (int i = n - 1; i >= 0; i--) begin exp.push_back(!v[i]); exp.push_back(v[i]); end
    repeat (6) exp.push_back(1);
    @(negedge clk);
    bits = v; nbits = 7'(n); start = 1;
    @(negedge clk);
    t0 = cyc - 1;
    start = 0;
    // first half bit began at the edge that took start
    repeat (HALF / 2 - 1) @(negedge clk);
    foreach (exp[k]) begin
      check(c0 == 1 && c1 == exp[k], $sformatf("half bit %0d: c1=%0d c0=%0d", k, c1, c0));
      repeat (HALF) @(negedge clk);
    end
    // done is registered: it shows one cycle after the last half bit ends
    check(done_cyc - t0 == exp.size() * HALF + 1,
          $sformatf("frame length %0d cycles", done_cyc - t0));
    check(c1 && c0, "idle at V1");
  endtask

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #35 rst_n = 1;
    repeat (5) @(negedge clk);
    check(c1 && c0, "idle at V1 after reset");
    frame(80'b0000111100, 10);
    frame(80'h2, 2);
    frame(80'hC3A5_19E7_5B20_D48F_6E13, 80);
    poff = 1;
    @(negedge clk);
    check(!c1 && !c0, "power off selects V_reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
