// tb_supply_model: checks the supply-circuit model: the level table
// (00 -> 0 V, 01 -> 2.8 V, 11 -> 3.2 V), the start level and the ramp rate.
module tb_supply_model;
  timeunit 1ns; timeprecision 1ps;
  logic c1, c0;
  logic [15:0] vcc;
  int checks = 0, failures = 0;

  supply_model dut (.c1(c1), .c0(c0), .vcc_mv(vcc));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (vcc=%0d)", msg, vcc); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c1 = 1; c0 = 1;
    #50;
    check(vcc == 3200, "starts at V1");
    c1 = 0; c0 = 1;
    #250;                       // two ramp steps of 20 mV
    check(vcc < 3200 && vcc > 3100, "ramps down gradually");
    #5000;
    check(vcc == 2800, "reaches V0");
    c1 = 1; c0 = 1;
    #5000;
    check(vcc == 3200, "back to V1");
    c1 = 0; c0 = 0;
    #20000;
    check(vcc == 0, "V_reset is 0 V");
    c1 = 0; c0 = 1;
    #20000;
    check(vcc == 2800, "V0 after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
