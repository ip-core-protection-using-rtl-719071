// tb_ring_osc: checks the ring-oscillator model against the counting
// formula c*T/(r*d): with r = 3, 3.2 V (d = 1.0 ns) gives one oscillation per
// 3 ns and 2.8 V (d = 1.2 ns) one per 3.6 ns; the ring stops without supply.
//
// Expected edge counts follow the counting formula c*T/(r*d) with the
// example delays 1.2 ns and 1.0 ns.
module tb_ring_osc;
  timeunit 1ns; timeprecision 1ps;
  logic [15:0] vcc;
  logic ro;
  int checks = 0, failures = 0;
  int edges;

  ring_osc dut (.vcc_mv(vcc), .ro_out(ro));

  always @(posedge ro) edges++;

  task automatic measure(input int mv, input int exp_edges, input string msg);
    vcc = 16'(mv);
    #100;
    edges = 0;
    #3600;                      // 3.6 us window
    checks++;
    if (edges < exp_edges - 1 || edges > exp_edges + 1) begin
      failures++;
      $display("FAIL: %s: %0d edges, expected %0d", msg, edges, exp_edges);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    measure(3200, 1200, "V1");      // 3600 ns / 3 ns
    measure(2800, 1000, "V0");      // 3600 ns / 3.6 ns
    measure(3000, 1091, "3.0 V");   // d = 1.1 ns
    measure(0,       0, "no supply");
    measure(3200, 1200, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
