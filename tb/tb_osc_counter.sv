// tb_osc_counter: counts a known number of oscillator edges and checks the
// Gray-coded count, and that it changes by exactly one bit per edge.
//
// Expected counts come from the bench's own edge count.
module tb_osc_counter;
  timeunit 1ns; timeprecision 1ps;
  logic ro_clk = 0, rst_n = 1;
  logic [15:0] g, g_prev;
  int checks = 0, failures = 0;

  osc_counter dut (.ro_clk(ro_clk), .rst_n(rst_n), .count_gray(g));

  function automatic logic [15:0] to_gray(input int unsigned n);
    logic [15:0] b;
    b = 16'(n);
    return b ^ (b >> 1);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #4 rst_n = 1;
    #5;
    checks++; if (g != 0) begin failures++; $display("FAIL: not zero after reset"); end
    for (int n = 1; n <= 70000; n++) begin
      g_prev = g;
      #1.5 ro_clk = 1;
      #1.5 ro_clk = 0;
      if (n % 997 == 0 || n == 65536 || n == 65537) begin
        checks++;
        if (g != to_gray(n)) begin failures++; $display("FAIL: n=%0d g=%h", n, g); end
      end
      if ($countones(g ^ g_prev) != 1) begin
        checks++; failures++; $display("FAIL: more than one bit changed at %0d", n);
      end
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
