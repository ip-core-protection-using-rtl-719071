// tb_edge_classifier: random and boundary pairs of window counts; the
// expected class is computed here from the signed difference and the
// threshold (rising above +t, falling below -t, otherwise same).
//
// Expected classes are recomputed from the rule diff > t, diff < -t.
module tb_edge_classifier;
  timeunit 1ns; timeprecision 1ps;
  import ipp_pkg::*;
  localparam int T = 35;
  logic clk = 0, rst_n = 0;
  logic sv;
  logic [15:0] s, p;
  logic ev;
  edge_t ek;
  int checks = 0, failures = 0;

  edge_classifier #(.THRESHOLD(T)) dut (.clk(clk), .rst_n(rst_n), .sample_valid(sv),
    .sampled(s), .previous(p), .edge_valid(ev), .edge_kind(ek));

  always #10 clk = ~clk;

  task automatic one(input int a, input int b);
    edge_t exp;
    int d = a - b;
    exp = (d > T) ? EDGE_RISE : (d < -T) ? EDGE_FALL : EDGE_SAME;
    @(negedge clk);
    s = 16'(a); p = 16'(b); sv = 1;
    @(negedge clk);
    sv = 0;
    checks++;
    if (!ev || ek != exp) begin
      failures++;
      $display("FAIL: a=%0d b=%0d ev=%0d kind=%0d exp=%0d", a, b, ev, ek, exp);
    end
    @(negedge clk);
    checks++;
    if (ev) begin failures++; $display("FAIL: edge_valid longer than one cycle"); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sv = 0; s = 0; p = 0;
    #35 rst_n = 1;
    one(853, 711);    // V0 -> V1 at 50 MHz, c = 128
    one(711, 853);
    one(800, 765);    // exactly +t: same
    one(800, 764);    // +t+1: rising
    one(765, 800);    // exactly -t: same
    one(764, 800);    // -t-1: falling
    one(0, 60000);
    one(60000, 0);
    for (int i = 0; i < 300; i++) begin
      int a, b;
      a = int'($urandom_range(0, 2000));
      b = a + int'($urandom_range(0, 160)) - 80;
      if (b < 0) b = 0;
      one(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
