// tb_freq_sampler: feeds a Gray count that advances by a known number of
// oscillations per clock and checks the per-window counts, the
// previous-window register, the one-result-per-128-cycles rate and that no
// result is given before two whole windows exist.
//
// Expected counts come from the number of edges the bench itself produced.
module tb_freq_sampler;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  logic [15:0] bin = 0, gray;
  logic [15:0] sampled, previous;
  logic valid;
  int checks = 0, failures = 0;
  int rate = 5;
  int cyc = 0, last_valid = -1, nvalid = 0;
  logic [15:0] last_sampled;
  int skip = 0;               // windows to leave unchecked after a rate change

  assign gray = bin ^ (bin >> 1);

  freq_sampler dut (.clk(clk), .rst_n(rst_n), .count_gray(gray),
                    .sampled(sampled), .previous(previous), .sample_valid(valid));

  always #10 clk = ~clk;

  always @(posedge clk) begin
    bin <= bin + 16'(rate);
    cyc <= cyc + 1;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s sampled=%0d previous=%0d", cyc, msg, sampled, previous); end
  endtask

  // The Gray input jumps by several counts per cycle here; the synchronizer
  // delay is constant, so whole windows still count exactly.
  always @(posedge clk) if (rst_n && valid) begin
    nvalid++;
    if (last_valid >= 0) check(cyc - last_valid == 128, "one result per window");
    if (nvalid > 1) check(previous == last_sampled, "previous holds the last window");
    last_valid   = cyc;
    last_sampled = sampled;
    if (skip > 0) skip--;
    else check(sampled == 16'(128 * rate), "window count");
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2 * 128 + 2) @(posedge clk);
    check(nvalid == 0, "no result before two whole windows");
    repeat (128 * 5) @(posedge clk);
    check(nvalid >= 4, "results are produced");
    rate = 7; skip = 2;         // faster ring
    repeat (128 * 2 + 4) @(posedge clk);
    repeat (128 * 4) @(posedge clk);
    rate = 3; skip = 2;
    repeat (128 * 2 + 4) @(posedge clk);
    repeat (128 * 4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
