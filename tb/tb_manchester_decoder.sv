// tb_manchester_decoder: drives the decoder with the events a receiver
// would produce: once per 128-cycle window, rising / falling / same according
// to the level change of a Manchester line generated here, with slow
// transitions randomly reported in two consecutive windows.  Checks the
// decoded bits, the bit rate (one bit per 2048 cycles), and the end of frame.
//
// The line code (falling start edge, mid-bit edge per bit, half-bit of 1024
// cycles) follows the published coding; the event pattern of slow edges is
// this bench's own model.
module tb_manchester_decoder;
  timeunit 1ns; timeprecision 1ps;
  import ipp_pkg::*;
  localparam int HALF = 1024, WIN = 128;
  logic clk = 0, rst_n = 0;
  logic ev = 0;
  edge_t ek = EDGE_SAME;
  logic dv, d, fa;
  int checks = 0, failures = 0;
  int cyc = 0;
  bit line = 1, seen = 1;       // line level and level at the last window
  bit dup_next = 0;
  bit exp_q[$];
  int last_bit_cyc = -1;
  int n_dups = 0, n_bits = 0;

  manchester_decoder #(.HALF_BIT_CYCLES(HALF)) dut (.clk(clk), .rst_n(rst_n),
    .edge_valid(ev), .edge_kind(ek), .data_valid(dv), .data(d), .frame_active(fa));

  always #10 clk = ~clk;

  // Window events.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    ev  <= 1'b0;
    if (cyc % WIN == WIN - 1) begin
      ev <= 1'b1;
      if (line != seen) begin
        ek <= line ? EDGE_RISE : EDGE_FALL;
        dup_next <= ($urandom_range(0, 2) == 0);
        seen <= line;
      end else if (dup_next) begin
        ek <= line ? EDGE_RISE : EDGE_FALL;   // same transition seen again
        dup_next <= 0;
        n_dups++;
      end else begin
        ek <= EDGE_SAME;
      end
    end
  end

  always @(posedge clk) if (rst_n && dv) begin
    n_bits++;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL: unexpected bit");
    end else begin
      bit e;
      e = exp_q.pop_front();
      if (d != e) begin failures++; $display("FAIL: bit %0d, expected %0d", d, e); end
    end
    if (last_bit_cyc >= 0 && fa) begin
      checks++;
      if (cyc - last_bit_cyc < 2 * HALF - WIN || cyc - last_bit_cyc > 2 * HALF + WIN) begin
        failures++; $display("FAIL: bit spacing %0d cycles", cyc - last_bit_cyc);
      end
    end
    last_bit_cyc = cyc;
  end

  task automatic half_at(input bit lvl);
    line = lvl;
    repeat (HALF) @(posedge clk);
  endtask

  task automatic frame(input logic [63:0] v, input int n);
    // random phase against the windows
    repeat ($urandom_range(0, WIN - 1)) @(posedge clk);
    half_at(0);
    for (int i = n - 1; i >= 0; i--) begin
      exp_q.push_back(v[i]);
      half_at(!v[i]);
      half_at(v[i]);
    end
    line = 1;
    repeat (3 * HALF) @(posedge clk);
    checks++;
    if (fa) begin failures++; $display("FAIL: frame still active after stop"); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d bits missing", exp_q.size()); exp_q.delete(); end
    repeat (3 * HALF) @(posedge clk);
    last_bit_cyc = -1;
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #35 rst_n = 1;
    repeat (1000) @(posedge clk);
    frame(64'h0, 4);
    frame(64'hF, 4);
    frame(64'b0000111100, 10);
    frame(64'h5, 4);
    for (int k = 0; k < 6; k++) frame({$urandom, $urandom}, 20 + k);
    checks++;
    if (n_dups == 0) begin failures++; $display("FAIL: no repeated event was exercised"); end
    $display("bits=%0d repeated events=%0d", n_bits, n_dups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
