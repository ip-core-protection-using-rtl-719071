// tb_sc_receiver: the whole receiver on a modelled supply.  The test-side
// line driver switches the supply circuit between 2.8 V and 3.2 V; the
// receiver must return the frames bit for bit at one bit per 2048 cycles
// (about 24 kbit/s at 50 MHz), ignore the power-up transient and see both
// edge directions.
//
// Among the frames is the ten-bit sequence 0000111100 used in the published
// supply measurement.
module tb_sc_receiver;
  timeunit 1ns; timeprecision 1ps;
  import ipp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic c1, c0;
  logic [15:0] vcc;
  logic dv, d, fa, ev;
  edge_t ek;
  int checks = 0, failures = 0;
  int cyc = 0, last_bit = -1, n_rise = 0, n_fall = 0;
  bit exp_q[$];

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  tb_manch_src #(.HALF(1024)) u_src (.clk(clk), .c1(c1), .c0(c0));
  supply_model u_sup (.c1(c1), .c0(c0), .vcc_mv(vcc));
  sc_receiver dut (.clk(clk), .rst_n(rst_n), .vcc_mv(vcc), .data_valid(dv), .data(d),
                   .frame_active(fa), .edge_valid(ev), .edge_kind(ek));

  always @(posedge clk) if (rst_n && ev) begin
    if (ek == EDGE_RISE) n_rise++;
    if (ek == EDGE_FALL) n_fall++;
  end

  always @(posedge clk) if (rst_n && dv) begin
    bit e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected bit at %0d", cyc); end
    else begin
      e = exp_q.pop_front();
      if (d != e) begin failures++; $display("FAIL: got %0d expected %0d at %0d", d, e, cyc); end
    end
    if (last_bit >= 0) begin
      checks++;
      if (cyc - last_bit < 2048 - 256 || cyc - last_bit > 2048 + 256) begin
        failures++; $display("FAIL: bit spacing %0d", cyc - last_bit);
      end
    end
    last_bit = cyc;
  end

  task automatic frame(input logic [127:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) exp_q.push_back(v[i]);
    last_bit = -1;
    u_src.send(v, n);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d bits lost", exp_q.size()); exp_q.delete(); end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #35 rst_n = 1;
    repeat (2000) @(posedge clk);
    frame(128'b0000111100, 10);
    frame(128'hA5, 8);
    frame({64'h0, $urandom, $urandom}, 40);
    frame(128'hFFFF, 16);
    checks++;
    if (n_rise == 0 || n_fall == 0) begin failures++; $display("FAIL: no rise/fall seen"); end
    $display("rising=%0d falling=%0d", n_rise, n_fall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
