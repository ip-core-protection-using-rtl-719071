// tb_manch_src: test-side model of the verifier's supply switching, written
// independently of sc_transmitter.  send() drives the two control wires of
// the supply circuit with a falling start edge, two half bits per data bit
// (V1,V0 for 0; V0,V1 for 1) and a return to V1, each half bit lasting
// half_cycles clock cycles, followed by gap_halves idle half bits.
//
// It follows the same line code as the transmitter: idle high, a falling
// start edge, two half-bits per bit.
module tb_manch_src #(
  parameter int unsigned HALF = 1024
) (
  input  logic clk,
  output logic c1,
  output logic c0
);
  timeunit 1ns; timeprecision 1ps;

  initial begin
    c1 = 1'b1;
    c0 = 1'b1;
  end

  task automatic hold_level(input bit lvl, input int halves);
    c1 = lvl;
    c0 = 1'b1;
    repeat (halves * HALF) @(posedge clk);
  endtask

  // Send n bits of v, most significant first.
  task automatic send(input logic [127:0] v, input int n, input int gap_halves = 6);
    hold_level(1'b0, 1);
    for (int i = n - 1; i >= 0; i--) begin
      hold_level(!v[i], 1);
      hold_level(v[i], 1);
    end
    hold_level(1'b1, gap_halves);
  endtask
endmodule
