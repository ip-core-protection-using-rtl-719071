// osc_counter: the oscillation counter of the side-channel receiver.
//
// It is clocked by the ring oscillator itself and adds one per oscillation.
// The count is handed to the fixed-clock domain as a Gray code, so that a
// sample taken at any moment is off by at most one.  The counter is never
// cleared between sampling windows; the sampler subtracts successive
// readings instead.  This gives the same per-window count as clearing the
// counter, without sending a reset across clock domains (a design choice).
//
// Interface: ro_clk (oscillator), rst_n (asynchronous, active low),
// count_gray (WIDTH bits, Gray-coded, changes one bit per oscillation).
module osc_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             ro_clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] count_gray
);
  timeunit 1ns; timeprecision 1ps;

  logic [WIDTH-1:0] count_bin;
  logic [WIDTH-1:0] next_bin;

  assign next_bin = count_bin + 1'b1;

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) begin
      count_bin  <= '0;
      count_gray <= '0;
    end else begin
      count_bin  <= next_bin;
      count_gray <= next_bin ^ (next_bin >> 1);
    end
  end
endmodule
