// lfsr128: 128-bit pseudo-random generator for the display path.
//
// A Fibonacci linear feedback shift register with the feedback polynomial
// x^128 + x^126 + x^101 + x^99 + 1 (a maximal-length choice of this design).
// Each enabled cycle the register shifts left by one and the XOR of taps
// 128, 126, 101 and 99 enters at bit 0.  The low OUT_W bits are the pixel data
// for the 4-bit VGA controller; out_valid is high in the cycles after an
// enabled step, so a disabled generator leaves the picture at one colour.
//
// Interface: clk, rst_n, en; data (OUT_W bits), out_valid.
module lfsr128 #(
  parameter int unsigned         WIDTH = 128,
  parameter int unsigned         OUT_W = 4,
  parameter logic [WIDTH-1:0]    SEED  = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3211
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [OUT_W-1:0] data,
  output logic             out_valid
);
  timeunit 1ns; timeprecision 1ps;

  logic [WIDTH-1:0] state;
  logic             fb;

  assign fb = state[127] ^ state[125] ^ state[100] ^ state[98];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= SEED;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) state <= {state[WIDTH-2:0], fb};
    end
  end

  assign data = state[OUT_W-1:0];
endmodule
