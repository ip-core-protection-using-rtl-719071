// sc_transmitter: the verifier's side-channel sender, which drives the two
// control wires of the supply circuit.
//
// A frame of NBITS bits (sent most significant first) is coded as follows,
// one level per half bit of HALF_BIT_CYCLES cycles: the line idles at V1, a
// start half bit at V0 gives the initial falling edge, then each bit takes two
// half bits, V1 then V0 for a 0 (falling edge in the middle) and V0 then V1
// for a 1 (rising edge in the middle).  The line then returns to V1 and stays
// there for GAP_HALF_BITS half bits before done, so that the receiver sees
// the end of the frame.  Levels map to the wires as c1 c0 = 11 for V1,
// 01 for V0 and 00 for V_reset; power_off selects V_reset while idle.
//
// Interface: clk, rst_n, start, bits/nbits (frame), power_off; c1, c0, busy,
// done (one-cycle pulse).  Timing: a frame takes
// (1 + 2*nbits + GAP_HALF_BITS) * HALF_BIT_CYCLES cycles.
module sc_transmitter #(
  parameter int unsigned MAX_BITS        = 80,
  parameter int unsigned HALF_BIT_CYCLES = 1024,
  parameter int unsigned GAP_HALF_BITS   = 6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [MAX_BITS-1:0]           bits,
  input  logic [$clog2(MAX_BITS+1)-1:0] nbits,
  input  logic                          power_off,
  output logic                          c1,
  output logic                          c0,
  output logic                          busy,
  output logic                          done
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned NW  = $clog2(MAX_BITS + 1);
  localparam int unsigned HW  = $clog2(2 * MAX_BITS + GAP_HALF_BITS + 2);
  localparam int unsigned CCW = $clog2(HALF_BIT_CYCLES);

  logic [MAX_BITS-1:0] sh;        // frame bits, next bit at the top
  logic [NW-1:0]       n;
  logic [HW-1:0]       half;      // half-bit index: 0 start, 1..2n data, then gap
  logic [HW-1:0]       last_half; // index of the last half bit of the gap
  logic [CCW-1:0]      cyc;
  logic                level;     // 1 = V1, 0 = V0
  logic                in_data;

  assign in_data = (half != '0) && (half <= {n, 1'b0});

  always_comb begin
    if (half == '0)   level = 1'b0;                  // start: falling edge
    else if (in_data) level = half[0] ? !sh[MAX_BITS-1] : sh[MAX_BITS-1];
    else              level = 1'b1;                  // stop and gap at V1
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; n <= '0; half <= '0; last_half <= '0; cyc <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && nbits != '0) begin
          sh        <= bits << (MAX_BITS - int'(nbits));
          n         <= nbits;
          half      <= '0;
          last_half <= HW'(2 * int'(nbits) + GAP_HALF_BITS);
          cyc       <= '0;
          busy      <= 1'b1;
        end
      end else if (cyc == CCW'(HALF_BIT_CYCLES - 1)) begin
        cyc <= '0;
        if (in_data && !half[0]) sh <= sh << 1;      // bit finished
        if (half == last_half) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          half <= half + 1'b1;
        end
      end else begin
        cyc <= cyc + 1'b1;
      end
    end
  end

  assign c1 = busy ? level : !power_off;
  assign c0 = busy ? 1'b1  : !power_off;
endmodule
