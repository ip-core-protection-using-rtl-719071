// supply_model: behavioural model (not synthesizable) of the breadboard
// circuit that sets the FPGA supply voltage from two control wires.
//
// Two transistor branches (R1/N1 and R0/N0) connect a DC source to Vcc.
// The control code follows the level table of the method:
//   c1 c0 = 00 -> V_reset (0 V, resets the chip)
//           01 -> V0 (2.8 V)
//           11 -> V1 (3.2 V)
//           10 -> unused (the model holds the present voltage and flags it)
// The board capacitors make the voltage move gradually; the model ramps the
// output by SLEW_MV every STEP_NS nanoseconds towards the selected level.  The
// ramp rate is this model's own choice.  The output starts at V1, the idle
// level of the side channel.
//
// The ramp is an event loop on a delayed assignment.  Without timing, a
// synthesis tool sees the level fed back on itself and reports a latch and a
// logic loop; that warning stands, because this file models an analog
// circuit and is not meant to become gates.  The three voltages come from the
// published set-up; the drawn circuit (R1/N1 and R0/N0 branches) is not
// modelled at transistor level.
//
// Interface: c1, c0 in; vcc_mv out, the modelled supply voltage in mV.
module supply_model #(
  parameter int unsigned VRESET_MV = 0,
  parameter int unsigned V0_MV     = 2800,
  parameter int unsigned V1_MV     = 3200,
  parameter int unsigned SLEW_MV   = 20,
  parameter int unsigned STEP_NS   = 100
) (
  input  logic        c1,
  input  logic        c0,
  output logic [15:0] vcc_mv
);
  timeunit 1ns; timeprecision 1ps;

  int unsigned target;
  int unsigned level;

  always_comb begin
    unique case ({c1, c0})
      2'b00:   target = VRESET_MV;
      2'b01:   target = V0_MV;
      2'b11:   target = V1_MV;
      default: target = level;
    endcase
  end

  function automatic int unsigned step_towards(input int unsigned from, input int unsigned to);
    if (from + SLEW_MV <= to)      return from + SLEW_MV;
    else if (from >= to + SLEW_MV) return from - SLEW_MV;
    else                           return to;
  endfunction

  initial level = V1_MV;

  // Each step schedules the next one until the selected level is reached.
  always @(level or target) begin
    if (level != target) level <= #(STEP_NS) step_towards(level, target);
  end

  assign vcc_mv = level[15:0];

  always @(c1 or c0) begin
    if (c1 && !c0) $warning("supply_model: unused control code c1=1 c0=0");
  end
endmodule
