// ring_osc: behavioural model (not synthesizable) of an inverter ring
// oscillator whose frequency depends on the supply voltage.
//
// A real ring is an odd number NUM_INV of inverters (LUTs) in a loop; its
// frequency rises with the supply voltage because each stage switches faster.
// The model takes the supply voltage in mV and derives the stage delay by
// linear interpolation between D0_PS at V0_MV and D1_PS at V1_MV (1.2 ns and
// 1.0 ns, the example figures of the threshold calculation).  Following the
// counting formula of the method, one oscillation takes NUM_INV * d, so the
// output makes one full period in NUM_INV * d.  Below VMIN_MV the ring stops.
//
// Without timing the model is a single inverter closed on itself, which is a
// combinational loop by design: it is what a ring oscillator is.  Synthesis
// therefore reports a loop and latch bits for this model; they stand.
//
// Interface: vcc_mv in (mV), ro_out out (the oscillator signal).
//
// The period r*d per oscillation follows the published counting formula; the
// linear mapping from supply voltage to inverter delay and the stop voltage
// are this model's own choices.
module ring_osc #(
  parameter int unsigned NUM_INV = 3,
  parameter int unsigned D0_PS   = 1200,
  parameter int unsigned D1_PS   = 1000,
  parameter int unsigned V0_MV   = 2800,
  parameter int unsigned V1_MV   = 3200,
  parameter int unsigned VMIN_MV = 1000
) (
  input  logic [15:0] vcc_mv,
  output logic        ro_out
);
  timeunit 1ps; timeprecision 1ps;   // delays below are in picoseconds

  // Stage delay in ps for the present supply voltage.
  function automatic int stage_delay_ps(input int v);
    int d;
    d = int'(D0_PS) + ((v - int'(V0_MV)) * (int'(D1_PS) - int'(D0_PS))) /
                      (int'(V1_MV) - int'(V0_MV));
    if (d < 100) d = 100;
    return d;
  endfunction

  logic    running;
  int      half_period;     // ps

  assign running     = (int'(vcc_mv) >= int'(VMIN_MV));
  assign half_period = (stage_delay_ps(int'(vcc_mv)) * int'(NUM_INV)) / 2;

  logic pending;   // a toggle is scheduled
  logic kick;      // starts the ring after time zero

  initial begin
    ro_out  = 1'b0;
    pending = 1'b0;
    kick    = 1'b0;
    #1 kick = 1'b1;
  end

  // Each change of the output schedules the next one half a period later,
  // which closes the ring.  A restart after a supply drop is started by the
  // change of running; pending keeps a second chain of toggles from starting.
  always @(ro_out or running or kick) begin
    if (running && !pending) begin
      pending <= 1'b1;
      pending <= #(half_period) 1'b0;
      ro_out  <= #(half_period) ~ro_out;
    end
  end
endmodule
