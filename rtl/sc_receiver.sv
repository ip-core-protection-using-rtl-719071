// sc_receiver: voltage-controlled side-channel receiver.
//
// A free-running ring oscillator changes its frequency with the supply
// voltage.  Its oscillations are counted, the count is sampled once every
// WINDOW_CYCLES cycles of the fixed clock, two consecutive window counts are
// compared against a threshold to find rising and falling supply edges, and a
// Manchester decoder turns those edges into bits.  The structure follows the
// receiver block diagram; the Gray-coded clock-domain crossing is this
// design's choice.
//
// The ring oscillator is a behavioural model; vcc_mv (the modelled supply
// voltage) exists only to drive it.  In hardware the ring is a chain of LUT
// inverters fed by the real supply and kept by placement constraints.
//
// Interface: clk (fixed reference clock), rst_n, vcc_mv; data_valid/data
// (one bit per pulse), frame_active, and the classifier output edge_valid /
// edge_kind for observation.  Timing: a bit comes out one to two windows
// after the mid-bit supply edge that carries it.
module sc_receiver
  import ipp_pkg::edge_t, ipp_pkg::EDGE_SAME, ipp_pkg::EDGE_RISE, ipp_pkg::EDGE_FALL, ipp_pkg::prot_state_t;
#(
  parameter int unsigned NUM_INV         = 3,
  parameter int unsigned CNT_W           = ipp_pkg::SC_CNT_W,
  parameter int unsigned WINDOW_CYCLES   = 128,
  parameter int unsigned THRESHOLD       = 35,
  parameter int unsigned HALF_BIT_CYCLES = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] vcc_mv,
  output logic        data_valid,
  output logic        data,
  output logic        frame_active,
  output logic        edge_valid,
  output edge_t       edge_kind
);
  timeunit 1ns; timeprecision 1ps;

  logic             ro_clk;
  logic [CNT_W-1:0] count_gray;
  logic [CNT_W-1:0] sampled, previous;
  logic             sample_valid;

  ring_osc #(.NUM_INV(NUM_INV)) u_ro (
    .vcc_mv (vcc_mv),
    .ro_out (ro_clk)
  );

  osc_counter #(.WIDTH(CNT_W)) u_cnt (
    .ro_clk     (ro_clk),
    .rst_n      (rst_n),
    .count_gray (count_gray)
  );

  freq_sampler #(.CNT_W(CNT_W), .WINDOW_CYCLES(WINDOW_CYCLES)) u_smp (
    .clk          (clk),
    .rst_n        (rst_n),
    .count_gray   (count_gray),
    .sampled      (sampled),
    .previous     (previous),
    .sample_valid (sample_valid)
  );

  edge_classifier #(.CNT_W(CNT_W), .THRESHOLD(THRESHOLD)) u_cls (
    .clk          (clk),
    .rst_n        (rst_n),
    .sample_valid (sample_valid),
    .sampled      (sampled),
    .previous     (previous),
    .edge_valid   (edge_valid),
    .edge_kind    (edge_kind)
  );

  manchester_decoder #(.HALF_BIT_CYCLES(HALF_BIT_CYCLES)) u_dec (
    .clk          (clk),
    .rst_n        (rst_n),
    .edge_valid   (edge_valid),
    .edge_kind    (edge_kind),
    .data_valid   (data_valid),
    .data         (data),
    .frame_active (frame_active)
  );
endmodule
