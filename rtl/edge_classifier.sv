// edge_classifier: decides from two consecutive oscillation counts whether
// the supply voltage went up, went down or stayed.
//
// The previous window count is subtracted from the present one.  A
// difference above +THRESHOLD is a rising edge (higher voltage, faster
// ring), one below -THRESHOLD a falling edge, anything else "same"; a
// multiplexer picks the result as in the receiver block diagram.  THRESHOLD is
// the "t" of the method and must not exceed the count difference between the
// two voltage levels; 35 is the example bound for c = 128, T = 5 ns, r = 3,
// d0 = 1.2 ns, d1 = 1.0 ns.
//
// Interface: sample_valid, sampled, previous in; edge_valid, edge_kind
// (ipp_pkg::edge_t) out, registered: one cycle after sample_valid.
//
// Subtracting two consecutive samples and comparing against +t and -t follows
// the published receiver; the default t = 35 is the integer part of its
// worked example (t <= 35.56).  Subtracting older from newer and the
// one-cycle output register are this design's choices.
module edge_classifier
  import ipp_pkg::edge_t, ipp_pkg::EDGE_SAME, ipp_pkg::EDGE_RISE, ipp_pkg::EDGE_FALL, ipp_pkg::prot_state_t;
#(
  parameter int unsigned CNT_W     = 16,
  parameter int unsigned THRESHOLD = 35
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_valid,
  input  logic [CNT_W-1:0] sampled,
  input  logic [CNT_W-1:0] previous,
  output logic             edge_valid,
  output edge_t            edge_kind
);
  timeunit 1ns; timeprecision 1ps;

  logic signed [CNT_W:0] diff;
  logic                  above, below;
  edge_t                 kind_c;

  assign diff  = $signed({1'b0, sampled}) - $signed({1'b0, previous});
  assign above = diff >  $signed((CNT_W+1)'(THRESHOLD));
  assign below = diff < -$signed((CNT_W+1)'(THRESHOLD));

  always_comb begin
    unique case ({above, below})
      2'b10:   kind_c = EDGE_RISE;
      2'b01:   kind_c = EDGE_FALL;
      default: kind_c = EDGE_SAME;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      edge_valid <= 1'b0;
      edge_kind  <= EDGE_SAME;
    end else begin
      edge_valid <= sample_valid;
      if (sample_valid) edge_kind <= kind_c;
    end
  end
endmodule
