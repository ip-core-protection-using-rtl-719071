// manchester_decoder: turns the rising/falling events of the edge classifier
// into data bits.
//
// Line code: the idle level is V1.  A transmission starts with a falling
// edge; after it every bit has an edge in the middle of its bit time, falling
// for 0 and rising for 1, and an extra edge at the bit boundary when two equal
// bits follow each other.  A half bit lasts HALF_BIT_CYCLES clock cycles.
//
// The decoder keeps the line level it last saw.  Since real edges must
// alternate, an event in the direction of the present level is a repeat of
// the same slow transition seen in the next window, and is dropped.  After the
// start edge, an edge that comes at least 1.5 half bits after
// the last mid-bit edge is the next mid-bit edge and yields a bit; an earlier
// one is a boundary edge.  When no mid-bit edge has come 2.5 half bits after
// the last one, the transmission has ended and the decoder waits for the next
// start edge.  These timing windows are this design's own choice.
//
// Interface: edge_valid/edge_kind in; data_valid (one-cycle pulse) and data
// out, plus frame_active while a transmission is being received.
module manchester_decoder
  import ipp_pkg::edge_t, ipp_pkg::EDGE_SAME, ipp_pkg::EDGE_RISE, ipp_pkg::EDGE_FALL, ipp_pkg::prot_state_t;
#(
  parameter int unsigned HALF_BIT_CYCLES = 1024
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  edge_valid,
  input  edge_t edge_kind,
  output logic  data_valid,
  output logic  data,
  output logic  frame_active
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned MID_MIN  = (3 * HALF_BIT_CYCLES) / 2;
  localparam int unsigned TIMEOUT  = (5 * HALF_BIT_CYCLES) / 2;
  localparam int unsigned TMR_W    = $clog2(TIMEOUT + 2);

  logic             level;       // 1: line at V1, 0: line at V0
  logic [TMR_W-1:0] since_mid;   // cycles since the last mid-bit (or start) edge
  logic             is_edge, dir;

  assign is_edge = edge_valid && (edge_kind != EDGE_SAME);
  assign dir     = (edge_kind == EDGE_RISE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level        <= 1'b1;
      since_mid    <= '0;
      frame_active <= 1'b0;
      data_valid   <= 1'b0;
      data         <= 1'b0;
    end else begin
      data_valid <= 1'b0;
      if (frame_active && since_mid != TMR_W'(TIMEOUT + 1))
        since_mid <= since_mid + 1'b1;

      if (is_edge && dir != level) begin
        level <= dir;
        if (!frame_active) begin
          if (!dir) begin               // falling edge: start of transmission
            frame_active <= 1'b1;
            since_mid    <= '0;
          end
        end else if (since_mid >= TMR_W'(MID_MIN)) begin
          data_valid <= 1'b1;           // mid-bit edge: rising = 1, falling = 0
          data       <= dir;
          since_mid  <= '0;
        end
      end else if (frame_active && since_mid > TMR_W'(TIMEOUT)) begin
        frame_active <= 1'b0;           // no mid-bit edge any more: end
      end
    end
  end
endmodule
