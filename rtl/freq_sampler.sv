// freq_sampler: measures the ring-oscillator frequency once per sampling
// window of WINDOW_CYCLES fixed-clock cycles (the "c" of the counting formula).
//
// The Gray-coded count from the oscillator domain passes a two-flop
// synchronizer and is converted back to binary.  At the end of each window the
// number of oscillations seen in that window (this reading minus the last one)
// is loaded into the "sampled" register, and the old sampled value moves into
// the "previous" register, as in the receiver block diagram.  sample_valid
// pulses for one cycle when both registers hold whole windows, that is from
// the third window end after reset on.
//
// Interface: clk/rst_n (fixed clock, active-low reset), count_gray from
// osc_counter; sampled and previous (CNT_W bits), sample_valid.
// Timing: one result every WINDOW_CYCLES cycles.
//
// The sampled/previous register pair and the window of c = 128 reference
// cycles come from the published receiver and its threshold example.  The
// Gray-code crossing and the subtraction of counter readings (instead of
// resetting the counter every window) are this design's choices.
module freq_sampler #(
  parameter int unsigned CNT_W         = 16,
  parameter int unsigned WINDOW_CYCLES = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] count_gray,
  output logic [CNT_W-1:0] sampled,
  output logic [CNT_W-1:0] previous,
  output logic             sample_valid
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned WIN_W = (WINDOW_CYCLES > 1) ? $clog2(WINDOW_CYCLES) : 1;

  logic [CNT_W-1:0] sync1, sync2;
  logic [CNT_W-1:0] count_bin;
  logic [CNT_W-1:0] last_bin;
  logic [WIN_W-1:0] win_cnt;
  logic [1:0]       fill;
  logic             win_end;

  // Gray to binary.
  always_comb begin
    count_bin[CNT_W-1] = sync2[CNT_W-1];
    for (int i = int'(CNT_W) - 2; i >= 0; i--)
      count_bin[i] = count_bin[i+1] ^ sync2[i];
  end

  assign win_end = (win_cnt == WIN_W'(WINDOW_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1        <= '0;
      sync2        <= '0;
      last_bin     <= '0;
      win_cnt      <= '0;
      fill         <= '0;
      sampled      <= '0;
      previous     <= '0;
      sample_valid <= 1'b0;
    end else begin
      sync1        <= count_gray;
      sync2        <= sync1;
      sample_valid <= 1'b0;
      if (win_end) begin
        win_cnt  <= '0;
        last_bin <= count_bin;
        sampled  <= count_bin - last_bin;
        previous <= sampled;
        if (fill != 2'd2) fill <= fill + 2'd1;
        sample_valid <= (fill == 2'd2);
      end else begin
        win_cnt <= win_cnt + 1'b1;
      end
    end
  end
endmodule
