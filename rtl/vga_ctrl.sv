// vga_ctrl: VGA controller with a 4-bit pixel colour.
//
// It generates 640x480 at 60 Hz timing from the 50 MHz clock with a pixel
// every PIX_DIV = 2 cycles (25 MHz): 800 pixel clocks per line (640 visible,
// 16 front porch, 96 sync, 48 back porch) and 525 lines per frame (480, 10,
// 2, 33).  Both syncs are active low.  In the visible area the colour is the
// last pixel value accepted with pix_valid; elsewhere it is black.  The timing
// numbers are the common VGA standard, not taken from the design description.
//
// Interface: clk, rst_n, en (counters stop when low), pix_in/pix_valid from
// the pixel source; hsync_n, vsync_n, rgb (registered).
module vga_ctrl #(
  parameter int unsigned H_VIS = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int unsigned V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33,
  parameter int unsigned PIX_DIV = 2,
  parameter int unsigned COL_W   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [COL_W-1:0] pix_in,
  input  logic             pix_valid,
  output logic             hsync_n,
  output logic             vsync_n,
  output logic [COL_W-1:0] rgb
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW = $clog2(H_TOT);
  localparam int unsigned VW = $clog2(V_TOT);
  localparam int unsigned DW = (PIX_DIV > 1) ? $clog2(PIX_DIV) : 1;

  logic [HW-1:0]    hcnt;
  logic [VW-1:0]    vcnt;
  logic [DW-1:0]    div;
  logic [COL_W-1:0] colour;
  logic             pix_tick, visible;

  assign pix_tick = en && (div == DW'(PIX_DIV - 1));
  assign visible  = (hcnt < HW'(H_VIS)) && (vcnt < VW'(V_VIS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div     <= '0;
      hcnt    <= '0;
      vcnt    <= '0;
      colour  <= '0;
      hsync_n <= 1'b1;
      vsync_n <= 1'b1;
      rgb     <= '0;
    end else begin
      if (pix_valid) colour <= pix_in;
      if (en) div <= pix_tick ? '0 : div + 1'b1;
      if (pix_tick) begin
        if (hcnt == HW'(H_TOT - 1)) begin
          hcnt <= '0;
          vcnt <= (vcnt == VW'(V_TOT - 1)) ? '0 : vcnt + 1'b1;
        end else begin
          hcnt <= hcnt + 1'b1;
        end
        hsync_n <= !((hcnt >= HW'(H_VIS + H_FP)) && (hcnt < HW'(H_VIS + H_FP + H_SYNC)));
        vsync_n <= !((vcnt >= VW'(V_VIS + V_FP)) && (vcnt < VW'(V_VIS + V_FP + V_SYNC)));
        rgb     <= visible ? colour : '0;
      end
    end
  end
endmodule
