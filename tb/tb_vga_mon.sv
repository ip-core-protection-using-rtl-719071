// tb_vga_mon: watches the VGA pins over an observation interval: counts
// hsync pulses and records which colours appeared.  clear() starts a new
// interval.
module tb_vga_mon (
  input logic       clk,
  input logic       hsync_n,
  input logic [3:0] rgb
);
  timeunit 1ns; timeprecision 1ps;
  int   hs_pulses = 0;
  logic seen[16];
  logic hs_d = 1'b1;

  function automatic void clear();
    hs_pulses = 0;
    foreach (seen[i]) seen[i] = 1'b0;
  endfunction

  function automatic int colours();
    int n = 0;
    foreach (seen[i]) if (seen[i]) n++;
    return n;
  endfunction

  function automatic bit only_black();
    for (int i = 1; i < 16; i++) if (seen[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial clear();

  always @(posedge clk) begin
    hs_d <= hsync_n;
    if (hs_d && !hsync_n) hs_pulses++;
    seen[rgb] = 1'b1;
  end
endmodule
