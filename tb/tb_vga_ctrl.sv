// tb_vga_ctrl: measures the 640x480 timing at a 25 MHz pixel rate from
// 50 MHz: line 1600 cycles with a 192-cycle hsync pulse, frame 525 lines with
// a 2-line vsync pulse, 640 coloured pixels per line, and that the picture
// and syncs stop while en is low.
module tb_vga_ctrl;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, en = 1;
  logic [3:0] pix;
  logic pv = 1;
  logic hs, vs;
  logic [3:0] rgb;
  int checks = 0, failures = 0;
  int cyc = 0;
  int hs_fall = -1, hs_period = 0, hs_width = 0;
  int vs_fall = -1, vs_period = 0, vs_width = 0;
  int lit = 0, max_lit = 0;
  logic hs_d = 1, vs_d = 1;

  vga_ctrl dut (.clk(clk), .rst_n(rst_n), .en(en), .pix_in(pix), .pix_valid(pv),
                .hsync_n(hs), .vsync_n(vs), .rgb(rgb));

  always #10 clk = ~clk;
  assign pix = 4'hA;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    hs_d <= hs; vs_d <= vs;
    if (hs_d && !hs) begin
      if (hs_fall >= 0) hs_period = cyc - hs_fall;
      hs_fall = cyc;
      max_lit = (lit > max_lit) ? lit : max_lit;
      lit = 0;
    end
    if (!hs_d && hs) hs_width = cyc - hs_fall;
    if (vs_d && !vs) begin
      if (vs_fall >= 0) vs_period = cyc - vs_fall;
      vs_fall = cyc;
    end
    if (!vs_d && vs) vs_width = cyc - vs_fall;
    if (rgb == 4'hA) lit++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #40ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hs_before;
    #35 rst_n = 1;
    repeat (2 * 840000 + 5000) @(posedge clk);
    check(hs_period == 1600, $sformatf("line period %0d", hs_period));
    check(hs_width == 192, $sformatf("hsync width %0d", hs_width));
    check(vs_period == 840000, $sformatf("frame period %0d", vs_period));
    check(vs_width == 3200, $sformatf("vsync width %0d", vs_width));
    check(max_lit == 1280, $sformatf("visible cycles per line %0d", max_lit));
    en = 0;
    hs_before = hs_fall;
    repeat (5000) @(posedge clk);
    check(hs_fall == hs_before, "sync stops while disabled");
    en = 1;
    repeat (5000) @(posedge clk);
    check(hs_fall != hs_before, "sync resumes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
