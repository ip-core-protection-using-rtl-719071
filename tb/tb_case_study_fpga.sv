// tb_case_study_fpga: the protected FPGA design with the supply switched by a
// test-side line driver and a PC model on the serial port.  Checks the
// encryption path against the AES standard's known answer, the picture, and
// for each core the effect of its own codeword and of the off / zeros /
// normal / deselect commands, while the other cores stay untouched.
//
// The expected reactions (no traffic when off, zeros, unicolour or black
// screen, no sync) are the ones the published case study reports.
module tb_case_study_fpga;
  timeunit 1ns; timeprecision 1ps;
  import ipp_pkg::*;
  localparam logic [127:0] PT = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] CT = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
  localparam logic [127:0] CT0 = 128'hc6a13b37878f5b826f4f8162a1c8d879; // key 00..0f, pt 0
  logic clk = 0, rst_n = 0;
  logic c1, c0;
  logic [15:0] vcc;
  logic pc_tx, txd, hs, vs;
  logic [3:0] rgb;
  prot_state_t s_u, s_a, s_l, s_v;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  tb_manch_src u_src (.clk(clk), .c1(c1), .c0(c0));
  supply_model u_sup (.c1(c1), .c0(c0), .vcc_mv(vcc));
  tb_uart_pc  pc (.clk(clk), .txd(pc_tx), .rxd(txd));
  tb_vga_mon  mon (.clk(clk), .hsync_n(hs), .rgb(rgb));

  case_study_fpga dut (.clk(clk), .rst_n(rst_n), .vcc_mv(vcc), .rxd(pc_tx), .txd(txd),
    .vga_hsync_n(hs), .vga_vsync_n(vs), .vga_rgb(rgb),
    .st_rs232(s_u), .st_aes(s_a), .st_lfsr(s_l), .st_vga(s_v));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // PC sends PT and collects what comes back within 160k cycles.
  task automatic crypt(output int nbytes, output logic [127:0] got);
    pc.rx_q.delete();
    pc.send_block(PT);
    repeat (90000) @(posedge clk);
    nbytes = pc.rx_q.size();
    got = (nbytes == 16) ? pc.pop_block() : '0;
    pc.rx_q.delete();
  endtask

  task automatic states(input prot_state_t u, a, l, v, input string msg);
    check(s_u == u && s_a == a && s_l == l && s_v == v,
          $sformatf("%s: states %0d %0d %0d %0d", msg, s_u, s_a, s_l, s_v));
  endtask

  task automatic observe_vga();
    mon.clear();
    repeat (20000) @(posedge clk);
  endtask

  initial begin
    #400ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic [127:0] got;
    #35 rst_n = 1;
    repeat (2000) @(posedge clk);
    // normal operation
    crypt(n, got);
    check(n == 16 && got == CT, $sformatf("encryption before authentication: %0d bytes %h", n, got));
    observe_vga();
    check(mon.hs_pulses >= 10 && mon.colours() > 4, "pseudo-random picture");

    // AES core: zeros, then off, then normal, then deselect
    u_src.send(128'(CW_AES), 80);
    states(ST_AUTH, ST_NORMAL, ST_AUTH, ST_AUTH, "AES authenticated, others untouched");
    u_src.send(128'(CMD_ZEROS), 2);
    crypt(n, got);
    check(n == 16 && got == 0, $sformatf("AES zeros: %0d bytes %h", n, got));
    u_src.send(128'(CMD_OFF), 2);
    crypt(n, got);
    check(n == 0, $sformatf("AES off: %0d bytes", n));
    u_src.send(128'(CMD_NORMAL), 2);
    crypt(n, got);
    check(n == 16 && got == CT, "AES back to normal");
    u_src.send(128'(CMD_DESELECT), 2);
    states(ST_AUTH, ST_AUTH, ST_AUTH, ST_AUTH, "AES deselected");

    // RS-232 core: zeros passes a zero block to the cipher, off silences the link
    u_src.send(128'(CW_RS232), 80);
    u_src.send(128'(CMD_ZEROS), 2);
    crypt(n, got);
    check(n == 16 && got == CT0, $sformatf("RS-232 zeros: %0d bytes %h", n, got));
    u_src.send(128'(CMD_OFF), 2);
    states(ST_OFF, ST_AUTH, ST_AUTH, ST_AUTH, "RS-232 off");
    crypt(n, got);
    check(n == 0 && txd == 0, $sformatf("RS-232 off: %0d bytes", n));
    u_src.send(128'(CMD_DESELECT), 2);
    repeat (10000) @(posedge clk);
    crypt(n, got);
    check(n == 16 && got == CT, "RS-232 deselected: link works");

    // LFSR core
    u_src.send(128'(CW_LFSR), 80);
    u_src.send(128'(CMD_OFF), 2);
    observe_vga();
    check(mon.hs_pulses >= 10 && mon.colours() <= 2, "LFSR off: one colour");
    u_src.send(128'(CMD_ZEROS), 2);
    observe_vga();
    check(mon.hs_pulses >= 10 && mon.only_black(), "LFSR zeros: black");
    u_src.send(128'(CMD_DESELECT), 2);
    observe_vga();
    check(mon.colours() > 4, "LFSR deselected: picture back");

    // VGA core
    u_src.send(128'(CW_VGA), 80);
    u_src.send(128'(CMD_OFF), 2);
    observe_vga();
    check(mon.hs_pulses == 0 && mon.only_black(), "VGA off: no signal");
    u_src.send(128'(CMD_ZEROS), 2);
    observe_vga();
    check(mon.hs_pulses >= 10 && mon.only_black(), "VGA zeros: black with sync");
    u_src.send(128'(CMD_NORMAL), 2);
    observe_vga();
    check(mon.hs_pulses >= 10 && mon.colours() > 4, "VGA normal");
    states(ST_AUTH, ST_AUTH, ST_AUTH, ST_NORMAL, "only VGA selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
