// tb_protect_layer: one protection wrapper on a modelled supply, around a
// stand-in core whose control and data outputs are counters.  Sends the
// codeword and the commands over the supply and checks the enable, control
// and data multiplexers in every state.
//
// The expected wrapper behaviour per state follows the published command
// descriptions.
module tb_protect_layer;
  timeunit 1ns; timeprecision 1ps;
  import ipp_pkg::*;
  localparam logic [79:0] CW = 80'h2E95_F1C0_4A7D_B836_0F5B;
  logic clk = 0, rst_n = 0;
  logic c1, c0;
  logic [15:0] vcc;
  logic core_en;
  logic [1:0] cctrl, octrl;
  logic [7:0] cdata, odata;
  prot_state_t st;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  tb_manch_src u_src (.clk(clk), .c1(c1), .c0(c0));
  supply_model u_sup (.c1(c1), .c0(c0), .vcc_mv(vcc));

  protect_layer #(.CTRL_W(2), .DATA_W(8)) dut (
    .clk(clk), .rst_n(rst_n), .vcc_mv(vcc), .codeword(CW),
    .en_in(1'b1), .core_en(core_en), .core_ctrl(cctrl), .core_data(cdata),
    .ctrl_out(octrl), .data_out(odata), .state(st));

  // stand-in core: counts while enabled
  always_ff @(posedge clk) if (core_en) begin
    cctrl <= cctrl + 2'd1;
    cdata <= cdata + 8'd3;
  end

  task automatic expect_mode(input prot_state_t e, input string msg);
    bit ok = 1;
    logic [7:0] d0;
    checks++;
    d0 = cdata;
    repeat (4) @(posedge clk);
    #1;
    unique case (e)
      ST_AUTH, ST_NORMAL: ok = core_en && octrl == cctrl && odata == cdata && cdata != d0;
      ST_OFF:             ok = !core_en && octrl == 0 && odata == 0 && cdata == d0;
      ST_ZEROS:           ok = core_en && octrl == cctrl && odata == 0 && cdata != 0;
    endcase
    if (st != e || !ok) begin
      failures++;
      $display("FAIL: %s: state=%0d en=%0d ctrl=%0d/%0d data=%0d/%0d", msg, st, core_en,
               octrl, cctrl, odata, cdata);
    end
  endtask

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cctrl = 0; cdata = 1;
    #35 rst_n = 1;
    repeat (2000) @(posedge clk);
    expect_mode(ST_AUTH, "after reset");
    u_src.send(128'(CW ^ 80'h8000), 80);
    u_src.send(128'(CMD_OFF), 2);
    expect_mode(ST_AUTH, "wrong codeword");
    u_src.send(128'(CW), 80);
    expect_mode(ST_NORMAL, "authenticated");
    u_src.send(128'(CMD_OFF), 2);
    expect_mode(ST_OFF, "off");
    u_src.send(128'(CMD_ZEROS), 2);
    expect_mode(ST_ZEROS, "zeros");
    u_src.send(128'(CMD_NORMAL), 2);
    expect_mode(ST_NORMAL, "normal");
    u_src.send(128'(CMD_DESELECT), 2);
    expect_mode(ST_AUTH, "deselected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
