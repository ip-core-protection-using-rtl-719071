// tb_rs232_core: a PC model sends 16-byte blocks; the received block must
// appear on blk_out with one blk_out_valid pulse, and a block returned on
// blk_in must reach the PC byte for byte.  Also checks the bit time and that
// the core stalls while disabled.
//
// The 8N1 framing and 16-byte blocks are this design's own choices; the
// bench checks them with an independent PC model.
module tb_rs232_core;
  timeunit 1ns; timeprecision 1ps;
  localparam int CPB = 434;
  logic clk = 0, rst_n = 0, en = 1;
  logic pc_tx, txd;
  logic [127:0] blk_out, blk_in = '0;
  logic bov, biv = 0, busy;
  int checks = 0, failures = 0;
  int nvalid = 0;
  logic [127:0] got;

  always #10 clk = ~clk;

  tb_uart_pc #(.CLKS_PER_BIT(CPB)) pc (.clk(clk), .txd(pc_tx), .rxd(txd));
  rs232_core #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst_n(rst_n), .en(en), .rxd(pc_tx), .txd(txd),
    .blk_out(blk_out), .blk_out_valid(bov), .blk_in(blk_in), .blk_in_valid(biv), .tx_busy(busy));

  always @(posedge clk) if (rst_n && bov) begin nvalid++; got = blk_out; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic roundtrip(input logic [127:0] v);
    int n0 = nvalid;
    pc.send_block(v);
    repeat (10) @(posedge clk);
    check(nvalid == n0 + 1, "one block valid pulse");
    check(got == v, $sformatf("received block %h", got));
    @(negedge clk); blk_in = ~v; biv = 1;
    @(negedge clk); biv = 0;
    wait (!busy);
    repeat (2 * CPB) @(posedge clk);
    check(pc.rx_q.size() == 16, $sformatf("%0d bytes returned", pc.rx_q.size()));
    if (pc.rx_q.size() == 16) check(pc.pop_block() == ~v, "returned block");
    pc.rx_q.delete();
  endtask

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    #35 rst_n = 1;
    repeat (100) @(posedge clk);
    roundtrip(128'h00112233445566778899aabbccddeeff);
    roundtrip({$urandom, $urandom, $urandom, $urandom});
    // bit time on txd: start bit length
    @(negedge clk); blk_in = {8'hFF, 120'h0}; biv = 1;
    @(negedge clk); biv = 0;
    @(negedge txd); t0 = $time;
    @(posedge txd); t1 = $time;
    check((t1 - t0) / 20 == CPB, $sformatf("start bit %0d cycles", (t1 - t0) / 20));
    wait (!busy);
    repeat (2 * CPB) @(posedge clk);
    pc.rx_q.delete();
    // disabled core ignores the line
    en = 0;
    pc.send_block(128'h1);
    en = 1;
    repeat (10) @(posedge clk);
    check(nvalid == 2, "no block while disabled");
    check(pc.framing_errors == 0, "no framing errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
