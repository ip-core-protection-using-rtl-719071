// tb_uart_pc: test-side model of the PC's serial port (8N1, LSB first),
// written independently of rs232_core.  send_byte() drives the line;
// received bytes are pushed into rx_q, with framing errors counted.
module tb_uart_pc #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic clk,
  output logic txd,
  input  logic rxd
);
  timeunit 1ns; timeprecision 1ps;

  logic [7:0] rx_q[$];
  int         framing_errors = 0;

  initial txd = 1'b1;

  task automatic send_byte(input logic [7:0] b);
    txd = 1'b0;
    repeat (CLKS_PER_BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      txd = b[i];
      repeat (CLKS_PER_BIT) @(posedge clk);
    end
    txd = 1'b1;
    repeat (CLKS_PER_BIT) @(posedge clk);
  endtask

  task automatic send_block(input logic [127:0] blk);
    for (int i = 15; i >= 0; i--) send_byte(blk[8*i +: 8]);
  endtask

  // receiver: wait for a start bit, sample in the middle of each bit
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge rxd);
      repeat (CLKS_PER_BIT / 2) @(posedge clk);
      if (rxd == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (CLKS_PER_BIT) @(posedge clk);
          b[i] = rxd;
        end
        repeat (CLKS_PER_BIT) @(posedge clk);
        if (rxd != 1'b1) framing_errors++;
        else rx_q.push_back(b);
      end
    end
  end

  function automatic logic [127:0] pop_block();
    logic [127:0] v = '0;
    for (int i = 0; i < 16; i++) v = {v[119:0], rx_q.pop_front()};
    return v;
  endfunction
endmodule
