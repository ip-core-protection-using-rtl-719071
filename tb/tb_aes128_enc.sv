// tb_aes128_enc: known-answer tests from the AES standard (FIPS-197
// appendices B and C.1), the 10-cycle latency, and a stall with en low.
//
// Expected values are the standard's published test vectors, not the
// source description, which gives none.
module tb_aes128_enc;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  logic en = 1, start = 0;
  logic [127:0] key, pt, ct;
  logic done, busy;
  int checks = 0, failures = 0;

  aes128_enc dut (.clk(clk), .rst_n(rst_n), .en(en), .start(start), .key(key), .pt(pt),
                  .ct(ct), .done(done), .busy(busy));

  always #10 clk = ~clk;

  task automatic kat(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp,
                     input int stall);
    int lat = 0;
    @(negedge clk);
    key = k; pt = p; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      if (stall > 0 && lat == 3) begin en = 0; repeat (stall) @(negedge clk); en = 1; end
      @(negedge clk);
      lat++;
    end
    checks += 2;
    if (ct != exp) begin failures++; $display("FAIL: ct=%h expected %h", ct, exp); end
    if (lat != 10) begin failures++; $display("FAIL: latency %0d enabled cycles", lat); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #35 rst_n = 1;
    kat(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32, 0);
    kat(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0);
    kat(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
