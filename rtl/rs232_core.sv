// rs232_core: serial link to the PC for the encryption path.
//
// The receiver samples rxd (8 data bits, no parity, one stop bit, LSB first)
// in the middle of each bit of CLKS_PER_BIT cycles and packs 16 bytes into one
// 128-bit block, first byte in bits [127:120].  When the 16th byte has
// arrived, blk_out is presented with a one-cycle blk_out_valid.  A block
// given on blk_in with blk_in_valid is sent back the same way, first byte
// first.  115200 baud at 50 MHz (CLKS_PER_BIT = 434) and the 16-byte
// framing are this design's choices.
//
// Interface: clk, rst_n, en (the core stalls while low), rxd, txd;
// blk_out/blk_out_valid towards the cipher, blk_in/blk_in_valid from it,
// tx_busy.  A block offered while tx_busy is dropped.
module rs232_core #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         rxd,
  output logic         txd,
  output logic [127:0] blk_out,
  output logic         blk_out_valid,
  input  logic [127:0] blk_in,
  input  logic         blk_in_valid,
  output logic         tx_busy
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  // ---------------- receive ----------------
  logic          rx_s1, rx_s2;
  logic          rx_act;
  logic [CW-1:0] rx_cnt;
  logic [3:0]    rx_bit;
  logic [7:0]    rx_sh;
  logic [3:0]    rx_bytes;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s1 <= 1'b1; rx_s2 <= 1'b1;
      rx_act <= 1'b0; rx_cnt <= '0; rx_bit <= '0; rx_sh <= '0;
      rx_bytes <= '0; blk_out <= '0; blk_out_valid <= 1'b0;
    end else if (en) begin
      rx_s1 <= rxd;
      rx_s2 <= rx_s1;
      blk_out_valid <= 1'b0;
      if (!rx_act) begin
        if (!rx_s2) begin                         // start bit seen
          rx_act <= 1'b1;
          rx_cnt <= CW'(CLKS_PER_BIT / 2);
          rx_bit <= '0;
        end
      end else if (rx_cnt == CW'(CLKS_PER_BIT - 1)) begin
        rx_cnt <= '0;                              // middle of a bit
        if (rx_bit == 4'd0) begin
          if (rx_s2) rx_act <= 1'b0;               // false start
          else       rx_bit <= 4'd1;
        end else if (rx_bit <= 4'd8) begin
          rx_sh  <= {rx_s2, rx_sh[7:1]};
          rx_bit <= rx_bit + 1'b1;
        end else begin                             // stop bit
          rx_act <= 1'b0;
          if (rx_s2) begin
            blk_out  <= {blk_out[119:0], rx_sh};
            rx_bytes <= rx_bytes + 1'b1;
            if (rx_bytes == 4'd15) blk_out_valid <= 1'b1;
          end
        end
      end else begin
        rx_cnt <= rx_cnt + 1'b1;
      end
    end
  end

  // ---------------- transmit ----------------
  logic [127:0]  tx_buf;
  logic [4:0]    tx_left;     // bytes still to send, including the current one
  logic [9:0]    tx_frame;    // stop, data, start (shifted out LSB first)
  logic [3:0]    tx_bit;
  logic [CW-1:0] tx_cnt;
  logic          tx_act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_buf <= '0; tx_left <= '0; tx_frame <= '1; tx_bit <= '0;
      tx_cnt <= '0; tx_act <= 1'b0; txd <= 1'b1;
    end else if (en) begin
      if (!tx_act) begin
        txd <= 1'b1;
        if (blk_in_valid) begin
          tx_buf  <= blk_in;
          tx_left <= 5'd16;
          tx_act  <= 1'b1;
        end
      end else if (tx_bit == 4'd0 && tx_cnt == '0 && tx_frame == '1) begin
        if (tx_left == '0) begin
          tx_act <= 1'b0;
        end else begin                              // load the next byte
          tx_frame <= {1'b1, tx_buf[127:120], 1'b0};
          tx_buf   <= {tx_buf[119:0], 8'h00};
          tx_left  <= tx_left - 1'b1;
        end
      end else begin
        txd <= tx_frame[0];
        if (tx_cnt == CW'(CLKS_PER_BIT - 1)) begin
          tx_cnt   <= '0;
          tx_frame <= {1'b1, tx_frame[9:1]};
          tx_bit   <= (tx_bit == 4'd9) ? 4'd0 : tx_bit + 1'b1;
          if (tx_bit == 4'd9) tx_frame <= '1;
        end else begin
          tx_cnt <= tx_cnt + 1'b1;
        end
      end
    end
  end

  assign tx_busy = tx_act;
endmodule
