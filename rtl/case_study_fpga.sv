// case_study_fpga: the protected FPGA design of the case study.
//
// Two independent tasks run side by side, and each of the four IP cores sits
// in its own protection layer with its own side-channel receiver, state
// machine and codeword:
//   * encryption path: the PC sends 16-byte blocks over RS-232, the AES-128
//     core encrypts them with a fixed key, and the result goes back to the PC;
//   * display path: a 128-bit LFSR produces pseudo-random 4-bit pixels that a
//     VGA controller shows on a monitor.
// Signal split between "control" and "data" for the protection layers:
//   RS-232: control = {blk_out_valid, txd}, data = received block
//   AES:    control = done,                data = ciphertext
//   LFSR:   control = out_valid,           data = 4-bit pixel
//   VGA:    control = {hsync_n, vsync_n},  data = 4-bit colour
// The AES key and this signal split are this design's choices.
//
// Interface: clk (50 MHz fixed clock), rst_n, vcc_mv (supply model for the
// ring oscillators), rxd/txd to the PC, VGA pins, and the four protection
// states for observation.
module case_study_fpga
  import ipp_pkg::*;
#(
  parameter logic [127:0] AES_KEY         = 128'h000102030405060708090a0b0c0d0e0f,
  parameter int unsigned  CLKS_PER_BIT    = 434,
  parameter int unsigned  WINDOW_CYCLES   = SC_WINDOW_CYCLES,
  parameter int unsigned  THRESHOLD       = SC_THRESHOLD,
  parameter int unsigned  HALF_BIT_CYCLES = SC_HALF_BIT_CYCLES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] vcc_mv,
  input  logic        rxd,
  output logic        txd,
  output logic        vga_hsync_n,
  output logic        vga_vsync_n,
  output logic [3:0]  vga_rgb,
  output prot_state_t st_rs232,
  output prot_state_t st_aes,
  output prot_state_t st_lfsr,
  output prot_state_t st_vga
);
  timeunit 1ns; timeprecision 1ps;

  // ---------------- RS-232 ----------------
  logic         uart_en, uart_txd, uart_blk_valid, uart_tx_busy;
  logic [127:0] uart_blk;
  logic [1:0]   uart_ctrl_o;
  logic [127:0] uart_data_o;
  // ---------------- AES ----------------
  logic         aes_en, aes_done, aes_busy;
  logic [127:0] aes_ct;
  logic [0:0]   aes_ctrl_o;
  logic [127:0] aes_data_o;

  rs232_core #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk           (clk),
    .rst_n         (rst_n),
    .en            (uart_en),
    .rxd           (rxd),
    .txd           (uart_txd),
    .blk_out       (uart_blk),
    .blk_out_valid (uart_blk_valid),
    .blk_in        (aes_data_o),
    .blk_in_valid  (aes_ctrl_o[0]),
    .tx_busy       (uart_tx_busy)
  );

  protect_layer #(
    .CTRL_W(2), .DATA_W(128), .CW_LEN(CW_BITS), .WINDOW_CYCLES(WINDOW_CYCLES),
    .THRESHOLD(THRESHOLD), .HALF_BIT_CYCLES(HALF_BIT_CYCLES)
  ) u_prot_uart (
    .clk (clk), .rst_n (rst_n), .vcc_mv (vcc_mv), .codeword (CW_RS232),
    .en_in     (1'b1),
    .core_en   (uart_en),
    .core_ctrl ({uart_blk_valid, uart_txd}),
    .core_data (uart_blk),
    .ctrl_out  (uart_ctrl_o),
    .data_out  (uart_data_o),
    .state     (st_rs232)
  );

  assign txd = uart_ctrl_o[0];

  aes128_enc u_aes (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (aes_en),
    .start (uart_ctrl_o[1]),
    .key   (AES_KEY),
    .pt    (uart_data_o),
    .ct    (aes_ct),
    .done  (aes_done),
    .busy  (aes_busy)
  );

  protect_layer #(
    .CTRL_W(1), .DATA_W(128), .CW_LEN(CW_BITS), .WINDOW_CYCLES(WINDOW_CYCLES),
    .THRESHOLD(THRESHOLD), .HALF_BIT_CYCLES(HALF_BIT_CYCLES)
  ) u_prot_aes (
    .clk (clk), .rst_n (rst_n), .vcc_mv (vcc_mv), .codeword (CW_AES),
    .en_in     (1'b1),
    .core_en   (aes_en),
    .core_ctrl (aes_done),
    .core_data (aes_ct),
    .ctrl_out  (aes_ctrl_o),
    .data_out  (aes_data_o),
    .state     (st_aes)
  );

  // ---------------- LFSR ----------------
  logic       lfsr_en, lfsr_valid;
  logic [3:0] lfsr_data;
  logic [0:0] lfsr_ctrl_o;
  logic [3:0] lfsr_data_o;

  lfsr128 #(.OUT_W(4)) u_lfsr (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (lfsr_en),
    .data      (lfsr_data),
    .out_valid (lfsr_valid)
  );

  protect_layer #(
    .CTRL_W(1), .DATA_W(4), .CW_LEN(CW_BITS), .WINDOW_CYCLES(WINDOW_CYCLES),
    .THRESHOLD(THRESHOLD), .HALF_BIT_CYCLES(HALF_BIT_CYCLES)
  ) u_prot_lfsr (
    .clk (clk), .rst_n (rst_n), .vcc_mv (vcc_mv), .codeword (CW_LFSR),
    .en_in     (1'b1),
    .core_en   (lfsr_en),
    .core_ctrl (lfsr_valid),
    .core_data (lfsr_data),
    .ctrl_out  (lfsr_ctrl_o),
    .data_out  (lfsr_data_o),
    .state     (st_lfsr)
  );

  // ---------------- VGA ----------------
  logic       vga_en, hs_n, vs_n;
  logic [3:0] rgb;
  logic [1:0] vga_ctrl_o;

  vga_ctrl u_vga (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (vga_en),
    .pix_in    (lfsr_data_o),
    .pix_valid (lfsr_ctrl_o[0]),
    .hsync_n   (hs_n),
    .vsync_n   (vs_n),
    .rgb       (rgb)
  );

  protect_layer #(
    .CTRL_W(2), .DATA_W(4), .CW_LEN(CW_BITS), .WINDOW_CYCLES(WINDOW_CYCLES),
    .THRESHOLD(THRESHOLD), .HALF_BIT_CYCLES(HALF_BIT_CYCLES)
  ) u_prot_vga (
    .clk (clk), .rst_n (rst_n), .vcc_mv (vcc_mv), .codeword (CW_VGA),
    .en_in     (1'b1),
    .core_en   (vga_en),
    .core_ctrl ({hs_n, vs_n}),
    .core_data (rgb),
    .ctrl_out  (vga_ctrl_o),
    .data_out  (vga_rgb),
    .state     (st_vga)
  );

  assign {vga_hsync_n, vga_vsync_n} = vga_ctrl_o;
endmodule
