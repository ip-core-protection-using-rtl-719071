// ipp_system: the complete proof-of-authorship set-up.
//
// A verifier board (verifier_seq + sc_transmitter) sets the two control
// wires of the supply circuit; the supply model turns them into the FPGA
// supply voltage; the protected FPGA design (case_study_fpga) receives
// codewords and commands through the ring-oscillator receivers in its four
// protection layers.  Both boards run from 50 MHz clocks; here they share one.
// The supply circuit is a behavioural model, so this top is for simulation;
// case_study_fpga is the synthesizable FPGA design.
//
// V_reset (c1 c0 = 00, power_off) resets the chip: the FPGA design is held in
// reset while its supply is below POR_MV, which stands in for the device's own
// power-on reset.  Every protection layer then returns to authentication.
//
// Interface: clk, rst_n; verifier control (start, cw_db, cw_count, power_off,
// and status busy/done/cur_index/cur_cmd/cmd_strobe); the PC serial pins
// (rxd, txd); VGA pins; the protection states and the supply voltage for
// observation.
//
// The chain verifier -> control wires -> supply -> protected FPGA follows the
// published set-up.  Sharing one clock between the two boards and keeping
// the PC and monitor outside as pins are this design's choices.
module ipp_system
  import ipp_pkg::*;
#(
  parameter int unsigned NUM_CW      = 8,
  parameter int unsigned HOLD_CYCLES = 262144,
  parameter int unsigned POR_MV      = 1000
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [NUM_CW-1:0][CW_BITS-1:0] cw_db,
  input  logic [$clog2(NUM_CW+1)-1:0]   cw_count,
  input  logic                          power_off,
  output logic                          busy,
  output logic                          done,
  output logic [$clog2(NUM_CW+1)-1:0]   cur_index,
  output cmd_t                          cur_cmd,
  output logic                          cmd_strobe,
  input  logic                          rxd,
  output logic                          txd,
  output logic                          vga_hsync_n,
  output logic                          vga_vsync_n,
  output logic [3:0]                    vga_rgb,
  output prot_state_t                   st_rs232,
  output prot_state_t                   st_aes,
  output prot_state_t                   st_lfsr,
  output prot_state_t                   st_vga,
  output logic [15:0]                   vcc_mv
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned LW = $clog2(CW_BITS + 1);

  logic               tx_start, tx_done, tx_busy;
  logic [CW_BITS-1:0] tx_bits;
  logic [LW-1:0]      tx_nbits;
  logic               c1, c0;

  verifier_seq #(.NUM_CW(NUM_CW), .CW_LEN(CW_BITS), .HOLD_CYCLES(HOLD_CYCLES)) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .cw_db      (cw_db),
    .cw_count   (cw_count),
    .tx_start   (tx_start),
    .tx_bits    (tx_bits),
    .tx_nbits   (tx_nbits),
    .tx_done    (tx_done),
    .busy       (busy),
    .done       (done),
    .cur_index  (cur_index),
    .cur_cmd    (cur_cmd),
    .cmd_strobe (cmd_strobe)
  );

  sc_transmitter #(.MAX_BITS(CW_BITS), .HALF_BIT_CYCLES(SC_HALF_BIT_CYCLES)) u_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (tx_start),
    .bits      (tx_bits),
    .nbits     (tx_nbits),
    .power_off (power_off),
    .c1        (c1),
    .c0        (c0),
    .busy      (tx_busy),
    .done      (tx_done)
  );

  supply_model #(.VRESET_MV(VRESET_MV), .V0_MV(V0_MV), .V1_MV(V1_MV)) u_supply (
    .c1     (c1),
    .c0     (c0),
    .vcc_mv (vcc_mv)
  );

  // power-on reset of the FPGA: held while the supply is too low to run it
  logic fpga_rst_n;
  assign fpga_rst_n = rst_n && (vcc_mv >= 16'(POR_MV));

  case_study_fpga u_fpga (
    .clk         (clk),
    .rst_n       (fpga_rst_n),
    .vcc_mv      (vcc_mv),
    .rxd         (rxd),
    .txd         (txd),
    .vga_hsync_n (vga_hsync_n),
    .vga_vsync_n (vga_vsync_n),
    .vga_rgb     (vga_rgb),
    .st_rs232    (st_rs232),
    .st_aes      (st_aes),
    .st_lfsr     (st_lfsr),
    .st_vga      (st_vga)
  );
endmodule
