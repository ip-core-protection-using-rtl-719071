// protect_layer: the protection wrapper placed around one IP core.
//
// It holds a voltage side-channel receiver and the protection state machine,
// and the three multiplexers that sit on the core's enable input and on its
// control and data outputs:
//   state      core_en   ctrl_out   data_out
//   AUTH       en_in     core_ctrl  core_data
//   NORMAL     en_in     core_ctrl  core_data
//   OFF        0         0          0
//   ZEROS      en_in     core_ctrl  0
// Outputs are forced to zero in OFF as well, so that cores without an enable
// are also switched off.  The multiplexers are combinational.
//
// Interface: clk, rst_n, vcc_mv (drives the ring-oscillator model only),
// codeword; en_in (enable from the system) and core_en (to the core);
// core_ctrl/core_data (from the core) and ctrl_out/data_out (to the system);
// state for observation.
//
// The three multiplexers (en, control, data) and the codeword input follow
// the published wrapper; which core signals count as control and which as
// data is chosen where the wrapper is instantiated.
module protect_layer
  import ipp_pkg::edge_t, ipp_pkg::EDGE_SAME, ipp_pkg::EDGE_RISE, ipp_pkg::EDGE_FALL, ipp_pkg::prot_state_t;
#(
  parameter int unsigned CTRL_W          = 1,
  parameter int unsigned DATA_W          = 8,
  parameter int unsigned CW_LEN          = 80,
  parameter int unsigned WINDOW_CYCLES   = 128,
  parameter int unsigned THRESHOLD       = 35,
  parameter int unsigned HALF_BIT_CYCLES = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       vcc_mv,
  input  logic [CW_LEN-1:0] codeword,
  input  logic              en_in,
  output logic              core_en,
  input  logic [CTRL_W-1:0] core_ctrl,
  input  logic [DATA_W-1:0] core_data,
  output logic [CTRL_W-1:0] ctrl_out,
  output logic [DATA_W-1:0] data_out,
  output prot_state_t       state
);
  timeunit 1ns; timeprecision 1ps;

  logic  bit_valid, bit_data, frame_active;
  logic  edge_valid;
  edge_t edge_kind;
  logic  core_off, zero_data;

  sc_receiver #(
    .WINDOW_CYCLES   (WINDOW_CYCLES),
    .THRESHOLD       (THRESHOLD),
    .HALF_BIT_CYCLES (HALF_BIT_CYCLES)
  ) u_rx (
    .clk          (clk),
    .rst_n        (rst_n),
    .vcc_mv       (vcc_mv),
    .data_valid   (bit_valid),
    .data         (bit_data),
    .frame_active (frame_active),
    .edge_valid   (edge_valid),
    .edge_kind    (edge_kind)
  );

  auth_fsm #(.CW_LEN(CW_LEN)) u_fsm (
    .clk       (clk),
    .rst_n     (rst_n),
    .bit_valid (bit_valid),
    .bit_data  (bit_data),
    .codeword  (codeword),
    .state     (state),
    .core_off  (core_off),
    .zero_data (zero_data)
  );

  assign core_en  = core_off  ? 1'b0 : en_in;
  assign ctrl_out = core_off  ? '0   : core_ctrl;
  assign data_out = zero_data ? '0   : core_data;
endmodule
