// ipp_pkg: types and constants shared by the voltage side-channel receiver,
// the protection state machine, the verifier and the case-study system.
//
// The numbers that come from the design description are the supply levels
// (0 V / 2.8 V / 3.2 V), the 50 MHz clock, the half-bit time of 1024 clock
// cycles, the 80-bit codeword and the example sampling window c = 128 with the
// example threshold bound of about 35.56 oscillations.  The command encoding
// and the four codeword values are this design's own choices.
package ipp_pkg;
  timeunit 1ns; timeprecision 1ps;

  // Result of comparing two consecutive oscillation counts.
  typedef enum logic [1:0] {
    EDGE_SAME = 2'd0,
    EDGE_RISE = 2'd1,
    EDGE_FALL = 2'd2
  } edge_t;

  // States of the protection state machine.
  typedef enum logic [1:0] {
    ST_AUTH   = 2'd0,   // waiting for the codeword, core runs normally
    ST_NORMAL = 2'd1,   // authenticated, core runs normally
    ST_OFF    = 2'd2,   // core disabled, all outputs zero
    ST_ZEROS  = 2'd3    // data outputs zero, control outputs kept
  } prot_state_t;

  // Commands, in the order in which they are listed (first = 0).
  typedef enum logic [1:0] {
    CMD_OFF      = 2'd0,
    CMD_ZEROS    = 2'd1,
    CMD_NORMAL   = 2'd2,
    CMD_DESELECT = 2'd3
  } cmd_t;

  localparam int unsigned CMD_BITS = 2;
  localparam int unsigned CW_BITS  = 80;

  // Receiver / transmitter timing at the 50 MHz fixed clock.
  localparam int unsigned SC_HALF_BIT_CYCLES = 1024;
  localparam int unsigned SC_WINDOW_CYCLES   = 128;
  localparam int unsigned SC_THRESHOLD       = 35;
  localparam int unsigned SC_CNT_W           = 16;

  // Supply levels in millivolts.
  localparam int unsigned VRESET_MV = 0;
  localparam int unsigned V0_MV     = 2800;
  localparam int unsigned V1_MV     = 3200;

  // One secret codeword per protected core (arbitrary values).
  localparam logic [CW_BITS-1:0] CW_RS232 = 80'hC3A5_19E7_5B20_D48F_6E13;
  localparam logic [CW_BITS-1:0] CW_AES   = 80'h5D2C_88F1_A03B_E769_14C2;
  localparam logic [CW_BITS-1:0] CW_LFSR  = 80'h9B47_06DE_3F81_C25A_7730;
  localparam logic [CW_BITS-1:0] CW_VGA   = 80'h2E95_F1C0_4A7D_B836_0F5B;
endpackage
