// dtc_pkg: widths and constants shared by the DTC-assisted phase detector.
//
// Phases are unsigned fixed point in units of one CKV/2 period: INT_W
// integer bits (wrapping) and FRAC_W fractional bits. 1/K_DTC (the number
// of DTC steps in one CKV/2 period) has CTRL_W integer and INVK_FRAC
// fractional bits. The 6-bit, 64-stage DTC follows the design; every other
// width here is this implementation's choice.
`timescale 1ps/1fs
package dtc_pkg;
  localparam int INT_W     = 8;   // integer phase bits (modulo 256 periods)
  localparam int FRAC_W    = 12;  // fractional phase bits
  localparam int CTRL_W    = 6;   // DTC control code width
  localparam int N_STAGES  = 64;  // DTC delay stages, 2**CTRL_W
  localparam int INVK_FRAC = 8;   // fractional bits of 1/K_DTC
endpackage
