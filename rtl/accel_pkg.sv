// accel_pkg: types and constants shared by the accelerometer front-end.
//
// The coarse counter is 11 bits wide and the tapped delay line has 144
// latched taps; both numbers are those of the published TDC. The fine code
// is 8 bits wide (dec[7:0]), so the combined output is 11 + 8 = 19 bits,
// which holds 2^7 * (2^11 - 1) + 144. The oscillator operating modes
// (reset/shut-down, sensing, force-feedback drive) follow the three modes
// of the sensing oscillator; their two-bit encoding is this design's own.
`timescale 1ns/1ps
package accel_pkg;

  localparam int unsigned CNT_W    = 11;   // coarse oscillator-period counter
  localparam int unsigned TDL_TAPS = 144;  // latched taps of the delay line
  localparam int unsigned DEC_W    = 8;    // fine code from the decoder
  localparam int unsigned DOUT_W   = CNT_W + DEC_W;

  // Operating mode of the relaxation oscillator / MEMS electrodes.
  typedef enum logic [1:0] {
    MODE_RESET = 2'd0,  // all MEMS terminals at Vdd/2, ramps discharged
    MODE_SENSE = 2'd1,  // free-running capacitance-ratio oscillator
    MODE_DRIVE = 2'd2   // mid grounded, force pulses on top or bottom
  } osc_mode_e;

endpackage
