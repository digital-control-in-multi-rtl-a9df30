// mpc_pkg: shared constants and types of the multi-phase converter controller.
//
// The numbers are those of the 8-phase prototype the controller was built for:
// 8 phases, an 8-bit PWM counter (256 duty-cycle steps, 20 MHz / 256 =
// 78.125 kHz switching), a 12-bit signed A/D sample and an 11-bit unsigned
// internal Vout. The dead-time width and the control-law gains are this
// design's own choices.
package mpc_pkg;

  // Number of interleaved phases (two driving signals each).
  localparam int unsigned N_PHASES  = 8;
  // Width of the PWM counter and of the duty cycle word.
  localparam int unsigned CNT_W     = 8;
  // Width of the raw A/D sample (two's complement).
  localparam int unsigned ADC_W     = 12;
  // Width of the internal, unsigned Vout.
  localparam int unsigned VOUT_W    = 11;
  // Width of the programmable dead time, in clock cycles.
  localparam int unsigned DT_W      = 4;
  // Maximum on-time: floor(0.95 * 256) counts.
  localparam int unsigned MAX_ON    = 243;

endpackage
