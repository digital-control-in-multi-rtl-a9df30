// mpc_top: complete digital controller for an N-phase interleaved d.c.-d.c.
// converter with passive current sharing (no current loop).
//
// Four blocks, connected as in the document's controller architecture:
//   adc_controller   runs the external A/D converter, gives an 11-bit Vout
//   duty_controller  control law: one duty cycle per switching period
//   signal_generator 8-bit digital PWM; the same duty cycle drives every
//                    phase, each phase delayed T_switch / N_PHASES from the
//                    previous one; high/low-side pair with dead times
//   protections      Vout limitation and 0.95 maximum duty cycle
// The signal generator tells the duty controller when a new period starts
// (new_cycle) and receives the 8-bit duty word; the protections block sees
// Vout and both pulse vectors and drives the pins.
//
// At the defaults (8 phases, 8-bit counter) a 20 MHz clock gives 256-cycle,
// 78.125 kHz periods and 16 driving signals, as in the document's prototype.
// vref, vout_limit and dead_time are run-time inputs here; the document gives
// them no values. Outputs are registered once (inside protections).
module mpc_top
#(
  parameter int unsigned N_PHASES = mpc_pkg::N_PHASES,
  parameter int unsigned CNT_W    = mpc_pkg::CNT_W,
  parameter int unsigned ADC_W    = mpc_pkg::ADC_W,
  parameter int unsigned VOUT_W   = mpc_pkg::VOUT_W,
  parameter int unsigned DT_W     = mpc_pkg::DT_W,
  parameter int unsigned MAX_ON   = mpc_pkg::MAX_ON
) (
  input  logic                clk,
  input  logic                rst,          // synchronous, active high
  // configuration
  input  logic [VOUT_W-1:0]   vref,         // Vout target
  input  logic [VOUT_W-1:0]   vout_limit,   // overvoltage threshold
  input  logic [DT_W-1:0]     dead_time,    // dead time, clock cycles
  // A/D converter
  output logic                adc_convst,
  output logic                adc_rd,
  input  logic                adc_busy,
  input  logic [ADC_W-1:0]    adc_data,
  // gate drivers
  output logic [N_PHASES-1:0] pulse_h,
  output logic [N_PHASES-1:0] pulse_l,
  // status
  output logic [CNT_W-1:0]    duty,         // current duty word
  output logic [VOUT_W-1:0]   vout,         // current Vout sample
  output logic                vout_valid,   // new Vout sample taken
  output logic                new_cycle,
  output logic                ov_trip,
  output logic [N_PHASES-1:0] dmax_trip,
  output logic                sample_rejected
);

  logic [N_PHASES-1:0] gen_h, gen_l;

  adc_controller #(
    .ADC_W (ADC_W),
    .VOUT_W(VOUT_W)
  ) u_adc (
    .clk            (clk),
    .rst            (rst),
    .adc_convst     (adc_convst),
    .adc_rd         (adc_rd),
    .adc_busy       (adc_busy),
    .adc_data       (adc_data),
    .vout           (vout),
    .vout_valid     (vout_valid),
    .sample_rejected(sample_rejected)
  );

  duty_controller #(
    .CNT_W (CNT_W),
    .VOUT_W(VOUT_W)
  ) u_duty (
    .clk      (clk),
    .rst      (rst),
    .new_cycle(new_cycle),
    .vout     (vout),
    .vref     (vref),
    .duty     (duty)
  );

  signal_generator #(
    .N_PHASES(N_PHASES),
    .CNT_W   (CNT_W),
    .DT_W    (DT_W)
  ) u_gen (
    .clk      (clk),
    .rst      (rst),
    .duty     (duty),
    .dead_time(dead_time),
    .new_cycle(new_cycle),
    .pulse_h  (gen_h),
    .pulse_l  (gen_l)
  );

  protections #(
    .N_PHASES(N_PHASES),
    .VOUT_W  (VOUT_W),
    .MAX_ON  (MAX_ON)
  ) u_prot (
    .clk       (clk),
    .rst       (rst),
    .vout      (vout),
    .vout_limit(vout_limit),
    .pulse_h_in(gen_h),
    .pulse_l_in(gen_l),
    .pulse_h   (pulse_h),
    .pulse_l   (pulse_l),
    .ov_trip   (ov_trip),
    .dmax_trip (dmax_trip)
  );

endmodule
