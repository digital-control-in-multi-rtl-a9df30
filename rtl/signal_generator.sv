// signal_generator: multi-phase digital PWM with phase shifting and dead times.
//
// One free-running CNT_W-bit counter sets the switching period: 2**CNT_W clock
// cycles (256 cycles, i.e. 78.125 kHz from a 20 MHz clock, in the prototype).
// A single duty cycle is produced by the control law and every phase uses it;
// phase k sees the counter shifted back by k * 2**CNT_W / N_PHASES cycles, so
// each phase is delayed T_switch / N_PHASES from the previous one and the
// driving signals are spread evenly over the period. All of this follows the
// document.
//
// Each phase drives two switches (bi-directional buck): pulse_h[k] is the main
// switch, high for exactly `duty` cycles from the start of the phase's own
// period; pulse_l[k] is its near-complement, kept off for `dead_time` cycles
// after pulse_h falls and for `dead_time` cycles before the next period starts
// (where pulse_h rises). The document says only that dead times are
// programmable; placing them on the low-side signal so that the high-side
// on-time stays exactly `duty` is this design's choice.
//
// Timing: new_cycle is high for one clock while the master counter is 0, which
// is also the first cycle of phase 0's period. Each phase samples `duty` and
// `dead_time` in the first cycle of its own period and holds them for the whole
// period, so a change never cuts a pulse short. After reset a phase keeps both
// switches off until its own first period begins (this design's choice). pulse_h/pulse_l are decoded
// from registers with no further pipeline; the protections block registers
// them before they leave the chip.
module signal_generator
#(
  parameter int unsigned N_PHASES = mpc_pkg::N_PHASES,
  parameter int unsigned CNT_W    = mpc_pkg::CNT_W,
  parameter int unsigned DT_W     = mpc_pkg::DT_W
) (
  input  logic                clk,
  input  logic                rst,        // synchronous, active high
  input  logic [CNT_W-1:0]    duty,       // on-time in clock cycles, 0 .. 2**CNT_W-1
  input  logic [DT_W-1:0]     dead_time,  // dead time in clock cycles
  output logic                new_cycle,  // one-clock pulse at the start of each period
  output logic [N_PHASES-1:0] pulse_h,    // high-side driving signals
  output logic [N_PHASES-1:0] pulse_l     // low-side driving signals
);

  localparam int unsigned PERIOD = 2 ** CNT_W;

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] duty_q [N_PHASES];
  logic [DT_W-1:0]  dt_q   [N_PHASES];

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  assign new_cycle = (cnt == '0) && !rst;

  for (genvar k = 0; k < N_PHASES; k++) begin : g_phase
    localparam logic [CNT_W-1:0] OFFSET = CNT_W'((k * PERIOD) / N_PHASES);

    logic [CNT_W-1:0] ph_cnt;      // position inside this phase's own period
    logic [CNT_W-1:0] duty_eff;
    logic [DT_W-1:0]  dt_eff;
    logic [CNT_W:0]   l_on, l_off; // low-side window [l_on, l_off)
    logic             run_q;       // phase has started its first period
    logic             run;

    assign ph_cnt   = cnt - OFFSET;
    assign duty_eff = (ph_cnt == '0) ? duty      : duty_q[k];
    assign dt_eff   = (ph_cnt == '0) ? dead_time : dt_q[k];
    assign run      = (ph_cnt == '0) || run_q;
    assign l_on     = {1'b0, duty_eff} + (CNT_W+1)'(dt_eff);
    assign l_off    = (CNT_W+1)'(PERIOD) - (CNT_W+1)'(dt_eff);

    always_ff @(posedge clk) begin
      if (rst) begin
        duty_q[k] <= '0;
        dt_q[k]   <= '0;
        run_q     <= 1'b0;
      end else begin
        duty_q[k] <= duty_eff;
        dt_q[k]   <= dt_eff;
        run_q     <= run;
      end
    end

    always_comb begin
      pulse_h[k] = !rst && run && (ph_cnt < duty_eff);
      pulse_l[k] = !rst && run && ({1'b0, ph_cnt} >= l_on) && ({1'b0, ph_cnt} < l_off);
    end

    // The two switches of a phase must never conduct together.
    a_no_shoot_through : assert property (@(posedge clk) disable iff (rst) !(pulse_h[k] && pulse_l[k]));
  end

endmodule
