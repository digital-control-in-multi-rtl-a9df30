// duty_controller: the control law that keeps Vout at its target.
//
// Once per switching period (on new_cycle) it takes the latest Vout sample,
// forms the error e = vref - vout and updates a proportional-integral law
//   integ <= clamp(integ + KI*e, 0, (2**CNT_W-1) << FRAC)
//   duty  <= clamp((integ_new + KP*e) >>> FRAC, 0, 2**CNT_W-1)
// where integ carries FRAC fraction bits of a duty-cycle count. The document
// states only what this block does (compute the duty cycle from Vout so that
// Vout stays at its target, once per cycle announced by the signal generator)
// and not the law itself; the PI form, the gains, the clamp of the integrator
// (anti wind-up) and the vref input are this design's choices.
//
// Timing: duty changes on the clock edge that ends the new_cycle pulse, i.e.
// one clock after the period starts. Reset clears integ and duty (all
// switches' on-time zero).
module duty_controller
#(
  parameter int unsigned CNT_W  = mpc_pkg::CNT_W,
  parameter int unsigned VOUT_W = mpc_pkg::VOUT_W,
  parameter int unsigned FRAC   = 8,   // fraction bits of the integrator
  parameter int          KP     = 16,  // proportional gain, in 2**-FRAC duty counts per Vout LSB
  parameter int          KI     = 2    // integral gain, same unit, per period
) (
  input  logic              clk,
  input  logic              rst,        // synchronous, active high
  input  logic              new_cycle,  // start of a switching period
  input  logic [VOUT_W-1:0] vout,       // measured output voltage, unsigned
  input  logic [VOUT_W-1:0] vref,       // target output voltage, same scale
  output logic [CNT_W-1:0]  duty
);

  localparam int ACC_W = CNT_W + FRAC + VOUT_W + 8;
  localparam logic signed [ACC_W-1:0] INTEG_MAX = ACC_W'(((2 ** CNT_W) - 1) * (2 ** FRAC));
  localparam logic signed [ACC_W-1:0] DUTY_MAX  = ACC_W'((2 ** CNT_W) - 1);

  logic signed [ACC_W-1:0] integ;
  logic signed [ACC_W-1:0] err, integ_sum, integ_new, u, u_int;

  always_comb begin
    err       = ACC_W'(signed'({1'b0, vref})) - ACC_W'(signed'({1'b0, vout}));
    integ_sum = integ + err * ACC_W'(KI);
    if (integ_sum < 0)              integ_new = '0;
    else if (integ_sum > INTEG_MAX) integ_new = INTEG_MAX;
    else                            integ_new = integ_sum;
    u     = integ_new + err * ACC_W'(KP);
    u_int = u >>> FRAC;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      integ <= '0;
      duty  <= '0;
    end else if (new_cycle) begin
      integ <= integ_new;
      if (u_int < 0)             duty <= '0;
      else if (u_int > DUTY_MAX) duty <= '1;
      else                       duty <= u_int[CNT_W-1:0];
    end
  end

endmodule
