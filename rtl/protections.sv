// protections: the safety layer between the PWM and the gate drivers.
//
// Two protections, both taken from the document:
//  * Vout limitation: whenever Vout is above `vout_limit` (a run-time input),
//    every driving signal of every phase is forced off. The shutdown lasts as
//    long as the overvoltage (not latched).
//  * Maximum duty cycle 0.95: a high-side pulse that has been on for MAX_ON
//    consecutive clocks (floor(0.95 * 256) = 243 at the default size) is cut
//    until the PWM drops it. The low-side signal is left to the PWM, which
//    only turns it on after its own dead time, so no shoot-through results.
// The document places this block after the signal generator and gives it Vout
// but not the duty word; enforcing the duty limit by timing each high-side
// pulse is this design's reading of that.
//
// Timing: all outputs are registered, one clock behind the inputs; a Vout
// above the limit turns everything off on the next clock edge. Reset drives
// every output low.
module protections
#(
  parameter int unsigned N_PHASES = mpc_pkg::N_PHASES,
  parameter int unsigned VOUT_W   = mpc_pkg::VOUT_W,
  parameter int unsigned MAX_ON   = mpc_pkg::MAX_ON
) (
  input  logic                clk,
  input  logic                rst,          // synchronous, active high
  input  logic [VOUT_W-1:0]   vout,
  input  logic [VOUT_W-1:0]   vout_limit,
  input  logic [N_PHASES-1:0] pulse_h_in,
  input  logic [N_PHASES-1:0] pulse_l_in,
  output logic [N_PHASES-1:0] pulse_h,
  output logic [N_PHASES-1:0] pulse_l,
  output logic                ov_trip,      // outputs held off by overvoltage
  output logic [N_PHASES-1:0] dmax_trip     // phase's high-side pulse being cut
);

  localparam int unsigned ON_W = $clog2(MAX_ON + 1);

  logic over;
  assign over = (vout > vout_limit);

  for (genvar k = 0; k < N_PHASES; k++) begin : g_phase
    logic [ON_W-1:0] on_cnt;   // clocks the high-side input has been on
    logic            cut;

    assign cut = pulse_h_in[k] && (on_cnt >= ON_W'(MAX_ON));

    always_ff @(posedge clk) begin
      if (rst) begin
        on_cnt       <= '0;
        pulse_h[k]   <= 1'b0;
        pulse_l[k]   <= 1'b0;
        dmax_trip[k] <= 1'b0;
      end else begin
        if (!pulse_h_in[k])             on_cnt <= '0;
        else if (on_cnt < ON_W'(MAX_ON)) on_cnt <= on_cnt + 1'b1;
        pulse_h[k]   <= pulse_h_in[k] && !cut && !over;
        pulse_l[k]   <= pulse_l_in[k] && !over;
        dmax_trip[k] <= cut;
      end
    end

    a_no_shoot_through : assert property (@(posedge clk) disable iff (rst) !(pulse_h[k] && pulse_l[k]));
  end

  always_ff @(posedge clk) begin
    if (rst) ov_trip <= 1'b0;
    else     ov_trip <= over;
  end

endmodule
