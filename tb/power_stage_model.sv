// power_stage_model: coarse behavioural model of the N-phase interleaved buck
// power stage (simulation only).
//
// Every clock it counts how many high-side switches are on. At the end of
// each PERIOD-clock window the average duty cycle over all phases sets the
// ideal output VIN_CODE * duty, and the output moves 1/2**LAG_SHIFT of the
// way towards it (a first-order LC/load response). `vout` is in A/D LSBs.
// A positive `kick` adds a step to the output at the next window, modelling
// a load dump.
module power_stage_model #(
  parameter int unsigned N_PHASES  = 8,
  parameter int unsigned PERIOD    = 256,
  parameter int          VIN_CODE  = 2100,   // input voltage in Vout LSBs
  parameter int          LAG_SHIFT = 3
) (
  input  logic                clk,
  input  logic [N_PHASES-1:0] pulse_h,
  input  int                  kick,
  output int                  vout
);
  int acc = 0;
  int t   = 0;
  initial vout = 0;

  always @(posedge clk) begin
    automatic int target;
    if (t == PERIOD - 1) begin
      target = ((acc + $countones(pulse_h)) * VIN_CODE) / (N_PHASES * PERIOD);
      vout   <= vout + ((target - vout) >>> LAG_SHIFT) + kick;
      acc    <= 0;
      t      <= 0;
    end else begin
      acc <= acc + $countones(pulse_h);
      t   <= t + 1;
    end
  end
endmodule
