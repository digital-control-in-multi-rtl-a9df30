// mpc_top_tb: end-to-end, closed-loop test of the complete controller at its
// default size (8 phases, 8-bit PWM, 12-bit A/D, 11-bit Vout).
//
// The controller drives a behavioural 8-phase buck power stage (42 V in,
// 20 mV per Vout LSB, so 14 V is code 700) and reads it back through a
// behavioural A/D converter that now and then returns a negative, noisy
// sample. Three scenes run in order:
//   1. start-up and regulation to 14 V (vref = 700), dead time 3 clocks;
//   2. an unreachable target (vref = 2047), which drives the duty word to its
//      top and lets the 0.95 maximum-duty protection act;
//   3. back to 14 V, then a load-dump step of +600 LSB that pushes Vout above
//      the 1000 LSB limit, so all phases are switched off until Vout falls,
//      after which regulation resumes.
// Checked every clock: no phase ever has both switches on; all outputs are
// off while the overvoltage trip is set, and the trip is set exactly one
// clock after the measured Vout exceeds the limit; no high-side pulse lasts more than
// 243 clocks; every high-side pulse rises exactly 32 clocks (T/8) after the
// previous phase's; new_cycle comes every 256 clocks; the low side turns on
// exactly `dead_time` clocks after the high side falls. At the end of scenes
// 1 and 3 Vout must be within 8 LSB of the target and all eight phases must
// show the same on-time, equal to the duty word. Every mechanism (period
// start, duty update, phase shift, dead time, rejected sample, duty limit,
// overvoltage shut-down, regulation) is counted and must have happened.
module mpc_top_tb;
  localparam int N = 8;
  localparam int P = 256;

  logic         clk = 0, rst = 1;
  logic [10:0]  vref = 700, vout_limit = 1000;
  logic [3:0]   dead_time = 3;
  logic         adc_convst, adc_rd, adc_busy;
  logic [11:0]  adc_data;
  logic [N-1:0] pulse_h, pulse_l;
  logic [7:0]   duty;
  logic [10:0]  vout;
  logic         vout_valid, new_cycle, ov_trip, sample_rejected;
  logic [N-1:0] dmax_trip;

  int  plant_v;
  int  kick = 0;
  logic noise_neg = 0;

  int checks = 0, failures = 0;

  mpc_top dut (.*);

  ad_converter_model u_adc (
    .clk(clk), .convst(adc_convst), .rd(adc_rd), .analog(plant_v),
    .noise_neg(noise_neg), .busy(adc_busy), .data(adc_data));

  power_stage_model u_plant (.clk(clk), .pulse_h(pulse_h), .kick(kick), .vout(plant_v));

  always #25 clk = ~clk;   // 20 MHz

  initial begin
    #(50 * P * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // mechanism counters
  int n_new_cycle = 0, n_duty_change = 0, n_phase_shift = 0, n_dead_time = 0;
  int n_rejected = 0, n_dmax = 0, n_ov = 0, n_regulated = 0, n_equal_share = 0;

  // per-clock monitors
  int t = 0, last_new_cycle = -1;
  int rise_t[N], fall_t[N], h_run[N], last_on[N];
  logic [N-1:0] h_q = '0, l_q = '0;
  logic [7:0]   duty_q = '0;
  bit ov_q = 0;
  bit over_q = 0;

  initial for (int k = 0; k < N; k++) begin rise_t[k] = -1000; fall_t[k] = -1000; h_run[k] = 0; last_on[k] = 0; end

  always @(negedge clk) if (!rst) begin
    t++;
    if (adc_convst) noise_neg = ($urandom_range(0, 15) == 0);
    if (new_cycle) begin
      if (last_new_cycle >= 0) check(t - last_new_cycle == P, "period of 256 clocks");
      last_new_cycle = t;
      n_new_cycle++;
    end
    if (duty != duty_q) n_duty_change++;
    if (sample_rejected) n_rejected++;
    if (|dmax_trip) n_dmax++;
    if (ov_trip && !ov_q) n_ov++;
    if (ov_trip) check(pulse_h == '0 && pulse_l == '0, "all phases off during overvoltage");
    // the trip follows the measured Vout against the limit one clock later
    check(ov_trip == over_q, "overvoltage trip follows Vout > limit");
    over_q = (vout > vout_limit);
    for (int k = 0; k < N; k++) begin
      check(!(pulse_h[k] && pulse_l[k]), $sformatf("phase %0d shoot-through", k));
      if (pulse_h[k] && !h_q[k]) begin
        rise_t[k] = ov_q ? -1000 : t;  // a pulse resumed after a trip is no period start
        if (k > 0 && t - rise_t[k-1] < P && !ov_trip && !ov_q) begin
          check(t - rise_t[k-1] == P / N, $sformatf("phase %0d delay %0d", k, t - rise_t[k-1]));
          n_phase_shift++;
        end
      end
      if (!pulse_h[k] && h_q[k]) begin
        fall_t[k]  = t;
        last_on[k] = h_run[k];
      end
      if (pulse_l[k] && !l_q[k] && t - fall_t[k] < P && !ov_q && fall_t[k] > rise_t[k] - P
          && last_on[k] < 243) begin  // a pulse cut by the duty limit has a longer gap
        check(t - fall_t[k] == int'(dead_time), $sformatf("phase %0d dead time %0d", k, t - fall_t[k]));
        n_dead_time++;
      end
      h_run[k] = pulse_h[k] ? h_run[k] + 1 : 0;
      check(h_run[k] <= 243, "high-side pulse within 0.95 of the period");
    end
    h_q = pulse_h; l_q = pulse_l; duty_q = duty; ov_q = ov_trip;
  end

  task automatic periods(input int n);
    repeat (n * P) @(negedge clk);
  endtask

  task automatic check_regulation(input string scene);
    check(plant_v >= int'(vref) - 8 && plant_v <= int'(vref) + 8,
          $sformatf("%s: Vout %0d, target %0d", scene, plant_v, vref));
    if (plant_v >= int'(vref) - 8 && plant_v <= int'(vref) + 8) n_regulated++;
    // passive current sharing relies on identical on-times
    begin
      bit same = 1;
      for (int k = 0; k < N; k++) if (last_on[k] != last_on[0]) same = 0;
      check(same, $sformatf("%s: equal on-time in all phases", scene));
      if (same) n_equal_share++;
      $display("%s: Vout %0d (target %0d), duty %0d, on-times %0d %0d %0d %0d %0d %0d %0d %0d",
               scene, plant_v, vref, duty, last_on[0], last_on[1], last_on[2], last_on[3],
               last_on[4], last_on[5], last_on[6], last_on[7]);
    end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    // scene 1: start-up and regulation
    periods(300);
    check_regulation("regulation");
    // scene 2: unreachable target, duty limited to 0.95
    vout_limit = 11'd2047;
    vref = 11'd2047;
    periods(200);
    check(duty == 8'd255, "duty word at its top");
    check(last_on[0] == 243, $sformatf("on-time limited to 243, got %0d", last_on[0]));
    // scene 3: back to 14 V, then a load dump above the limit
    vref = 11'd700;
    periods(300);
    vout_limit = 11'd1000;
    periods(20);
    kick = 600;
    periods(1);
    kick = 0;
    periods(400);
    check_regulation("after overvoltage");

    $display("new_cycle %0d, duty changes %0d, phase shifts %0d, dead times %0d",
             n_new_cycle, n_duty_change, n_phase_shift, n_dead_time);
    $display("rejected samples %0d, duty-limit clocks %0d, overvoltage trips %0d, regulated %0d, equal sharing %0d",
             n_rejected, n_dmax, n_ov, n_regulated, n_equal_share);
    check(n_new_cycle > 0,   "mechanism: period start");
    check(n_duty_change > 0, "mechanism: duty update");
    check(n_phase_shift > 0, "mechanism: phase shift");
    check(n_dead_time > 0,   "mechanism: dead time");
    check(n_rejected > 0,    "mechanism: rejected A/D sample");
    check(n_dmax > 0,        "mechanism: maximum duty limit");
    check(n_ov > 0,          "mechanism: overvoltage shut-down");
    check(n_regulated == 2,  "mechanism: regulation");
    check(n_equal_share == 2, "mechanism: equal on-times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
