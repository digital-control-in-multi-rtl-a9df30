// protections_tb: self-checking test of the protection block.
//
// Random high/low-side pulse trains (a random on-time every 256-clock period,
// with dead time, per phase, including pulses longer than the limit) and a
// Vout that now and then crosses a random limit drive the block. A reference
// model predicts each registered output one clock later: everything off while
// Vout > limit; otherwise the low side passes and the high side passes until
// it has been on for 243 consecutive clocks. The longest high-side pulse seen
// at the output is checked not to exceed 243 clocks (duty 0.95 of 256).
module protections_tb;
  localparam int N = 8;
  localparam int MAXON = 243;

  logic         clk = 0, rst = 1;
  logic [10:0]  vout = 0, vout_limit = 1000;
  logic [N-1:0] pulse_h_in = 0, pulse_l_in = 0;
  logic [N-1:0] pulse_h, pulse_l;
  logic         ov_trip;
  logic [N-1:0] dmax_trip;

  int checks = 0, failures = 0;

  protections dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  int on_run[N];       // consecutive clocks the input high side has been on
  int out_run[N], max_out_run = 0;
  int dur[N];          // this period's on-time per phase
  int ph;
  int n_ov = 0, n_cut = 0;
  logic [N-1:0] exp_h, exp_l, exp_cut;
  bit exp_ov;

  initial begin
    for (int k = 0; k < N; k++) begin on_run[k] = 0; out_run[k] = 0; dur[k] = 0; end
    repeat (3) @(negedge clk);
    check(pulse_h == 0 && pulse_l == 0 && !ov_trip, "reset state");
    rst = 0;
    ph = 0;
    for (int t = 0; t < 256 * 400; t++) begin
      // new inputs for this clock
      if (ph == 0)
        for (int k = 0; k < N; k++) dur[k] = (t / 256 % 4 == 1) ? 256 : $urandom_range(0, 255);
      for (int k = 0; k < N; k++) begin
        pulse_h_in[k] = (ph < dur[k]);
        pulse_l_in[k] = (ph >= dur[k] + 2) && (ph < 254);
      end
      if (t % 64 == 0) begin
        vout_limit = 11'($urandom_range(600, 1400));
        vout       = 11'($urandom_range(500, 1500));
      end
      // reference model of what the outputs will show after the edge
      exp_ov = (vout > vout_limit);
      for (int k = 0; k < N; k++) begin
        exp_cut[k] = pulse_h_in[k] && (on_run[k] >= MAXON);
        exp_h[k]   = pulse_h_in[k] && !exp_cut[k] && !exp_ov;
        exp_l[k]   = pulse_l_in[k] && !exp_ov;
        on_run[k]  = pulse_h_in[k] ? (on_run[k] < MAXON ? on_run[k] + 1 : MAXON) : 0;
      end
      @(negedge clk);
      check(pulse_h == exp_h, $sformatf("t=%0d pulse_h=%b expected %b", t, pulse_h, exp_h));
      check(pulse_l == exp_l, $sformatf("t=%0d pulse_l=%b expected %b", t, pulse_l, exp_l));
      check(ov_trip == exp_ov, "ov_trip");
      check(dmax_trip == exp_cut, "dmax_trip");
      if (exp_ov) n_ov++;
      if (|exp_cut) n_cut++;
      for (int k = 0; k < N; k++) begin
        out_run[k] = pulse_h[k] ? out_run[k] + 1 : 0;
        if (out_run[k] > max_out_run) max_out_run = out_run[k];
      end
      ph = (ph + 1) % 256;
    end
    check(max_out_run == MAXON, $sformatf("longest high-side pulse %0d clocks", max_out_run));
    check(n_ov > 0 && n_cut > 0, "both protections acted");
    $display("overvoltage clocks %0d, duty-limit clocks %0d", n_ov, n_cut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
