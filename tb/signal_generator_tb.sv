// signal_generator_tb: self-checking test of the multi-phase PWM.
//
// A reference model, written from the specification rather than from the RTL,
// predicts every phase's high- and low-side signal each clock: phase k runs a
// period of 256 clocks that starts k*32 clocks after phase 0, latches duty and
// dead time at its own period start, drives high for `duty` clocks and low
// from duty+dead_time up to 256-dead_time. Duty and dead time are changed at
// random moments (including 0, 255 and the widest dead time). Separately it
// measures, with a steady duty, the switching period, the T/N delay between
// consecutive phases and the high-side on-time of every phase.
module signal_generator_tb;
  localparam int N = 8;
  localparam int P = 256;

  logic         clk = 0, rst = 1;
  logic [7:0]   duty = 0;
  logic [3:0]   dead_time = 0;
  logic         new_cycle;
  logic [N-1:0] pulse_h, pulse_l;

  int checks = 0, failures = 0;

  signal_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t;
  int dq[N], tq[N];
  int rise_t[N];
  int prev_rise0;
  int on_len[N];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d: %s", t, msg);
    end
  endtask

  // one clock of reference-model comparison; inputs must already be set
  task automatic step();
    #1;
    for (int k = 0; k < N; k++) begin
      int p;
      bit started, eh, el;
      started = (t >= k * (P / N));
      p = ((t - k * (P / N)) % P + P) % P;
      if (started && p == 0) begin
        dq[k] = int'(duty);
        tq[k] = int'(dead_time);
      end
      eh = started && (p < dq[k]);
      el = started && (p >= dq[k] + tq[k]) && (p < P - tq[k]);
      check(pulse_h[k] == eh, $sformatf("phase %0d high=%0b expected %0b", k, pulse_h[k], eh));
      check(pulse_l[k] == el, $sformatf("phase %0d low=%0b expected %0b", k, pulse_l[k], el));
    end
    check(new_cycle == (t % P == 0), "new_cycle");
    @(negedge clk);
    t++;
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin dq[k] = 0; tq[k] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    t = 0;
    // random segment: duty and dead time change at random moments
    for (int seg = 0; seg < 60; seg++) begin
      int len;
      case (seg % 6)
        0: duty = 8'd0;
        1: duty = 8'd255;
        default: duty = 8'($urandom_range(0, 255));
      endcase
      dead_time = (seg % 5 == 0) ? 4'd15 : 4'($urandom_range(0, 15));
      len = $urandom_range(20, 600);
      repeat (len) step();
    end

    // timing segment: steady duty, measure period, phase delay and on-time
    duty = 8'd85;       // 14 V out of 42 V
    dead_time = 4'd3;
    repeat (2 * P) step();
    for (int k = 0; k < N; k++) begin rise_t[k] = -1; on_len[k] = 0; end
    prev_rise0 = -1;
    begin
      logic [N-1:0] last_h;
      last_h = pulse_h;
      repeat (2 * P) begin
        for (int k = 0; k < N; k++) begin
          if (pulse_h[k] && !last_h[k]) begin
            if (k == 0 && rise_t[0] >= 0) prev_rise0 = rise_t[0];
            rise_t[k] = t;
            on_len[k] = 0;
          end
          if (pulse_h[k]) on_len[k]++;
          if (!pulse_h[k] && last_h[k] && rise_t[k] >= 0) check(on_len[k] == 85, $sformatf("phase %0d on-time %0d", k, on_len[k]));
        end
        last_h = pulse_h;
        step();
      end
    end
    check(prev_rise0 >= 0 && rise_t[0] - prev_rise0 == P, "switching period is 256 clocks");
    for (int k = 1; k < N; k++) begin
      int d;
      d = ((rise_t[k] - rise_t[k-1]) % P + P) % P;
      check(d == P / N, $sformatf("phase %0d delay %0d clocks", k, d));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
