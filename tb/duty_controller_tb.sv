// duty_controller_tb: self-checking test of the PI control law.
//
// A reference model in plain integer arithmetic (64-bit, no wrap) follows the
// law: integ = clamp(integ + KI*(vref-vout), 0, 255*256), duty =
// clamp(floor((integ + KP*(vref-vout)) / 256), 0, 255). The test applies
// random and extreme vref/vout pairs, pulses new_cycle, and checks that duty
// changes exactly one clock after the pulse and holds between pulses.
module duty_controller_tb;
  localparam int KP = 16, KI = 2, FRAC = 8;

  logic        clk = 0, rst = 1;
  logic        new_cycle = 0;
  logic [10:0] vout = 0, vref = 0;
  logic [7:0]  duty;

  int checks = 0, failures = 0;

  duty_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * 100000);
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

  longint integ = 0;
  longint exp_duty = 0;

  task automatic cycle(input int vr, input int vo, input int gap);
    longint e, u;
    @(negedge clk);
    vref = 11'(vr);
    vout = 11'(vo);
    new_cycle = 1;
    e = longint'(vr) - longint'(vo);
    integ = integ + KI * e;
    if (integ < 0) integ = 0;
    if (integ > 255 * 256) integ = 255 * 256;
    u = integ + KP * e;
    // floor division by 2**FRAC
    if (u < 0) u = -((-u + 255) / 256); else u = u / 256;
    check(duty == 8'(exp_duty), "duty changed before new_cycle");
    exp_duty = (u < 0) ? 0 : (u > 255) ? 255 : u;
    @(negedge clk);
    new_cycle = 0;
    check(duty == 8'(exp_duty), $sformatf("vref=%0d vout=%0d duty=%0d expected %0d", vr, vo, duty, exp_duty));
    // inputs move but no new_cycle: duty must hold
    vout = 11'($urandom_range(0, 2047));
    repeat (gap) begin
      @(negedge clk);
      check(duty == 8'(exp_duty), "duty held between periods");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(duty == 0, "duty zero after reset");
    rst = 0;
    // settle-like sequence, then saturation both ways, then random
    for (int i = 0; i < 50; i++) cycle(700, 600 + 2 * i, 3);
    for (int i = 0; i < 100; i++) cycle(2047, 0, 1);      // drive to the top
    check(duty == 255, "duty saturates at 255");
    for (int i = 0; i < 100; i++) cycle(0, 2047, 1);      // and to the bottom
    check(duty == 0, "duty saturates at 0");
    for (int i = 0; i < 5000; i++)
      cycle($urandom_range(0, 2047), $urandom_range(0, 2047), $urandom_range(0, 4));
    for (int i = 0; i < 5000; i++) begin
      int vr;
      vr = $urandom_range(300, 1500);
      cycle(vr, vr + $urandom_range(0, 40) - 20, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
