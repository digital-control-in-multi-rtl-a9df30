// adc_controller_tb: self-checking test of the A/D converter controller.
//
// The controller runs against the behavioural converter model. The test
// feeds a sequence of random input values, some of them replaced by a
// negative (noise) conversion result. For every read strobe it works out,
// from the value sent into that conversion, what the 11-bit Vout must become:
// the same value for a non-negative sample, the previous Vout for a negative
// one. It also checks the handshake: convst is a single-clock pulse, the
// read strobe only follows a finished conversion and lasts two clocks, and a
// sample takes 10 clocks with a 6-clock converter: convst (1), the fixed
// wait (2, busy already high), the rest of the conversion (4), the clock that
// sees busy low (1) and the read strobe (2).
module adc_controller_tb;
  logic        clk = 0, rst = 1;
  logic        adc_convst, adc_rd, adc_busy;
  logic [11:0] adc_data;
  logic [10:0] vout;
  logic        vout_valid, sample_rejected;

  int  analog = 0;
  logic noise_neg = 0;

  int checks = 0, failures = 0;

  adc_controller dut (.*);
  ad_converter_model #(.CONV_CYCLES(6)) u_adc (
    .clk(clk), .convst(adc_convst), .rd(adc_rd), .analog(analog),
    .noise_neg(noise_neg), .busy(adc_busy), .data(adc_data));

  always #5 clk = ~clk;

  initial begin
    #(10 * 200000);
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

  int  exp_vout = 0;
  int  sent_val = 0;
  bit  sent_neg = 0;
  int  n_valid = 0, n_reject = 0;
  int  last_start = -1, t = 0;
  bit  prev_convst = 0, prev_rd = 0;
  int  rd_len = 0;

  // Every clock: choose the analog value for a conversion that starts now,
  // and check outputs against the expectation.
  always @(negedge clk) if (!rst) begin
    t++;
    if (adc_convst) begin
      check(!prev_convst, "convst lasts one clock");
      if (last_start >= 0)
        check(t - last_start == 10, $sformatf("sample period %0d clocks", t - last_start));
      last_start = t;
    end
    if (vout_valid) begin
      n_valid++;
      exp_vout = sent_val;
      check(vout == 11'(exp_vout), $sformatf("vout=%0d expected %0d", vout, exp_vout));
      check(!sent_neg, "valid after a negative sample");
    end
    if (sample_rejected) begin
      n_reject++;
      check(sent_neg, "rejected a good sample");
      check(vout == 11'(exp_vout), "vout kept after a rejected sample");
    end
    if (!vout_valid && !sample_rejected)
      check(vout == 11'(exp_vout), "vout stable between samples");
    if (adc_rd) begin
      check(!adc_busy, "read while converting");
      rd_len++;
    end else begin
      if (prev_rd) check(rd_len == 2, "read strobe two clocks");
      rd_len = 0;
    end
    prev_convst = adc_convst;
    prev_rd     = adc_rd;
    // The converter captures `analog` at the convst edge; present the next
    // value while convst is high and remember it.
    if (adc_convst) begin
      analog    = $urandom_range(0, 2047);
      noise_neg = ($urandom_range(0, 4) == 0);
      sent_val  = noise_neg ? sent_val : analog;
      sent_neg  = noise_neg;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    check(vout == 0 && !adc_rd, "reset state");
    rst = 0;
    wait (n_valid + n_reject >= 3000);
    @(negedge clk);
    check(n_reject > 100, "negative samples occurred and were rejected");
    $display("samples taken %0d, rejected %0d", n_valid, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
