// ad_converter_model: behavioural model of the external A/D converter
// (simulation only, not synthesizable intent).
//
// A rising adc_convst starts a conversion: busy goes high on the next clock
// and stays high for CONV_CYCLES clocks, after which the value present on
// `analog` at the start of the conversion becomes the result. The result is
// driven on `data` only while `rd` is high; otherwise the bus shows 12'h800
// (the most negative code), so a controller that reads outside the strobe
// sees a value it must reject. If `noise_neg` is set when a conversion
// starts, that conversion returns a small negative number instead, to model
// an atypical, noise-corrupted sample.
module ad_converter_model #(
  parameter int unsigned ADC_W       = 12,
  parameter int unsigned CONV_CYCLES = 6
) (
  input  logic             clk,
  input  logic             convst,
  input  logic             rd,
  input  int               analog,     // input value in converter LSBs
  input  logic             noise_neg,
  output logic             busy,
  output logic [ADC_W-1:0] data
);
  int                 remaining = 0;
  logic [ADC_W-1:0]   held = '0;
  logic [ADC_W-1:0]   result = '0;

  always_ff @(posedge clk) begin
    if (convst) begin
      remaining <= CONV_CYCLES;
      if (noise_neg)           held <= ADC_W'(-5);
      else if (analog < 0)     held <= ADC_W'(0);
      else if (analog > 2047)  held <= ADC_W'(2047);
      else                     held <= ADC_W'(analog);
    end else if (remaining > 0) begin
      remaining <= remaining - 1;
      if (remaining == 1) result <= held;
    end
  end

  assign busy = (remaining > 0);
  assign data = rd ? result : {1'b1, {(ADC_W-1){1'b0}}};
endmodule
