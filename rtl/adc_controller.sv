// adc_controller: runs the external A/D converter that samples Vout and
// translates its result to the controller's internal format.
//
// The converter delivers a 12-bit two's-complement sample; the rest of the
// controller works with an 11-bit unsigned Vout. Vout of a buck converter is
// never negative, so a negative sample can only be noise: it is discarded and
// the previous Vout is kept; a non-negative sample maps one-to-one onto the
// 11-bit range (its low 11 bits). That translation and the filtering of
// atypical data are the document's; reading "atypical" as "negative" is this
// design's choice.
//
// The document does not name the converter, so the handshake is a generic
// parallel-output one chosen here: a one-clock `adc_convst` pulse starts a
// conversion; after CONV_WAIT clocks the controller waits for `adc_busy` to be
// low, then holds `adc_rd` high for RD_CYCLES clocks and takes `adc_data` on
// the last of them. Conversions run back to back. `vout_valid` pulses for one
// clock when a new Vout is taken, `sample_rejected` when a sample is dropped.
module adc_controller
#(
  parameter int unsigned ADC_W     = mpc_pkg::ADC_W,
  parameter int unsigned VOUT_W    = mpc_pkg::VOUT_W,
  parameter int unsigned CONV_WAIT = 2,
  parameter int unsigned RD_CYCLES = 2
) (
  input  logic              clk,
  input  logic              rst,           // synchronous, active high
  // A/D converter control and data
  output logic              adc_convst,    // start of conversion
  output logic              adc_rd,        // read strobe, data valid while high
  input  logic              adc_busy,      // conversion in progress
  input  logic [ADC_W-1:0]  adc_data,      // two's-complement sample
  // internal Vout
  output logic [VOUT_W-1:0] vout,
  output logic              vout_valid,
  output logic              sample_rejected
);

  typedef enum logic [1:0] {S_START, S_WAIT, S_BUSY, S_READ} state_t;

  localparam int unsigned WCNT_W = $clog2(CONV_WAIT + RD_CYCLES + 1);

  state_t             state;
  logic [WCNT_W-1:0]  wcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= S_START;
      wcnt            <= '0;
      vout            <= '0;
      vout_valid      <= 1'b0;
      sample_rejected <= 1'b0;
    end else begin
      vout_valid      <= 1'b0;
      sample_rejected <= 1'b0;
      unique case (state)
        S_START: begin
          wcnt  <= '0;
          state <= S_WAIT;
        end
        S_WAIT: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == WCNT_W'(CONV_WAIT - 1)) state <= S_BUSY;
        end
        S_BUSY: begin
          wcnt <= '0;
          if (!adc_busy) state <= S_READ;
        end
        S_READ: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == WCNT_W'(RD_CYCLES - 1)) begin
            state <= S_START;
            if (adc_data[ADC_W-1]) begin
              sample_rejected <= 1'b1;
            end else begin
              vout       <= adc_data[VOUT_W-1:0];
              vout_valid <= 1'b1;
            end
          end
        end
        default: state <= S_START;
      endcase
    end
  end

  assign adc_convst = (state == S_START) && !rst;
  assign adc_rd     = (state == S_READ);

endmodule
