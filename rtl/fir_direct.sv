// fir_direct -- direct form FIR matched filter, built from plain logic (no DSP blocks).
//
// The last TAPS input samples sit in a tapped delay line. Each tap is multiplied by its constant
// coefficient and all products are summed in full precision, so
//     y[n] = sum_{k=0}^{TAPS-1} COEFS[k] * x[n-k].
// This is the direct form structure of the reference design. Taps whose coefficient is zero still
// appear in the source; synthesis removes their multiplier and adder, as the reference observes
// for the 8-bit alpha = 1.0 coefficient set.
//
// Interface: in_valid marks a new ADC sample on in_sample (one per sample clock; gaps allowed).
// The delay line shifts only on in_valid. out_valid pulses one clock after in_valid with the
// filter output for that sample on out_y, which is held until the next output.
// Timing: latency 1 clock, throughput one sample per clock. Synchronous active-low reset clears
// the delay line (history reads as zero) and the output; the reference gives no reset details.
// Output width: full precision, IN_W + COEF_W + clog2(TAPS) bits, so no output bit is dropped.
module fir_direct
#(
  parameter int        TAPS   = mf_pkg::TAPS,
  parameter int        IN_W   = mf_pkg::ADC_W,
  parameter int        COEF_W = 16,
  parameter int        COEFS [TAPS] = mf_pkg::SRRC_A100_C16,
  parameter int        OUT_W  = mf_pkg::acc_width(IN_W, COEF_W, TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_sample,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_y
);

  // x_dly[k] holds x[n-1-k]; the current sample x[n] is in_sample.
  logic signed [IN_W-1:0]  x_dly [TAPS-1];
  logic signed [OUT_W-1:0] prod  [TAPS];
  logic signed [OUT_W-1:0] sum;

  always_comb begin
    for (int k = 0; k < TAPS; k++) begin
      logic signed [IN_W-1:0] xk;
      xk = (k == 0) ? in_sample : x_dly[(k == 0) ? 0 : k-1];
      prod[k] = OUT_W'(xk) * OUT_W'(signed'(COEF_W'(COEFS[k])));
    end
    sum = '0;
    for (int k = 0; k < TAPS; k++) sum += prod[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS-1; k++) x_dly[k] <= '0;
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x_dly[0] <= in_sample;
        for (int k = 1; k < TAPS-1; k++) x_dly[k] <= x_dly[k-1];
        out_y <= sum;
      end
    end
  end

endmodule
