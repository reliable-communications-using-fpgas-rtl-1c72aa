// fir_transposed -- transposed form FIR matched filter, the structure that maps onto a chain of
// DSP multiply-add blocks.
//
// Every new sample is broadcast to all TAPS multipliers at once. Between the multipliers runs a
// chain of partial-sum registers: register z[k] holds the part of a future output that the taps
// k .. TAPS-1 have already contributed. On each sample
//     y[n]     = COEFS[0] * x[n] + z[1]
//     z[k]    <= COEFS[k] * x[n] + z[k+1]     (k = 1 .. TAPS-2)
//     z[TAPS-1] <= COEFS[TAPS-1] * x[n]
// which gives the same y[n] = sum_k COEFS[k] x[n-k] as the direct form. Each multiply-add with its
// register is one DSP block; the adder chain has no long carry tree.
//
// Interface and timing are identical to fir_direct: in_valid/in_sample in, out_valid/out_y one
// clock later, full-precision output of IN_W + COEF_W + clog2(TAPS) bits, synchronous active-low
// reset that clears the partial sums. The reset behaviour is this design's choice.
module fir_transposed
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

  logic signed [OUT_W-1:0] prod [TAPS];
  logic signed [OUT_W-1:0] z    [1:TAPS-1];   // partial-sum chain

  always_comb begin
    for (int k = 0; k < TAPS; k++)
      prod[k] = OUT_W'(in_sample) * OUT_W'(signed'(COEF_W'(COEFS[k])));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k < TAPS; k++) z[k] <= '0;
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_y <= prod[0] + z[1];
        for (int k = 1; k < TAPS-1; k++) z[k] <= prod[k] + z[k+1];
        z[TAPS-1] <= prod[TAPS-1];
      end
    end
  end

endmodule
