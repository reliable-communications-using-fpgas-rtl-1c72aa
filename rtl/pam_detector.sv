// pam_detector -- sampled-data binary PAM detector: SRRC matched filter, downsample, decision.
//
// ADC samples r(nT) of a binary PAM signal (symbols +-1, square-root raised-cosine pulse spanning
// +-Lp bit times, N samples per bit) enter on in_sample. A FIR filter matched to the pulse
// produces x(nT); because the SRRC pulse satisfies the Nyquist no-ISI condition, the filter output
// taken once per bit at the pulse peak is x(kTb + tau) = a(k) + noise. The downsampler picks that
// sample (phase = tau in samples) and the decision block takes its sign.
//
// Configuration (all of the reference's six evaluated designs are parameter settings):
//   ARCH    ARCH_DIRECT (direct form, plain logic) or ARCH_TRANSPOSED (DSP multiply-add chain)
//   ROLLOFF ROLLOFF_1_00 or ROLLOFF_0_25 (SRRC excess bandwidth)
//   COEF_W  16 or 8 bit coefficients
// The default, direct form with 16-bit coefficients and alpha = 1.0, is the configuration the
// reference uses for its representative results. Lp = 6, N = 4 (49 taps) follow the reference;
// the 12-bit ADC width is this design's choice.
//
// Interface: in_valid/in_sample, one ADC sample per in_valid. Outputs:
//   mf_valid/mf_y    every matched-filter output, 1 clock after its sample (full precision)
//   sym_valid/sym_x  the decision variable, one per bit, 2 clocks after its sample
//   bit_valid/bit_out the detected bit (1 for a(k) = +1), 3 clocks after its sample
// With the first ADC sample at the centre of symbol 0's pulse start, symbol k peaks at filter
// output number k*N + 2*Lp*N, so phase 0 is the right phase and bit j of the output stream is
// symbol j - 2*Lp. Synchronous active-low reset.
module pam_detector
  import mf_pkg::*;
#(
  parameter arch_e    ARCH    = ARCH_DIRECT,
  parameter rolloff_e ROLLOFF = ROLLOFF_1_00,
  parameter int       COEF_W  = 16,
  parameter int       IN_W    = mf_pkg::ADC_W,
  localparam int      OUT_W   = mf_pkg::acc_width(IN_W, COEF_W, mf_pkg::TAPS),
  localparam int      PH_W    = $clog2(mf_pkg::NSPB)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PH_W-1:0]         phase,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_sample,
  output logic                    mf_valid,
  output logic signed [OUT_W-1:0] mf_y,
  output logic                    sym_valid,
  output logic signed [OUT_W-1:0] sym_x,
  output logic                    bit_valid,
  output logic                    bit_out
);

  localparam coef_set_t COEFS = mf_pkg::srrc_coefs(ROLLOFF, COEF_W);

  if (ARCH == ARCH_DIRECT) begin : g_direct
    fir_direct #(
      .TAPS(mf_pkg::TAPS), .IN_W(IN_W), .COEF_W(COEF_W), .COEFS(COEFS), .OUT_W(OUT_W)
    ) u_mf (
      .clk, .rst_n, .in_valid, .in_sample, .out_valid(mf_valid), .out_y(mf_y)
    );
  end else begin : g_transposed
    fir_transposed #(
      .TAPS(mf_pkg::TAPS), .IN_W(IN_W), .COEF_W(COEF_W), .COEFS(COEFS), .OUT_W(OUT_W)
    ) u_mf (
      .clk, .rst_n, .in_valid, .in_sample, .out_valid(mf_valid), .out_y(mf_y)
    );
  end

  downsample #(.N(mf_pkg::NSPB), .X_W(OUT_W)) u_ds (
    .clk, .rst_n, .phase, .in_valid(mf_valid), .in_x(mf_y), .out_valid(sym_valid), .out_x(sym_x)
  );

  decision #(.X_W(OUT_W)) u_dec (
    .clk, .rst_n, .in_valid(sym_valid), .in_x(sym_x), .out_valid(bit_valid), .out_bit(bit_out)
  );

endmodule
