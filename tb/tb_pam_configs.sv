// tb_pam_configs -- bit error rate of the six evaluated detector configurations, and the effect
// of single upsets in the filter coefficients.
//
// Two noisy received streams are generated, one with an alpha = 1.0 SRRC pulse and one with
// alpha = 0.25: random +-1 bits, pulse peak AMP, plus white Gaussian noise of standard deviation
// SIGMA per sample, rounded and clipped to the 12-bit ADC range. Each stream feeds three
// detectors: direct form with 16-bit coefficients, direct form with 8-bit coefficients, and the
// transposed (DSP chain) form with 16-bit coefficients. For each detector the testbench measures
// the bit error rate and compares it with Q(mu / sigma_y), where mu is the noiseless peak of the
// filter output (sum_j h[j] s[j]) and sigma_y = SIGMA * sqrt(sum_j h[j]^2), both computed here
// from the coefficient sets. The direct and transposed forms with the same coefficients must also
// produce bit-identical filter outputs.
//
// The alpha = 1.0 stream also feeds three copies of the default detector chain built from
// fir_direct, downsample and decision with one coefficient bit inverted, as a configuration upset
// would: the LSB of an outer tap (expected: no visible loss), bit 14 of the centre tap (expected:
// a loss like extra noise) and the sign bit of the centre tap (a larger loss). For these the
// measured error rate is compared with Q(mu / sigma_y) for the upset coefficients. A fourth copy has the MSB of its filter output stuck at 0, which forces every decision to
// +1 (bit error rate 1/2).
module tb_pam_configs;
  import mf_pkg::*;
  import tb_util_pkg::*;

  localparam int  IN_W  = ADC_W;
  localparam int  OW16  = acc_width(IN_W, 16, TAPS);
  localparam int  OW8   = acc_width(IN_W, 8, TAPS);
  localparam int  NSYM  = 100000;
  localparam real AMP   = 400.0;

  localparam int  NDET  = 6;   // 0..2: alpha 1.0 (16b logic, 8b logic, 16b dsp); 3..5: alpha 0.25
  localparam int  NSEU  = 4;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] phase = '0;
  logic signed [IN_W-1:0] r_a1 = '0, r_a25 = '0;

  always #5 clk = ~clk;

  // detector outputs
  logic                    mfv [NDET];
  logic signed [OW16-1:0]  y16 [NDET];
  logic signed [OW8-1:0]   y8  [NDET];
  logic                    sv  [NDET];
  logic signed [OW16-1:0]  sx16 [NDET];
  logic signed [OW8-1:0]   sx8  [NDET];
  logic                    bv  [NDET];
  logic                    bo  [NDET];

  pam_detector #(.ARCH(ARCH_DIRECT),     .ROLLOFF(ROLLOFF_1_00), .COEF_W(16)) d0 (
    .clk, .rst_n, .phase, .in_valid, .in_sample(r_a1), .mf_valid(mfv[0]), .mf_y(y16[0]),
    .sym_valid(sv[0]), .sym_x(sx16[0]), .bit_valid(bv[0]), .bit_out(bo[0]));
  pam_detector #(.ARCH(ARCH_DIRECT),     .ROLLOFF(ROLLOFF_1_00), .COEF_W(8)) d1 (
    .clk, .rst_n, .phase, .in_valid, .in_sample(r_a1), .mf_valid(mfv[1]), .mf_y(y8[1]),
    .sym_valid(sv[1]), .sym_x(sx8[1]), .bit_valid(bv[1]), .bit_out(bo[1]));
  pam_detector #(.ARCH(ARCH_TRANSPOSED), .ROLLOFF(ROLLOFF_1_00), .COEF_W(16)) d2 (
    .clk, .rst_n, .phase, .in_valid, .in_sample(r_a1), .mf_valid(mfv[2]), .mf_y(y16[2]),
    .sym_valid(sv[2]), .sym_x(sx16[2]), .bit_valid(bv[2]), .bit_out(bo[2]));
  pam_detector #(.ARCH(ARCH_DIRECT),     .ROLLOFF(ROLLOFF_0_25), .COEF_W(16)) d3 (
    .clk, .rst_n, .phase, .in_valid, .in_sample(r_a25), .mf_valid(mfv[3]), .mf_y(y16[3]),
    .sym_valid(sv[3]), .sym_x(sx16[3]), .bit_valid(bv[3]), .bit_out(bo[3]));
  pam_detector #(.ARCH(ARCH_DIRECT),     .ROLLOFF(ROLLOFF_0_25), .COEF_W(8)) d4 (
    .clk, .rst_n, .phase, .in_valid, .in_sample(r_a25), .mf_valid(mfv[4]), .mf_y(y8[4]),
    .sym_valid(sv[4]), .sym_x(sx8[4]), .bit_valid(bv[4]), .bit_out(bo[4]));
  pam_detector #(.ARCH(ARCH_TRANSPOSED), .ROLLOFF(ROLLOFF_0_25), .COEF_W(16)) d5 (
    .clk, .rst_n, .phase, .in_valid, .in_sample(r_a25), .mf_valid(mfv[5]), .mf_y(y16[5]),
    .sym_valid(sv[5]), .sym_x(sx16[5]), .bit_valid(bv[5]), .bit_out(bo[5]));

  // ---- detectors with an upset coefficient bit (alpha = 1.0, 16-bit, direct form) ----
  function automatic coef_set_t flip(int tap, int b);
    coef_set_t c;
    logic signed [15:0] w;
    c = SRRC_A100_C16;
    w = 16'(c[tap]);
    w[b] = ~w[b];
    c[tap] = int'(w);
    return c;
  endfunction

  localparam coef_set_t C_SEU_LSB  = flip(10, 0);            // outer tap, LSB
  localparam coef_set_t C_SEU_MID  = flip(TAPS / 2, 14);     // centre tap, middle-order bit
  localparam coef_set_t C_SEU_SIGN = flip(TAPS / 2, 15);     // centre tap, sign bit

  logic                   e_mfv [NSEU], e_sv [NSEU], e_bv [NSEU], e_bo [NSEU];
  logic signed [OW16-1:0] e_y   [NSEU], e_sx [NSEU], e_dx [NSEU];

  fir_direct #(.COEF_W(16), .COEFS(C_SEU_LSB))     f0 (.clk, .rst_n, .in_valid, .in_sample(r_a1),
    .out_valid(e_mfv[0]), .out_y(e_y[0]));
  fir_direct #(.COEF_W(16), .COEFS(C_SEU_MID))     f1 (.clk, .rst_n, .in_valid, .in_sample(r_a1),
    .out_valid(e_mfv[1]), .out_y(e_y[1]));
  fir_direct #(.COEF_W(16), .COEFS(C_SEU_SIGN))    f2 (.clk, .rst_n, .in_valid, .in_sample(r_a1),
    .out_valid(e_mfv[2]), .out_y(e_y[2]));
  fir_direct #(.COEF_W(16), .COEFS(SRRC_A100_C16)) f3 (.clk, .rst_n, .in_valid, .in_sample(r_a1),
    .out_valid(e_mfv[3]), .out_y(e_y[3]));

  for (genvar i = 0; i < NSEU; i++) begin : g_seu
    downsample #(.N(NSPB), .X_W(OW16)) u_ds (.clk, .rst_n, .phase, .in_valid(e_mfv[i]),
      .in_x(e_y[i]), .out_valid(e_sv[i]), .out_x(e_sx[i]));
    // copy 3: filter-output MSB stuck at 0
    assign e_dx[i] = (i == 3) ? {1'b0, e_sx[i][OW16-2:0]} : e_sx[i];
    decision #(.X_W(OW16)) u_dec (.clk, .rst_n, .in_valid(e_sv[i]), .in_x(e_dx[i]),
      .out_valid(e_bv[i]), .out_bit(e_bo[i]));
  end

  // ---- checking ----
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit  tx_a1  [NSYM];
  bit  tx_a25 [NSYM];
  int  nbit  [NDET];
  int  nerr  [NDET];
  int  e_nbit [NSEU];
  int  e_nerr [NSEU];
  int  n_mismatch_arch = 0;
  bit  running = 0;

  // bit j of a detector's output is symbol j - LP (phase 0, see pam_detector)
  always @(posedge clk) begin
    #1;
    if (running) begin
      for (int i = 0; i < NDET; i++) if (bv[i]) begin
        int k;
        k = nbit[i] - LP;
        nbit[i]++;
        if (k >= 0 && k < NSYM)
          if (bo[i] != ((i < 3) ? tx_a1[k] : tx_a25[k])) nerr[i]++;
      end
      for (int i = 0; i < NSEU; i++) if (e_bv[i]) begin
        int k;
        k = e_nbit[i] - LP;
        e_nbit[i]++;
        if (k >= 0 && k < NSYM && e_bo[i] != tx_a1[k]) e_nerr[i]++;
      end
      if (mfv[0] && y16[0] != y16[2]) n_mismatch_arch++;
      if (mfv[3] && y16[3] != y16[5]) n_mismatch_arch++;
    end
  end

  // noiseless filter-output peak and output noise standard deviation for a coefficient set
  function automatic real peak(coef_set_t c, real a, real sigma, output real sig_y);
    real s, e, p0;
    p0 = srrc(0.0, a);
    s = 0.0; e = 0.0;
    for (int j = 0; j < TAPS; j++) begin
      s += real'(c[j]) * AMP * srrc(real'(j - LP * NSPB) / NSPB, a) / p0;
      e += real'(c[j]) * real'(c[j]);
    end
    sig_y = sigma * $sqrt(e);
    return s;
  endfunction

  real pulse1 [-LP*NSPB:LP*NSPB];
  real pulse25[-LP*NSPB:LP*NSPB];
  real sigma;

  function automatic int adc(real v);
    if (v > 2047.0) v = 2047.0;
    if (v < -2048.0) v = -2048.0;
    return $rtoi(v + (v >= 0 ? 0.5 : -0.5));
  endfunction

  initial begin
    real ber, pred, mu, sy, ber_clean;
    real ebn0_db;
    coef_set_t sets [NDET];
    string names [NDET];
    sets[0] = SRRC_A100_C16; sets[1] = SRRC_A100_C8; sets[2] = SRRC_A100_C16;
    sets[3] = SRRC_A025_C16; sets[4] = SRRC_A025_C8; sets[5] = SRRC_A025_C16;
    names[0] = "16b logic alpha=1.0";  names[1] = "8b logic alpha=1.0";
    names[2] = "16b dsp48 alpha=1.0";  names[3] = "16b logic alpha=0.25";
    names[4] = "8b logic alpha=0.25";  names[5] = "16b dsp48 alpha=0.25";
    for (int n = -LP*NSPB; n <= LP*NSPB; n++) begin
      pulse1[n]  = AMP * srrc(real'(n) / NSPB, 1.0)  / srrc(0.0, 1.0);
      pulse25[n] = AMP * srrc(real'(n) / NSPB, 0.25) / srrc(0.0, 0.25);
    end
    // noise: per-sample sigma giving an error rate near 2% for the ideal 16-bit alpha = 1.0 filter
    begin
      real e;
      e = 0.0;
      for (int n = -LP*NSPB; n <= LP*NSPB; n++) e += pulse1[n] * pulse1[n];
      sigma = $sqrt(e) / 2.05;
      ebn0_db = 10.0 * $log10(e / (2.0 * sigma * sigma));
      $display("per-sample noise sigma %f, Eb/N0 %f dB", sigma, ebn0_db);
    end
    for (int k = 0; k < NSYM; k++) begin tx_a1[k] = 1'($urandom); tx_a25[k] = 1'($urandom); end
    for (int i = 0; i < NDET; i++) begin nbit[i] = 0; nerr[i] = 0; end
    for (int i = 0; i < NSEU; i++) begin e_nbit[i] = 0; e_nerr[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    running = 1;
    for (int n = 0; n < NSYM * NSPB + TAPS + 8; n++) begin
      real v1, v25;
      v1 = sigma * gauss();
      v25 = sigma * gauss();
      for (int k = (n - LP*NSPB) / NSPB - 1; k <= (n + LP*NSPB) / NSPB + 1; k++) begin
        int off;
        off = n - k * NSPB;
        if (k >= 0 && k < NSYM && off >= -LP*NSPB && off <= LP*NSPB) begin
          v1  += (tx_a1[k]  ? 1.0 : -1.0) * pulse1[off];
          v25 += (tx_a25[k] ? 1.0 : -1.0) * pulse25[off];
        end
      end
      @(negedge clk);
      in_valid = 1;
      r_a1  = IN_W'(adc(v1));
      r_a25 = IN_W'(adc(v25));
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(negedge clk);
    running = 0;

    for (int i = 0; i < NDET; i++) begin
      mu = peak(sets[i], (i < 3) ? 1.0 : 0.25, sigma, sy);
      pred = qfunc(mu / sy);
      ber = real'(nerr[i]) / NSYM;
      $display("%-22s bits %0d errors %0d BER %f predicted %f", names[i], nbit[i] - LP, nerr[i], ber, pred);
      check(nbit[i] - LP >= NSYM, $sformatf("%s decided every bit", names[i]));
      check(ber > 0.7 * pred && ber < 1.3 * pred, $sformatf("%s BER %f vs %f", names[i], ber, pred));
    end
    check(n_mismatch_arch == 0, "direct and transposed forms agree bit for bit");

    ber_clean = real'(nerr[0]) / NSYM;
    for (int i = 0; i < NSEU; i++)
      $display("upset copy %0d: errors %0d BER %f", i, e_nerr[i], real'(e_nerr[i]) / NSYM);
    // LSB of an outer tap: no visible loss
    check(real'(e_nerr[0]) / NSYM < 1.15 * ber_clean, "LSB upset leaves the BER unchanged");
    // middle-order and sign bit of the centre tap: a loss like extra noise, as predicted
    for (int i = 1; i <= 2; i++) begin
      mu = peak((i == 1) ? C_SEU_MID : C_SEU_SIGN, 1.0, sigma, sy);
      pred = qfunc(mu / sy);
      ber = real'(e_nerr[i]) / NSYM;
      $display("upset copy %0d predicted BER %f, measured %f", i, pred, ber);
      check(ber > 0.7 * pred && ber < 1.5 * pred, $sformatf("upset copy %0d BER %f vs %f", i, ber, pred));
      check(ber > ((i == 1) ? 1.1 : 2.0) * ber_clean, $sformatf("upset copy %0d costs performance", i));
    end
    // output MSB stuck: every decision +1, BER 1/2
    check(real'(e_nerr[3]) / NSYM > 0.45 && real'(e_nerr[3]) / NSYM < 0.55, "stuck output MSB gives BER 1/2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
