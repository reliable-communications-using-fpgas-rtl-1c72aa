// tb_pam_detector -- end-to-end test of the PAM detector at its default configuration
// (direct form, 16-bit coefficients, alpha = 1.0, 49 taps, 4 samples per bit, 12-bit ADC).
//
// A transmitter model in the testbench sends random bits as +-1 SRRC pulses. The received samples
//     r(n) = round(A * sum_k a(k) p((n - d - k*N) / N) / p(0))
// are computed from the closed-form pulse in real arithmetic and clipped to the ADC range; d is a
// propagation delay in samples. The testbench checks
//   * every matched-filter output against its own convolution of the applied samples,
//   * that the downsampler keeps exactly outputs d mod N, d mod N + N, ... (phase input = d),
//   * that every detected bit equals the transmitted bit (no noise here: the eye is open),
//   * the latencies: filter output 1 clock, decision variable 2 clocks, bit 3 clocks after the
//     sample.
// It runs several segments (different delays, with and without gaps in in_valid, a reset in
// mid-stream) and counts how often each mechanism occurred; a mechanism that never occurred is a
// failure.
module tb_pam_detector;
  import mf_pkg::*;
  import tb_util_pkg::*;

  localparam int IN_W  = ADC_W;
  localparam int OUT_W = acc_width(IN_W, 16, TAPS);
  localparam int NSYM  = 400;
  localparam int NS    = NSYM * NSPB + TAPS + 8;   // samples per segment
  localparam real AMP  = 900.0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] phase = '0;
  logic signed [IN_W-1:0] in_sample = '0;
  logic mf_valid, sym_valid, bit_valid, bit_out;
  logic signed [OUT_W-1:0] mf_y, sym_x;

  pam_detector dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_mf = 0, n_drop = 0, n_pos = 0, n_neg = 0, n_gap = 0, n_phase_nz = 0, n_reset = 0, n_clip = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // segment state
  bit              sym_a   [NSYM];     // transmitted bits (1 = +1)
  int              rs      [NS];       // applied samples
  longint          cyc = 0;
  longint          acc_cyc [NS];       // clock at which sample m was accepted
  int              n_in, n_mf_seg, n_sym_seg, n_bit_seg;
  int              seg_d;
  bit              active = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint ref_y(int m);
    longint s = 0;
    for (int j = 0; j < TAPS; j++) if (m - j >= 0) s += longint'(rs[m-j]) * SRRC_A100_C16[j];
    return s;
  endfunction

  // output monitor
  always @(posedge clk) begin
    #1;
    if (active) begin
      if (mf_valid) begin
        check(n_mf_seg < n_in, "filter output without input");
        check(acc_cyc[n_mf_seg] + 1 == cyc, "filter latency 1");
        check(longint'(mf_y) == ref_y(n_mf_seg), $sformatf("mf_y[%0d] = %0d exp %0d",
              n_mf_seg, mf_y, ref_y(n_mf_seg)));
        if ((n_mf_seg % NSPB) != seg_d) n_drop++;
        n_mf++;
        n_mf_seg++;
      end
      if (sym_valid) begin
        int m;
        m = seg_d + NSPB * n_sym_seg;
        check(m < n_in && acc_cyc[m] + 2 == cyc, "decision variable latency 2");
        check(longint'(sym_x) == ref_y(m), $sformatf("sym_x[%0d] is not filter output %0d", n_sym_seg, m));
        n_sym_seg++;
      end
      if (bit_valid) begin
        int m, k;
        m = seg_d + NSPB * n_bit_seg;
        k = n_bit_seg - LP;
        check(acc_cyc[m] + 3 == cyc, "bit latency 3");
        if (k >= 0 && k < NSYM) begin
          check(bit_out == sym_a[k], $sformatf("bit %0d: got %0d sent %0d", k, bit_out, sym_a[k]));
          if (bit_out) n_pos++; else n_neg++;
        end
        n_bit_seg++;
      end
    end
  end

  task automatic run_segment(int d, int gap_pct);
    real p0, v;
    p0 = srrc(0.0, 1.0);
    for (int k = 0; k < NSYM; k++) sym_a[k] = 1'($urandom);
    for (int n = 0; n < NS; n++) begin
      v = 0.0;
      for (int k = 0; k < NSYM; k++) begin
        int off;
        off = n - d - k * NSPB;
        if (off >= -LP * NSPB && off <= LP * NSPB)
          v += (sym_a[k] ? 1.0 : -1.0) * srrc(real'(off) / NSPB, 1.0);
      end
      v = AMP * v / p0;
      if (v > 2047.0) begin v = 2047.0; n_clip++; end
      if (v < -2048.0) begin v = -2048.0; n_clip++; end
      rs[n] = $rtoi(v + (v >= 0 ? 0.5 : -0.5));
    end
    // reset the detector, then stream the segment
    @(negedge clk) begin rst_n = 0; in_valid = 0; phase = 2'(d % NSPB); end
    @(negedge clk) rst_n = 1;
    seg_d = d % NSPB; n_in = 0; n_mf_seg = 0; n_sym_seg = 0; n_bit_seg = 0;
    if (seg_d != 0) n_phase_nz++;
    active = 1;
    while (n_in < NS) begin
      @(negedge clk);
      if (($urandom % 100) < gap_pct) begin
        in_valid = 0;
        n_gap++;
      end else begin
        in_valid  = 1;
        in_sample = IN_W'(rs[n_in]);
        acc_cyc[n_in] = cyc;   // accepted at the coming edge, when cyc takes this value
        n_in++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(negedge clk);
    check(n_mf_seg == NS, $sformatf("%0d filter outputs for %0d samples", n_mf_seg, NS));
    check(n_sym_seg == (NS - seg_d + NSPB - 1) / NSPB, "one decision per bit");
    active = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run_segment(0, 0);
    run_segment(2, 20);
    // a reset in the middle of a stream
    @(negedge clk) begin in_valid = 1; in_sample = 12'sd700; end
    repeat (30) @(negedge clk);
    n_reset++;
    run_segment(3, 10);
    run_segment(1, 0);
    $display("mechanisms: filter outputs %0d, samples dropped by downsampler %0d, +1 decisions %0d, -1 decisions %0d, input gaps %0d, non-zero phases %0d, mid-stream resets %0d, clipped ADC samples %0d",
             n_mf, n_drop, n_pos, n_neg, n_gap, n_phase_nz, n_reset, n_clip);
    check(n_mf > 0, "filter ran");
    check(n_drop > 0, "downsampler dropped samples");
    check(n_pos > 0 && n_neg > 0, "both decisions");
    check(n_gap > 0, "input gaps");
    check(n_phase_nz > 0, "non-zero sampling phase");
    check(n_reset > 0, "mid-stream reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
