// tb_mf_pkg -- checks the matched-filter coefficient sets against the SRRC pulse.
//
// For each roll-off (1.0, 0.25) and width (16, 8 bits) the integer table must equal the real
// pulse p((n-24)/4), evaluated independently from its closed form, scaled so the largest tap is
// 2^(W-1)-1, to within one rounding step; it must be symmetric (a matched filter for a symmetric
// pulse) and the peak must sit in the centre tap. It also counts the taps that quantize to zero
// (many for alpha = 1.0 at 8 bits, none for alpha = 0.25 at 16 bits).
module tb_mf_pkg;
  import mf_pkg::*;
  import tb_util_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic check_set(rolloff_e r, int w, int min_zeros, int max_zeros);
    coef_set_t c;
    real a, pk, s, v;
    int zeros;
    c = srrc_coefs(r, w);
    a = (r == ROLLOFF_1_00) ? 1.0 : 0.25;
    pk = 0.0;
    for (int n = 0; n < TAPS; n++) begin
      v = srrc(real'(n - LP * NSPB) / NSPB, a);
      if ((v < 0 ? -v : v) > pk) pk = (v < 0 ? -v : v);
    end
    s = (2.0 ** (w - 1) - 1.0) / pk;
    zeros = 0;
    for (int n = 0; n < TAPS; n++) begin
      v = srrc(real'(n - LP * NSPB) / NSPB, a) * s - real'(c[n]);
      check(v < 0.51 && v > -0.51, $sformatf("a=%f w=%0d tap %0d = %0d", a, w, n, c[n]));
      check(c[n] == c[TAPS-1-n], $sformatf("symmetry tap %0d", n));
      if (c[n] == 0) zeros++;
    end
    check(c[TAPS/2] == 2 ** (w - 1) - 1, "centre tap full scale");
    check(zeros >= min_zeros && zeros <= max_zeros, $sformatf("a=%f w=%0d zeros %0d", a, w, zeros));
  endtask

  initial begin
    check(TAPS == 49, "49 taps for Lp=6, N=4");
    check_set(ROLLOFF_1_00, 16, 20, 24);
    check_set(ROLLOFF_1_00, 8, 30, 34);
    check_set(ROLLOFF_0_25, 16, 0, 0);
    check_set(ROLLOFF_0_25, 8, 4, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
