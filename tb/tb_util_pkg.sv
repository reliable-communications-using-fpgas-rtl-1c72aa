// tb_util_pkg -- reference models shared by the testbenches of the PAM detector.
//
// srrc()  : the square-root raised-cosine pulse in real arithmetic, t in bit times, evaluated from
//           the closed-form expression (independent of the RTL's integer coefficient tables).
// gauss() : a zero-mean, unit-variance Gaussian sample (Box-Muller on $urandom).
// qfunc() : the Gaussian tail probability Q(x), by numerical integration of the density.
package tb_util_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real srrc(real t, real a);
    real d;
    if (t < 1.0e-12 && t > -1.0e-12) return 1.0 - a + 4.0 * a / PI;
    d = (t < 0.0 ? -t : t) - 1.0 / (4.0 * a);
    if (d < 1.0e-9 && d > -1.0e-9)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * a)) +
                               (1.0 - 2.0 / PI) * $cos(PI / (4.0 * a)));
    return ($sin(PI * t * (1.0 - a)) + 4.0 * a * t * $cos(PI * t * (1.0 + a))) /
           (PI * t * (1.0 - (4.0 * a * t) ** 2));
  endfunction

  function automatic real uniform01();
    // in (0, 1], never exactly 0
    return (real'($urandom) + 1.0) / 4294967296.0;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = uniform01();
    u2 = uniform01();
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // Q(x) = integral from x to infinity of the unit Gaussian density (x >= 0 expected).
  function automatic real qfunc(real x);
    real s, h, u;
    int  n;
    n = 4000;
    h = (x + 12.0 - x) / n;
    s = 0.0;
    for (int i = 0; i < n; i++) begin
      u = x + (i + 0.5) * h;
      s += $exp(-u * u / 2.0) * h;
    end
    return s / $sqrt(2.0 * PI);
  endfunction

endpackage
