// mf_pkg -- constants, types and coefficient sets shared by the PAM matched-filter detector.
//
// The detector filters the ADC samples of a binary PAM signal with a filter matched to a
// square-root raised-cosine (SRRC) pulse. The pulse spans -Lp*Tb .. +Lp*Tb with Lp = 6 and the
// receiver takes N = 4 samples per bit, so the matched filter has 2*Lp*N + 1 = 49 taps. Both
// numbers, the two roll-off factors (alpha = 1.0 and 0.25) and the two coefficient widths
// (16 and 8 bits) are those of the reference design this RTL follows.
//
// Coefficient tables. Tap n (n = 0 .. 48) holds round(p(t_n) * S) with t_n = (n - 24) / 4 bit
// times, S = (2^(W-1) - 1) / max|p|, and p the SRRC pulse
//     p(t) = [sin(pi t (1-a)) + 4 a t cos(pi t (1+a))] / [pi t (1 - (4 a t)^2)]
//     p(0) = 1 - a + 4a/pi
//     p(+-1/(4a)) = a/sqrt(2) [(1 + 2/pi) sin(pi/(4a)) + (1 - 2/pi) cos(pi/(4a))].
// Scaling the largest tap to full scale is a choice of this design (the reference only calls the
// pulse unit-energy; a common gain does not change any decision). The pulse is symmetric, so the
// matched filter h[n] = p(-nT) uses the same table. With alpha = 1.0 every odd tap away from the
// centre is exactly zero, and at 8 bits the small outer taps also quantize to zero.
package mf_pkg;

  localparam int LP   = 6;             // pulse half-length in bit times
  localparam int NSPB = 4;             // samples per bit (N)
  localparam int TAPS = 2*LP*NSPB + 1; // 49 matched-filter taps
  localparam int ADC_W = 12;           // ADC sample width (this design's choice)

  // Filter structure: the direct form built from slice logic, or the transposed form that maps
  // onto a chain of DSP multiply-add blocks.
  typedef enum logic [0:0] {ARCH_DIRECT = 1'b0, ARCH_TRANSPOSED = 1'b1} arch_e;

  // Excess bandwidth (roll-off) of the SRRC pulse.
  typedef enum logic [0:0] {ROLLOFF_1_00 = 1'b0, ROLLOFF_0_25 = 1'b1} rolloff_e;

  typedef int coef_set_t [TAPS];

  localparam coef_set_t SRRC_A100_C16 = '{
    -57, 0, 68, 0, -82, 0, 101, 0, -128, 0,
    168, 0, -229, 0, 331, 0, -520, 0, 936, 0,
    -2184, 0, 10922, 25735, 32767, 25735, 10922, 0, -2184, 0,
    936, 0, -520, 0, 331, 0, -229, 0, 168, 0,
    -128, 0, 101, 0, -82, 0, 68, 0, -57
  };

  localparam coef_set_t SRRC_A100_C8 = '{
    0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    1, 0, -1, 0, 1, 0, -2, 0, 4, 0,
    -8, 0, 42, 100, 127, 100, 42, 0, -8, 0,
    4, 0, -2, 0, 1, 0, -1, 0, 1, 0,
    0, 0, 0, 0, 0, 0, 0, 0, 0
  };

  localparam coef_set_t SRRC_A025_C16 = '{
    -46, 209, 285, 85, -230, -351, -90, 393, 651, 305,
    -561, -1309, -1151, 185, 2003, 2886, 1627, -1687, -5223, -6095,
    -1970, 7296, 19072, 28929, 32767, 28929, 19072, 7296, -1970, -6095,
    -5223, -1687, 1627, 2886, 2003, 185, -1151, -1309, -561, 305,
    651, 393, -90, -351, -230, 85, 285, 209, -46
  };

  localparam coef_set_t SRRC_A025_C8 = '{
    0, 1, 1, 0, -1, -1, 0, 2, 3, 1,
    -2, -5, -4, 1, 8, 11, 6, -7, -20, -24,
    -8, 28, 74, 112, 127, 112, 74, 28, -8, -24,
    -20, -7, 6, 11, 8, 1, -4, -5, -2, 1,
    3, 2, 0, -1, -1, 0, 1, 1, 0
  };

  // Coefficient set for a roll-off and a coefficient width (16 or 8 bits).
  function automatic coef_set_t srrc_coefs(rolloff_e rolloff, int coef_w);
    if (rolloff == ROLLOFF_1_00) return (coef_w <= 8) ? SRRC_A100_C8 : SRRC_A100_C16;
    else                         return (coef_w <= 8) ? SRRC_A025_C8 : SRRC_A025_C16;
  endfunction

  // Width of a full-precision sum of TAPS products of in_w x coef_w bit signed numbers.
  function automatic int acc_width(int in_w, int coef_w, int taps);
    return in_w + coef_w + $clog2(taps);
  endfunction

endpackage
