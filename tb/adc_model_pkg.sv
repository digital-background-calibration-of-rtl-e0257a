// adc_model_pkg: real-valued model of the analog pipeline front end, for
// testbenches only.
//
// Models the switched-capacitor stages of a pipelined ADC with Vref = 1:
//   * multi-bit stages of m = 2 or 3 bits (2.5 or 3.5 bits with redundancy):
//     comparator thresholds at odd multiples of 2^-(m+1), 2^m - 1 sampling
//     capacitors C_S,i = (1 + dc_i) C_F, digits D_1..D_{2^m-1} in
//     thermometer form (D_1 is non-zero whenever the digit sum is);
//   * 1.5-bit stages: thresholds at +-1/4, one sampling capacitor;
//   * capacitor swapping: with N = -1 the selected sampling capacitor k is
//     the feedback capacitor and C_F is driven by the digit routed to k;
//     when k != 0, D_1 drives capacitor k and D_k capacitor 0;
//   * an optional static gain error r -> r(1 + g0 + g2 r^2 + g4 r^4).
// The residue follows from charge conservation:
//   r = (x * sum(C) - sum_{driven caps} C_i d_i) / C_feedback.
package adc_model_pkg;

  typedef struct {
    int  swap;   // 1: N = -1
    int  k;      // paired sampling capacitor, 0-based
  } mctrl_t;

  typedef int  ivec_t [7];   // per-capacitor digits, up to 7 capacitors
  typedef real rvec_t [7];   // per-capacitor mismatches

  // Digit sum of an m-bit (plus redundancy) sub-ADC.
  function automatic int sub_adc_m(input real x, input int m);
    int d, lim;
    lim = (1 << m) - 1;
    d = $rtoi($floor(real'(1 << m) * x + 0.5));
    if (d > lim)  d = lim;
    if (d < -lim) d = -lim;
    return d;
  endfunction

  function automatic int sub_adc_25(input real x);
    return sub_adc_m(x, 2);
  endfunction

  function automatic int sub_adc_15(input real x);
    return (x > 0.25) ? 1 : (x < -0.25) ? -1 : 0;
  endfunction

  // Generic MDAC with ncap sampling capacitors. dig are the sub-ADC digits
  // (dig[0] = D_1); returns the residue.
  function automatic real mdac(input real x, input int ncap, input ivec_t dig,
                               input rvec_t dc, input mctrl_t c);
    real cap[7];   // sampling capacitors; C_F is the unit
    int  d[7];
    real ctot, qdac, cfb;
    for (int i = 0; i < 7; i++) d[i] = dig[i];
    if (c.k != 0) begin
      d[c.k] = dig[0];
      d[0]   = dig[c.k];
    end
    ctot = 1.0;
    for (int i = 0; i < ncap; i++) begin
      cap[i] = 1.0 + dc[i];
      ctot += cap[i];
    end
    qdac = 0.0;
    for (int i = 0; i < ncap; i++)
      if (!(c.swap != 0 && i == c.k)) qdac += cap[i] * real'(d[i]);
    if (c.swap != 0) begin
      qdac += 1.0 * real'(d[c.k]);   // C_F driven by the digit of cap k
      cfb   = cap[c.k];
    end else begin
      cfb   = 1.0;
    end
    return (x * ctot - qdac) / cfb;
  endfunction

  function automatic real gain_err(input real r, input real g0, input real g2, input real g4);
    return r * (1.0 + g0 + g2 * r * r + g4 * r * r * r * r);
  endfunction

  // Thermometer split of a digit sum into D_1..D_7 (unused ones stay 0).
  function automatic void split25(input int s, output ivec_t dig);
    int sg;
    int a;
    sg = (s < 0) ? -1 : 1;
    a  = (s < 0) ? -s : s;
    for (int i = 0; i < 7; i++) dig[i] = (a > i) ? sg : 0;
  endfunction

endpackage
