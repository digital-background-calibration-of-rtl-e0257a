// tb_capcal_stage: four stages side by side, each fed by a real-valued model
// of its MDAC with capacitor mismatches of about 1 %, random swapping (N)
// and round-robin capacitor selection:
//   u0  1-bit   (M=1, digits +-1 only)
//   u1  1.5-bit (M=1)
//   u2  2.5-bit (M=2, three sampling capacitors)
//   u3  3.5-bit (M=3, seven sampling capacitors)
// The later stages are taken as ideal: R is the model residue rounded down
// to the signal LSB. Every sample, x_o (one clock later) is compared with
// the correction formula evaluated here in real arithmetic from the block's
// own current estimates: X = (R - sum est_i t_i + sum D) / 2^M with
// t_i = x_est - d_i, or x_est - R for the swapped capacitor. Phases:
// calibration off (estimates must hold, the 1.5-bit output must equal
// (R + D)/2 exactly), then calibration on for 16M samples with step 2^-18
// (2^-17 for the slower 3.5-bit stage): the estimates averaged over the
// last 8M samples must match the model mismatches.
module tb_capcal_stage;
  import capcal_pkg::*;
  import adc_model_pkg::*;

  localparam int          N_OFF  = 20000;
  localparam int          N_ON   = 16000000;
  localparam int          N_AVG  = 8000000;
  localparam real         SCALE  = real'(1 << FRAC);
  localparam real         ESCALE = real'(1 << EST_FRAC);
  localparam int          ND     = 4;

  logic   clk, rst_n, en, cal_en, upd_en;
  sig_t   r [ND];
  sig_t   xo [ND];
  swap_t  c [ND];
  logic   v [ND];
  digit_t dg0 [1], dg1 [1], dg2 [3], dg3 [7];
  est_t   e0 [1], e1 [1], e2 [3], e3 [7];

  capcal_stage #(.M(1), .MU(18)) u0 (
    .clk, .rst_n, .en, .cal_en, .upd_en, .r_i(r[0]), .dig_i(dg0), .ctrl_i(c[0]),
    .x_o(xo[0]), .vld_o(v[0]), .est_o(e0));
  capcal_stage #(.M(1), .MU(18)) u1 (
    .clk, .rst_n, .en, .cal_en, .upd_en, .r_i(r[1]), .dig_i(dg1), .ctrl_i(c[1]),
    .x_o(xo[1]), .vld_o(v[1]), .est_o(e1));
  capcal_stage #(.M(2), .MU(18)) u2 (
    .clk, .rst_n, .en, .cal_en, .upd_en, .r_i(r[2]), .dig_i(dg2), .ctrl_i(c[2]),
    .x_o(xo[2]), .vld_o(v[2]), .est_o(e2));
  capcal_stage #(.M(3), .MU(17)) u3 (
    .clk, .rst_n, .en, .cal_en, .upd_en, .r_i(r[3]), .dig_i(dg3), .ctrl_i(c[3]),
    .x_o(xo[3]), .vld_o(v[3]), .est_o(e3));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;

  initial begin
    repeat (2 * (N_OFF + N_ON) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic real rnd_in();
    return (real'($urandom) / 4294967296.0 * 1.9) - 0.95;
  endfunction

  // Expected stage output from the correction formula.
  function automatic real expect_x(input int m, input real rr, input ivec_t dig,
                                   input rvec_t est, input swap_t cc, input bit cal);
    real   xe, e, t, dsum;
    ivec_t d;
    int    ncap;
    ncap = (1 << m) - 1;
    dsum = 0.0;
    for (int i = 0; i < ncap; i++) dsum += real'(dig[i]);
    d = dig;
    if (cc.k != 0) begin d[cc.k] = dig[0]; d[0] = dig[cc.k]; end
    xe = (rr + dsum) / real'(1 << m);
    e  = 0.0;
    for (int i = 0; i < ncap; i++) begin
      t = (cc.swap && int'(cc.k) == i) ? xe - rr : xe - real'(d[i]);
      e += est[i] * t;
    end
    return ((cal ? rr - e : rr) + dsum) / real'(1 << m);
  endfunction

  // Model mismatches of each stage's sampling capacitors.
  rvec_t dcm [ND];
  int    mbits [ND];
  int    kk [ND];

  // Current estimates of stage u as reals.
  function automatic rvec_t est_of(input int u);
    rvec_t q;
    q = '{default: 0.0};
    case (u)
      0: q[0] = real'(e0[0]) / ESCALE;
      1: q[0] = real'(e1[0]) / ESCALE;
      2: for (int i = 0; i < 3; i++) q[i] = real'(e2[i]) / ESCALE;
      default: for (int i = 0; i < 7; i++) q[i] = real'(e3[i]) / ESCALE;
    endcase
    return q;
  endfunction

  initial begin
    real    x, ra, got;
    real    xe [ND];
    rvec_t  sum [ND];
    rvec_t  es;
    ivec_t  d [ND];
    int     navg, ncap;
    mctrl_t mc;
    bit     zero;
    checks = 0; failures = 0; navg = 0;
    mbits = '{1, 1, 2, 3};
    dcm[0] = '{0.008, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0};
    dcm[1] = '{-0.011, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0};
    dcm[2] = '{0.009, -0.007, 0.012, 0.0, 0.0, 0.0, 0.0};
    dcm[3] = '{-0.010, 0.006, 0.011, -0.008, 0.009, -0.012, 0.007};
    for (int u = 0; u < ND; u++) begin sum[u] = '{default: 0.0}; kk[u] = 0; end
    rst_n = 1'b0; en = 1'b0; cal_en = 1'b0; upd_en = 1'b0;
    r = '{default: '0}; c = '{default: '0};
    dg0 = '{default: '0}; dg1 = '{default: '0}; dg2 = '{default: '0}; dg3 = '{default: '0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < N_OFF + N_ON; n++) begin
      cal_en = (n >= N_OFF);
      upd_en = (n >= N_OFF);
      en     = 1'b1;
      for (int u = 0; u < ND; u++) begin
        x = rnd_in();
        d[u] = '{default: 0};
        if (u == 0)      d[u][0] = (x >= 0.0) ? 1 : -1;
        else if (u == 1) d[u][0] = sub_adc_15(x);
        else             split25(sub_adc_m(x, mbits[u]), d[u]);
        ncap = (1 << mbits[u]) - 1;
        c[u].swap = 1'($urandom_range(0, 1));
        c[u].k    = 3'(kk[u]);
        kk[u]     = (kk[u] + 1) % ncap;
        mc.swap = int'(c[u].swap); mc.k = int'(c[u].k);
        ra = mdac(x, ncap, d[u], dcm[u], mc);
        r[u] = sig_t'($rtoi($floor(ra * SCALE)));
        xe[u] = expect_x(mbits[u], real'(r[u]) / SCALE, d[u], est_of(u), c[u], cal_en);
      end
      dg0[0] = digit_t'(d[0][0]);
      dg1[0] = digit_t'(d[1][0]);
      for (int i = 0; i < 3; i++) dg2[i] = digit_t'(d[2][i]);
      for (int i = 0; i < 7; i++) dg3[i] = digit_t'(d[3][i]);
      @(posedge clk); #1;
      en = 1'b0;
      for (int u = 0; u < ND; u++) begin
        check(v[u], "output valid missing one clock after the sample");
        got = real'(xo[u]) / SCALE;
        check(got - xe[u] < 4.0 / SCALE && xe[u] - got < 4.0 / SCALE,
              $sformatf("stage %0d output %f differs from %f", u, got, xe[u]));
      end
      if (!cal_en) begin
        zero = (e0[0] == '0) && (e1[0] == '0);
        for (int i = 0; i < 3; i++) zero &= (e2[i] == '0);
        for (int i = 0; i < 7; i++) zero &= (e3[i] == '0);
        check(zero, "estimate moved with update off");
        check(xo[1] == ((r[1] + (sig_t'(d[1][0]) <<< FRAC)) >>> 1), "uncorrected 1.5-bit output not exact");
      end
      if (n >= N_OFF + N_ON - N_AVG) begin
        for (int u = 0; u < ND; u++) begin
          es = est_of(u);
          for (int i = 0; i < 7; i++) sum[u][i] += es[i];
        end
        navg++;
      end
      // an idle cycle now and then: nothing may change
      if ($urandom_range(0, 15) == 0) begin
        sig_t hold;
        hold = xo[2];
        @(posedge clk); #1;
        check(xo[2] == hold && !v[2], "stage changed without a sample");
      end
    end
    for (int u = 0; u < ND; u++) begin
      ncap = (1 << mbits[u]) - 1;
      for (int i = 0; i < ncap; i++) begin
        real a;
        a = sum[u][i] / real'(navg);
        $display("stage %0d capacitor %0d: estimate %f model %f", u, i + 1, a, dcm[u][i]);
        check(a - dcm[u][i] < 1.5e-3 && dcm[u][i] - a < 1.5e-3, "mismatch estimate off");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
