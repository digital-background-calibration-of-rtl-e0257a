// tb_capcal_adc_full: the converter's background convergence at full size.
//
// All back-end parameters keep their defaults (step size 2^-22). The analog
// model is a 13-bit pipeline (2.5-bit stage + eleven 1.5-bit stages) whose
// capacitors all carry random mismatch with a 0.25 % standard deviation,
// drawn from a fixed seed; only stages 1-3 are calibrated. A 0.95 Vref sine
// at about 0.05 fs is converted, first for two windows with swapping and
// calibration off, then two with swapping only (the first two modes of the
// published swap/calibration comparison, which should give about the same
// SNDR), then with both on. Every 2^20 samples the SNDR is estimated by a least-squares fit of
// the output to the input (gain and offset removed, everything else counted
// as noise and distortion). The run checks that the SNDR climbs from its
// uncalibrated value to at least 74 dB (12 bits) within the 72 million
// samples of calibration (the sample count is printed) and
// that each mismatch estimate ends near the model's value.
module tb_capcal_adc_full;
  import capcal_pkg::*;
  import adc_model_pkg::*;

  localparam int unsigned A      = 6;
  localparam int unsigned NSTG   = 12;
  localparam int          NWIN   = 1 << 20;
  localparam int          NPRE   = 4;                 // windows before calibration
  localparam int          NRUN   = NPRE + 72;         // windows
  localparam real         SCALE  = real'(1 << FRAC);
  localparam real         ESCALE = real'(1 << EST_FRAC);
  localparam real         PI     = 3.14159265358979;
  localparam real         FIN    = 0.0497318;         // cycles per sample
  localparam real         SIGMA  = 0.0025;

  logic   clk, rst_n, smp_en, swap_en, cal_en;
  swap_t  ctrl [3];
  digit_t st1_dig [3];
  digit_t dig [NSTG-1];
  sig_t   dout;
  logic   dout_vld;
  est_t   est1 [3];
  est_t   est  [2];
  logic   gc_pn;
  sig_t   gc_y;
  stat_t  gc_s1, gc_s3, gc_s5;
  logic   gc_vld;

  capcal_adc_top dut (
    .clk, .rst_n, .smp_en, .swap_en, .cal_en,
    .ctrl_o(ctrl), .st1_dig_i(st1_dig), .dig_i(dig),
    .dout_o(dout), .dout_vld_o(dout_vld), .est_st1_o(est1), .est_o(est),
    .gc_en(1'b0), .gc_pn_o(gc_pn), .gc_r_i('0), .gc_d_i('0), .gc_d0_i('0),
    .gc_g0_i('0), .gc_g2_i('0), .gc_g4_i('0),
    .gc_y_o(gc_y), .gc_s1_o(gc_s1), .gc_s3_o(gc_s3), .gc_s5_o(gc_s5),
    .gc_stat_vld_o(gc_vld)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;
  longint unsigned cyc;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    cyc = 0;
    forever begin
      @(posedge clk);
      cyc++;
      if (cyc > longint'(NRUN + 2) * NWIN) begin
        failures++;
        $display("FAIL: watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // Mismatch of every capacitor: [stage][cap]
  rvec_t dcm [NSTG];

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  task automatic convert(input real x, output digit_t d1 [3], output digit_t dr [NSTG-1]);
    ivec_t  dg;
    real    r;
    mctrl_t c;
    split25(sub_adc_25(x), dg);
    c.swap = int'(ctrl[0].swap); c.k = int'(ctrl[0].k);
    r = mdac(x, 3, dg, dcm[0], c);
    for (int i = 0; i < 3; i++) d1[i] = digit_t'(dg[i]);
    for (int j = 1; j < NSTG; j++) begin
      ivec_t di;
      di = '{default: 0};
      di[0] = sub_adc_15(r);
      dr[j-1] = digit_t'(di[0]);
      c.swap = (j < 3) ? int'(ctrl[j].swap) : 0;
      c.k = 0;
      r = mdac(r, 1, di, dcm[j], c);
    end
  endtask

  localparam int HD = 64;
  digit_t h1 [HD][3];
  digit_t hr [HD][NSTG-1];
  real    hx [HD];

  initial begin
    digit_t d1 [3];
    digit_t dr [NSTG-1];
    real    x, y, sx, sy, sxx, syy, sxy, cxx, cyy, cxy, sndr, first_sndr, best, s_off, s_swap;
    int     n, pend, win, cnt, reached;

    checks = 0; failures = 0;
    rst_n = 1'b0; smp_en = 1'b0; swap_en = 1'b0; cal_en = 1'b0;
    s_off = 0.0; s_swap = 0.0;
    void'($urandom(32'd20070527));
    for (int s = 0; s < NSTG; s++)
      for (int i = 0; i < 7; i++) dcm[s][i] = (i < 3) ? SIGMA * gauss() : 0.0;
    $display("model mismatch: st1 %f %f %f  st2 %f  st3 %f",
             dcm[0][0], dcm[0][1], dcm[0][2], dcm[1][0], dcm[2][0]);
    for (int i = 0; i < 3; i++) st1_dig[i] = '0;
    for (int j = 0; j < NSTG - 1; j++) dig[j] = '0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;

    n = 0; pend = -1; win = 0; cnt = 0; reached = -1; first_sndr = 0.0; best = 0.0;
    sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0;
    while (win < NRUN) begin
      @(posedge clk); #1;
      if (dout_vld && pend >= 0) begin
        x = hx[pend % HD];
        y = real'(dout) / SCALE;
        sx += x; sy += y; sxx += x * x; syy += y * y; sxy += x * y;
        cnt++;
        if (cnt == NWIN) begin
          cxx = sxx - sx * sx / NWIN;
          cyy = syy - sy * sy / NWIN;
          cxy = sxy - sx * sy / NWIN;
          // residual of the best linear fit y ~ a x + b
          sndr = 10.0 * $log10((cxy * cxy / cxx) / (cyy - cxy * cxy / cxx));
          if (win < 2) s_off += sndr / 2.0;
          else if (win < NPRE) s_swap += sndr / 2.0;
          if (win == NPRE) first_sndr = sndr;
          if (win >= NPRE && sndr > best) best = sndr;
          if (win >= NPRE && reached < 0 && sndr >= 74.0) reached = win - NPRE;
          $display("swap %0d cal %0d, samples %0dM: SNDR %.1f dB  est st1 %f %f %f st2 %f st3 %f",
                   swap_en, cal_en, ((win + 1) * NWIN) >> 20, sndr,
                   real'(est1[0]) / ESCALE, real'(est1[1]) / ESCALE, real'(est1[2]) / ESCALE,
                   real'(est[0]) / ESCALE, real'(est[1]) / ESCALE);
          win++; cnt = 0;
          // mode changes take effect from the next sample on; the few
          // samples still in flight are negligible in a 2^20 window
          swap_en = (win >= 2);
          cal_en  = (win >= NPRE);
          sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0;
        end
      end
      pend = -1;
      smp_en = 1'b1;
      x = 0.95 * $sin(2.0 * PI * FIN * real'(n));
      convert(x, d1, dr);
      hx[n % HD] = x; h1[n % HD] = d1; hr[n % HD] = dr;
      if (n >= int'(A)) begin
        st1_dig = h1[(n - A) % HD];
        dig     = hr[(n - A) % HD];
      end
      if (n >= int'(A) + 2) pend = n - A - 2;
      n++;
    end

    $display("SNDR swap off/cal off %.1f dB, swap on/cal off %.1f dB", s_off, s_swap);
    check(s_swap - s_off < 3.0 && s_off - s_swap < 3.0, "swapping alone changed the SNDR by more than 3 dB");
    check(s_off < 70.0, "mismatch too small to matter");
    $display("SNDR first calibrated window %.1f dB, best %.1f dB, 74 dB reached after %0d windows of 2^20",
             first_sndr, best, reached + 1);
    check(reached >= 0, "SNDR did not reach 74 dB");
    check(best > first_sndr + 8.0, "calibration gained too little SNDR");
    for (int i = 0; i < 3; i++)
      check(fabs(real'(est1[i]) / ESCALE - dcm[0][i]) < 1.0e-3, "stage-1 estimate off");
    check(fabs(real'(est[0]) / ESCALE - dcm[1][0]) < 1.0e-3, "stage-2 estimate off");
    check(fabs(real'(est[1]) / ESCALE - dcm[2][0]) < 1.0e-3, "stage-3 estimate off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
