// tb_capcal_adc_top: end-to-end test of the calibrated ADC back end.
//
// A real-valued model of the analog pipeline (adc_model_pkg) converts a
// random input with the swap controls the back end issues and returns the
// stage digits ALIGN_LAT samples later. The test walks through the modes:
//   P0  no capacitor mismatch: output must equal the input to within the
//       converter's quantisation (checks alignment of digits and controls);
//   P1  mismatch, swapping off, calibration off  -> reference error;
//   P2  mismatch, swapping on,  calibration off  -> estimates must not move;
//   P3  mismatch, swapping on,  calibration on   -> estimates must settle on
//       the model's mismatches and the output error must drop well below P1.
// The sample enable is dropped at random to exercise the clock-enable
// timing. In parallel the gain-calibration path is fed by a model stage
// with a 4th-order gain error and a dithered sub-ADC: with zero correction
// coefficients the PN correlation s1 must be clearly non-zero, with the
// model's coefficients it must vanish. Each mechanism is counted and must
// occur. A step size of 2^-17 (instead of 2^-22) keeps the run short.
module tb_capcal_adc_top;
  import capcal_pkg::*;
  import adc_model_pkg::*;

  localparam int unsigned MU_TB  = 17;
  localparam int unsigned A      = 6;      // ALIGN_LAT default
  localparam int unsigned LOGN   = 16;
  localparam int unsigned NSTG   = 12;
  localparam int          N_P0   = 5000;
  localparam int          N_P1   = 40000;
  localparam int          N_P2   = 40000;
  localparam int          N_P3   = 3000000;
  localparam int          N_AVG  = 600000;  // estimate averaging window (end of P3)
  localparam real         SCALE  = real'(1 << FRAC);
  localparam real         ESCALE = real'(1 << EST_FRAC);
  localparam real         SSCALE = real'(64'd1 << STAT_FRAC);

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   smp_en = 1'b0, swap_en = 1'b0, cal_en = 1'b0;
  swap_t  ctrl [3];
  digit_t st1_dig [3];
  digit_t dig [NSTG-1];
  sig_t   dout;
  logic   dout_vld;
  est_t   est1 [3];
  est_t   est  [2];
  logic   gc_en = 1'b0, gc_pn;
  sig_t   gc_r = '0, gc_d = '0, gc_d0 = '0, gc_y;
  stat_t  gc_s1, gc_s3, gc_s5;
  est_t   gc_g0 = '0, gc_g2 = '0, gc_g4 = '0;
  logic   gc_vld;

  capcal_adc_top #(.MU(MU_TB), .GC_LOG_N(LOGN)) dut (
    .clk, .rst_n, .smp_en, .swap_en, .cal_en,
    .ctrl_o(ctrl), .st1_dig_i(st1_dig), .dig_i(dig),
    .dout_o(dout), .dout_vld_o(dout_vld), .est_st1_o(est1), .est_o(est),
    .gc_en, .gc_pn_o(gc_pn), .gc_r_i(gc_r), .gc_d_i(gc_d), .gc_d0_i(gc_d0),
    .gc_g0_i(gc_g0), .gc_g2_i(gc_g2), .gc_g4_i(gc_g4),
    .gc_y_o(gc_y), .gc_s1_o(gc_s1), .gc_s3_o(gc_s3), .gc_s5_o(gc_s5),
    .gc_stat_vld_o(gc_vld)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Watchdog.
  localparam longint unsigned MAX_CYC = 4_500_000;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > MAX_CYC) begin
      failures++;
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ------------------------------------------------------------ model
  rvec_t dc1;
  real dc2, dc3;
  localparam real DC1_0 = 0.010, DC1_1 = -0.008, DC1_2 = 0.006;
  localparam real DC2 = -0.012, DC3 = 0.009;

  function automatic digit_t to_dig(input int v);
    return digit_t'(v);
  endfunction

  // Converts x with the controls now on ctrl; returns the digits.
  task automatic convert(input real x, output digit_t d1 [3], output digit_t dr [NSTG-1]);
    ivec_t  dg;
    int     s;
    real    r;
    rvec_t  dcs;
    mctrl_t c;
    s = sub_adc_25(x);
    split25(s, dg);
    c.swap = int'(ctrl[0].swap); c.k = int'(ctrl[0].k);
    r = mdac(x, 3, dg, dc1, c);
    for (int i = 0; i < 3; i++) d1[i] = to_dig(dg[i]);
    for (int j = 0; j < NSTG - 1; j++) begin
      ivec_t di;
      di = '{default: 0};
      di[0] = sub_adc_15(r);
      dr[j] = to_dig(di[0]);
      if (j < 2) begin
        dcs = '{default: 0.0};
        dcs[0] = (j == 0) ? dc2 : dc3;
        c.swap = int'(ctrl[j+1].swap); c.k = 0;
        r = mdac(r, 1, di, dcs, c);
      end else begin
        r = 2.0 * r - real'(di[0]);
      end
    end
  endtask

  // ------------------------------------------------------------ stimulus
  localparam int HD = 64;
  digit_t h1 [HD][3];
  digit_t hr [HD][NSTG-1];
  real    hx [HD];
  int     n = 0;             // sample index
  int     pend_idx = -1;     // sample whose output appears next cycle
  int     phase = 0;
  int     ph_cnt = 0;
  real    sse [4];
  int     sn [4];
  real    maxerr [4];
  real    est_sum [5];
  int     est_n = 0;

  // mechanism counters
  int swaps [3];
  int ksel [3];
  int gaps = 0, est_moves = 0, mode_sw = 0, gc_blocks = 0, gc_corr_blocks = 0;
  est_t est1_prev [3] = '{default: '0};

  // gain path model
  localparam real G0 = -0.05, G2 = -0.02, G4 = -0.01, DITH = 1.0 / 16.0;
  sig_t gr_h [HD], gd_h [HD], gd0_h [HD];
  int   gn = 0;
  int   gblk = 0;

  function automatic real rnd_in();
    // uniform in (-0.95, 0.95)
    return (real'($urandom) / 4294967296.0 * 1.9) - 0.95;
  endfunction

  initial begin
    digit_t d1 [3];
    digit_t dr [NSTG-1];
    real    x, err, xg, rg;
    int     idx, s0, spn;

    for (int i = 0; i < 3; i++) begin swaps[i] = 0; ksel[i] = 0; end
    for (int i = 0; i < 4; i++) begin sse[i] = 0.0; sn[i] = 0; maxerr[i] = 0.0; end
    for (int i = 0; i < 5; i++) est_sum[i] = 0.0;
    dc1 = '{default: 0.0}; dc2 = 0.0; dc3 = 0.0;
    for (int i = 0; i < 3; i++) st1_dig[i] = '0;
    for (int j = 0; j < NSTG - 1; j++) dig[j] = '0;

    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    gc_en = 1'b1;

    while (phase < 4) begin
      @(posedge clk); #1;
      if (est1[0] != est1_prev[0]) est_moves++;
      for (int i = 0; i < 3; i++) est1_prev[i] = est1[i];

      // ---- output of the previous enabled cycle
      if (dout_vld && pend_idx >= 0) begin
        err = real'(dout) / SCALE - hx[pend_idx % HD];
        if (ph_cnt > 40 && (phase != 3 || ph_cnt > N_P3 - N_AVG)) begin
          sse[phase] += err * err; sn[phase]++;
          if (err < 0.0) err = -err;
          if (err > maxerr[phase]) maxerr[phase] = err;
        end
      end
      pend_idx = -1;

      // ---- phase control
      if (ph_cnt == ((phase == 0) ? N_P0 : (phase == 1) ? N_P1 : (phase == 2) ? N_P2 : N_P3)) begin
        phase++; ph_cnt = 0; mode_sw++;
        dc1 = '{DC1_0, DC1_1, DC1_2, 0.0, 0.0, 0.0, 0.0}; dc2 = DC2; dc3 = DC3;
        swap_en = (phase >= 2);
        cal_en  = (phase >= 3);
        if (phase == 3) begin
          // calibration off so far: estimates must not have moved
          for (int i = 0; i < 3; i++) check(est1[i] == '0, "stage-1 estimate moved with calibration off");
          for (int i = 0; i < 2; i++) check(est[i] == '0, "estimate moved with calibration off");
        end
      end

      // ---- sample
      smp_en = ($urandom_range(0, 9) != 0);
      if (!smp_en) gaps++;
      if (smp_en && phase < 4) begin
        for (int s = 0; s < 3; s++) if (ctrl[s].swap) swaps[s]++;
        if (ctrl[0].swap) ksel[ctrl[0].k]++;
        if (swap_en == 1'b0) check(!ctrl[0].swap && !ctrl[1].swap && !ctrl[2].swap, "swap issued while swapping is off");
        x = rnd_in();
        convert(x, d1, dr);
        hx[n % HD] = x;
        h1[n % HD] = d1;
        hr[n % HD] = dr;
        if (n >= int'(A)) begin
          st1_dig = h1[(n - A) % HD];
          dig     = hr[(n - A) % HD];
        end
        if (n >= int'(A) + 2) pend_idx = n - A - 2;
        n++;
        ph_cnt++;
        if (phase == 3 && ph_cnt > N_P3 - N_AVG) begin
          for (int i = 0; i < 3; i++) est_sum[i] += real'(est1[i]) / ESCALE;
          est_sum[3] += real'(est[0]) / ESCALE;
          est_sum[4] += real'(est[1]) / ESCALE;
          est_n++;
        end
      end

      // ---- gain path: one sample every cycle
      xg = rnd_in();
      s0  = sub_adc_25(xg);
      spn = sub_adc_25(xg + (gc_pn ? DITH : -DITH));
      rg  = gain_err(4.0 * xg - real'(spn), G0, G2, G4);
      gr_h[gn % HD]  = sig_t'($rtoi($floor(rg * SCALE)));
      gd_h[gn % HD]  = sig_t'(spn) <<< FRAC;
      gd0_h[gn % HD] = sig_t'(s0) <<< FRAC;
      if (gn >= int'(A)) begin
        gc_r  = gr_h[(gn - A) % HD];
        gc_d  = gd_h[(gn - A) % HD];
        gc_d0 = gd0_h[(gn - A) % HD];
      end
      gn++;
    end

    // ---------------------------------------------------------- verdicts
    $display("P0 ideal:       rms=%e max=%e", $sqrt(sse[0] / sn[0]), maxerr[0]);
    $display("P1 swap0 cal0:  rms=%e max=%e", $sqrt(sse[1] / sn[1]), maxerr[1]);
    $display("P2 swap1 cal0:  rms=%e max=%e", $sqrt(sse[2] / sn[2]), maxerr[2]);
    $display("P3 swap1 cal1:  rms=%e max=%e (after settling)", $sqrt(sse[3] / sn[3]), maxerr[3]);
    check(maxerr[0] < 1.3e-4, "ideal converter does not reproduce its input");
    check(maxerr[1] > 1.0e-3, "mismatch model has no visible effect");
    check($sqrt(sse[3] / sn[3]) < 0.35 * $sqrt(sse[1] / sn[1]), "calibration did not reduce the error");
    begin
      real want [5];
      want = '{DC1_0, DC1_1, DC1_2, DC2, DC3};
      for (int i = 0; i < 5; i++) begin
        real got;
        got = est_sum[i] / real'(est_n);
        $display("estimate %0d: %f (model %f)", i, got, want[i]);
        check(got - want[i] < 2.0e-3 && want[i] - got < 2.0e-3, "mismatch estimate off");
      end
    end
    for (int s = 0; s < 3; s++) check(swaps[s] > 0, "a stage never swapped");
    for (int k = 0; k < 3; k++) check(ksel[k] > 0, "a stage-1 capacitor was never swapped");
    check(gaps > 0, "sample enable never dropped");
    check(est_moves > 0, "estimates never updated");
    check(mode_sw >= 4, "mode switches missing");
    check(gc_blocks >= 8, "too few gain statistics blocks");
    check(gc_corr_blocks > 0, "gain correction never applied");
    $display("mechanisms: swaps=%0d/%0d/%0d k=%0d/%0d/%0d gaps=%0d est_moves=%0d modes=%0d gc_blocks=%0d",
             swaps[0], swaps[1], swaps[2], ksel[0], ksel[1], ksel[2], gaps, est_moves, mode_sw, gc_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // gain statistics: blocks 2..4 uncorrected, 6..9 with coefficients
  always @(posedge clk) begin
    if (gc_vld) begin
      real s1;
      gblk++;
      gc_blocks++;
      s1 = real'(gc_s1) / SSCALE;
      if (s1 < 0.0) s1 = -s1;
      if (gblk <= 9)
        $display("gain block %0d: s1=%e s3=%e s5=%e", gblk, real'(gc_s1) / SSCALE,
                 real'(gc_s3) / SSCALE, real'(gc_s5) / SSCALE);
      if (gblk >= 2 && gblk <= 4) check(s1 > 1.5e-3, "gain error not visible in cor[PN,Z]");
      if (gblk >= 6 && gblk <= 9) begin
        check(s1 < 1.0e-3, "corrected gain still visible in cor[PN,Z]");
        gc_corr_blocks++;
      end
      if (gblk == 4) begin
        gc_g0 <= est_t'($rtoi(G0 * ESCALE));
        gc_g2 <= est_t'($rtoi(G2 * ESCALE));
        gc_g4 <= est_t'($rtoi(G4 * ESCALE));
      end
    end
  end

endmodule
