// capcal_adc_top: digital back end of a 13-bit pipelined ADC with background
// capacitor-mismatch calibration, plus an interstage-gain statistics path.
//
// Converter: a 2.5-bit first stage (m = 2, three sampling capacitors, gain 4)
// followed by NSTG-1 = 11 stages of 1.5 bits (gain 2). Only the first NCAL = 3
// stages, whose errors matter most, are calibrated; all three are calibrated
// at once, in the background, while converting.
//
// Per sample this block
//   1. issues a swap control (N and the paired capacitor k) for each
//      calibrated stage on ctrl_o; the analog front end applies it to the
//      sample it is taking and returns that sample's digits ALIGN_LAT samples
//      later, deskewed so that all stage digits of one sample arrive together;
//   2. keeps the controls in a delay line so that each stage's correction
//      sees the control its MDAC used;
//   3. rebuilds the output from the back: stages 4..12 by a plain binary
//      weighted sum (digit_combiner), then stage 3, stage 2 and stage 1 each
//      through a capcal_stage that corrects its residue with the current
//      mismatch estimates and updates those estimates by LMS.
// The stage corrections are pipelined one sample apart, so dout_o belongs to
// the sample whose controls were issued ALIGN_LAT + 3 samples earlier.
//
// Modes (the three rows of the published swap/calibration comparison):
// swap_en = 0 keeps C_F in feedback (N = +1); cal_en = 0 turns off the
// correction. Estimates are updated only when both are on, because without
// swapping the LMS rule has no zero-mean N to work with.
//
// Gain-calibration path (independent of the above, own ports): the residue
// of the stage under gain calibration (gc_r_i, digitised by the later
// stages) is corrected with externally supplied 4th-order coefficients
// (gaincal_correct), recombined with the stage's dithered sub-ADC value
// gc_d_i into gc_y_o = (R_corr + D_PN)/4, and the PN statistics of
// Z = Y - D/4 are accumulated (gaincal_stats), D being the sub-ADC decision
// without dither (gc_d0_i). With an exact gain, Y does not depend on the
// dither and Z carries no trace of PN; a gain error leaves one. gc_pn_o is the dither sign for the analog
// sub-ADC; the statistics use it delayed by the same ALIGN_LAT.
//
// Stage structure, resolutions, the calibrated stage count and the default
// step size 2^-22 follow the published example converter. The deskew
// latency, the clock-enable sample timing, the output format (fixed point,
// Vref = 1, FRAC fraction bits) and the external gain coefficients are this
// design's own choices.
module capcal_adc_top
  import capcal_pkg::*;
#(
  parameter int unsigned NSTG      = 12,  // pipeline stages in all
  parameter int unsigned NCAL      = 3,   // calibrated stages (first is 2.5-bit)
  parameter int unsigned MU        = 22,  // LMS step size 2^-MU
  parameter int unsigned ALIGN_LAT = 6,   // samples from control issue to digits
  parameter int unsigned GC_LOG_N  = 16   // gain statistics block length 2^N
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   smp_en,                 // one sample per enabled clock
  input  logic   swap_en,
  input  logic   cal_en,
  // capacitor-mismatch calibration
  output swap_t  ctrl_o     [NCAL],      // to the MDAC switches, sample now
  input  digit_t st1_dig_i  [3],         // stage 1 sub-ADC digits D_1..D_3
  input  digit_t dig_i      [NSTG-1],    // stages 2..NSTG, one digit each
  output sig_t   dout_o,                 // converter output, Vref = 1
  output logic   dout_vld_o,
  output est_t   est_st1_o  [3],         // dC_1..dC_3 of stage 1
  output est_t   est_o      [NCAL-1],    // dC of stages 2..NCAL
  // interstage-gain calibration
  input  logic   gc_en,
  output logic   gc_pn_o,                // dither sign for the sub-ADC
  input  sig_t   gc_r_i,                 // digitised residue of the stage
  input  sig_t   gc_d_i,                 // its sub-ADC output, dither applied
  input  sig_t   gc_d0_i,                // its sub-ADC output without dither
  input  est_t   gc_g0_i,
  input  est_t   gc_g2_i,
  input  est_t   gc_g4_i,
  output sig_t   gc_y_o,
  output stat_t  gc_s1_o,
  output stat_t  gc_s3_o,
  output stat_t  gc_s5_o,
  output logic   gc_stat_vld_o
);

  localparam int unsigned DL = ALIGN_LAT + NCAL;   // control delay line depth

  // ---------------------------------------------------------------- controls
  swap_t ctrl_dl [NCAL][DL];

  for (genvar s = 0; s < NCAL; s++) begin : g_ctrl
    swap_ctrl #(
      .NCAP (s == 0 ? 3 : 1),
      .SEED (31'h1ACE_B00C ^ (31'(s + 1) * 31'h0492_4925))
    ) u_swap (
      .clk, .rst_n, .smp_en, .swap_en, .ctrl_o(ctrl_o[s])
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < DL; i++) ctrl_dl[s][i] <= '0;
      end else if (smp_en) begin
        ctrl_dl[s][0] <= ctrl_o[s];
        for (int i = 1; i < DL; i++) ctrl_dl[s][i] <= ctrl_dl[s][i-1];
      end
    end
  end

  // ------------------------------------------------------------------ digits
  // Stage s (0-based, calibrated) is processed NCAL-1-s samples after the
  // digits arrive, so its digits wait that long.
  digit_t st1_dl [NCAL-1][3];
  digit_t dig_dl [NCAL-1][NCAL-1];      // [delay][stage 2..NCAL]

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NCAL - 1; i++) begin
        for (int c = 0; c < 3; c++)        st1_dl[i][c] <= '0;
        for (int c = 0; c < NCAL - 1; c++) dig_dl[i][c] <= '0;
      end
    end else if (smp_en) begin
      st1_dl[0] <= st1_dig_i;
      for (int c = 0; c < NCAL - 1; c++) dig_dl[0][c] <= dig_i[c];
      for (int i = 1; i < NCAL - 1; i++) begin
        st1_dl[i] <= st1_dl[i-1];
        dig_dl[i] <= dig_dl[i-1];
      end
    end
  end

  // Digit (stage s, 1..NCAL-1) as seen when that stage is processed.
  function automatic digit_t stage_digit(input int unsigned s);
    int unsigned dly;
    dly = NCAL - 1 - s;
    return (dly == 0) ? dig_i[s-1] : dig_dl[dly-1][s-1];
  endfunction

  // ---------------------------------------------------------------- back end
  digit_t tail_dig [NSTG-NCAL];
  sig_t   r_tail;

  always_comb
    for (int j = 0; j < NSTG - NCAL; j++) tail_dig[j] = dig_i[NCAL-1+j];

  digit_combiner #(.NSTG(NSTG - NCAL)) u_tail (.dig_i(tail_dig), .r_o(r_tail));

  // ------------------------------------------------------- calibrated stages
  sig_t x_st [NCAL];
  logic v_st [NCAL];
  logic upd_en;

  assign upd_en = cal_en & swap_en;

  // 1.5-bit stages NCAL-1 .. 1 (0-based), processed from the back.
  for (genvar s = 1; s < NCAL; s++) begin : g_st
    digit_t d1 [1];
    est_t   e1 [1];
    assign d1[0] = stage_digit(s);

    capcal_stage #(.M(1), .MU(MU)) u_stage (
      .clk, .rst_n, .en(smp_en), .cal_en, .upd_en,
      .r_i    (s == NCAL - 1 ? r_tail : x_st[s+1]),
      .dig_i  (d1),
      .ctrl_i (ctrl_dl[s][ALIGN_LAT + NCAL - 2 - s]),
      .x_o    (x_st[s]),
      .vld_o  (v_st[s]),
      .est_o  (e1)
    );
    assign est_o[s-1] = e1[0];
  end

  // 2.5-bit first stage.
  capcal_stage #(.M(2), .MU(MU)) u_stage1 (
    .clk, .rst_n, .en(smp_en), .cal_en, .upd_en,
    .r_i    (x_st[1]),
    .dig_i  (st1_dl[NCAL-2]),
    .ctrl_i (ctrl_dl[0][ALIGN_LAT + NCAL - 2]),
    .x_o    (x_st[0]),
    .vld_o  (v_st[0]),
    .est_o  (est_st1_o)
  );

  assign dout_o     = x_st[0];
  assign dout_vld_o = v_st[0];

  // ------------------------------------------------ interstage-gain path
  logic              pn_now;
  logic [ALIGN_LAT-1:0] pn_dl;
  sig_t              r_corr, d_q, d0_q;
  logic              pn_q, rc_vld;

  pn_lfsr #(.LEN(31), .TAP(28), .SEED(31'h5EED_0D17)) u_dither (
    .clk, .rst_n, .en(gc_en), .bit_o(pn_now)
  );
  assign gc_pn_o = pn_now;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pn_dl <= '0;
      d_q   <= '0;
      d0_q  <= '0;
      pn_q  <= 1'b0;
    end else if (gc_en) begin
      pn_dl <= {pn_dl[ALIGN_LAT-2:0], pn_now};
      d_q   <= gc_d_i;
      d0_q  <= gc_d0_i;
      pn_q  <= pn_dl[ALIGN_LAT-1];
    end
  end

  gaincal_correct u_gcorr (
    .clk, .rst_n, .en(gc_en), .r_i(gc_r_i),
    .g0_i(gc_g0_i), .g2_i(gc_g2_i), .g4_i(gc_g4_i),
    .r_o(r_corr), .vld_o(rc_vld)
  );

  assign gc_y_o = (r_corr + d_q) >>> 2;

  gaincal_stats #(.LOG_N(GC_LOG_N)) u_gstats (
    .clk, .rst_n, .en(gc_en & rc_vld),
    .y_i(gc_y_o), .d_i(d0_q >>> 2), .pn_i(pn_q),
    .s1_o(gc_s1_o), .s3_o(gc_s3_o), .s5_o(gc_s5_o), .stat_vld_o(gc_stat_vld_o)
  );

  initial assert (NCAL >= 2 && NSTG > NCAL && ALIGN_LAT >= 2)
    else $error("capcal_adc_top: unsupported NSTG/NCAL/ALIGN_LAT");

endmodule
