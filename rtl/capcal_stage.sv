// capcal_stage: capacitor-mismatch correction and estimation for one stage.
//
// A pipeline stage with an m-bit effective resolution has a feedback
// capacitor C_F and NCAP = 2^m - 1 sampling capacitors C_S,i with relative
// mismatches dC_i = (C_S,i - C_F)/C_F. Its residue, to first order, is
//   r = 2^m x - sum(D) + E,   E = sum_i dC_i * t_i
// where D_i in {-1,0,+1} are the sub-ADC digits and t_i = x - d_i, d_i being
// the digit that drives capacitor i. In every sample one capacitor k is
// paired with C_F and, when the swap control says N = -1, takes C_F's place
// in feedback; C_F is then driven by d_k and the term of capacitor k becomes
// t_k = x - r. For a 1-bit/1.5-bit stage (m = 1) this is the familiar
// r = 2x(1 + N dC/2) - D(1 + N dC). To keep the calibrated capacitor driven
// by a digit that is mostly non-zero, the MSB digit D_1 is routed to
// capacitor k and D_k to capacitor 1 whenever k != 1; the digital side
// applies the same routing.
//
// Datapath (one sample per enabled clock):
//   x_est = (R + sum(D)) / 2^m            estimate of the stage input
//   R_hat = R - sum_i est_i * t_i(x_est)  corrected residue (x -> x_est, r -> R)
//   X     = (R_hat + sum(D)) / 2^m        stage input in Vref units, to the
//                                         previous stage or the output
//   est_k <= est_k - 2^-MU * R_hat * N * d_k   (LMS update of capacitor k)
// The update is the published sign-error-free LMS rule with step size
// eps = 2^-MU (2^-22 in the target converter); because N is random with zero
// mean, R_hat*N*d_k averages to a negative multiple of (est_k - dC_k) and the
// estimate settles on the true mismatch. The first-order form of the
// correction (replacing x by x_est) and the word sizes are this design's own
// choices. The estimate is held in an accumulator with FRAC+MU fractional
// bits so that the small step is not lost; est_o is its top EST_W bits.
//
// Interface: r_i is the digitised residue of this stage (from the later
// stages), dig_i the sub-ADC digits (dig_i[0] = D_1), ctrl_i the swap
// control that the MDAC used for this sample. cal_en enables the
// correction, upd_en the estimate update. x_o/vld_o follow one clock after
// an enabled input; the estimates change on the same edge.
module capcal_stage
  import capcal_pkg::*;
#(
  parameter int unsigned M  = 1,   // effective stage resolution in bits (1..3)
  parameter int unsigned MU = 22   // LMS step size eps = 2^-MU
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   cal_en,
  input  logic   upd_en,
  input  sig_t   r_i,
  input  digit_t dig_i [2**M-1],
  input  swap_t  ctrl_i,
  output sig_t   x_o,
  output logic   vld_o,
  output est_t   est_o [2**M-1]
);

  localparam int unsigned NCAP = 2**M - 1;
  localparam int unsigned AFR  = FRAC + MU;                 // accumulator fraction
  localparam int unsigned ASH  = AFR - EST_FRAC;            // accumulator -> estimate
  localparam int unsigned AW   = EST_W + ASH;
  localparam int unsigned PW   = EST_W + SIG_W + 2;         // product sum width
  localparam int unsigned WW   = SIG_W + M + 1;             // R + sum(D) before / 2^m

  typedef logic signed [AW-1:0] acc_t;
  typedef logic signed [PW-1:0] prod_t;
  typedef logic signed [WW-1:0] wide_t;

  acc_t   acc [NCAP];
  digit_t d   [NCAP];          // digit on each capacitor after routing
  wide_t  dsum;                // sum(D), up to 2^m - 1, needs a wider word
  sig_t   x_est, e_hat, r_hat, x_new;
  prod_t  psum;
  logic   upd_neg;             // N*d_k = +1 -> subtract R_hat

  always_comb begin
    logic signed [3:0] s;
    s = '0;
    for (int i = 0; i < NCAP; i++) s += 4'(dig_i[i]);
    dsum = wide_t'(s) <<< FRAC;
  end

  // Digit routing: D_1 drives capacitor k, D_k drives capacitor 1.
  always_comb begin
    digit_t dk_in;
    dk_in = dig_i[0];
    for (int i = 0; i < NCAP; i++)
      if (32'(ctrl_i.k) == i) dk_in = dig_i[i];
    for (int i = 0; i < NCAP; i++) d[i] = dig_i[i];
    for (int i = 1; i < NCAP; i++)
      if (32'(ctrl_i.k) == i) begin
        d[i] = dig_i[0];
        d[0] = dk_in;
      end
  end

  assign x_est = sig_t'((wide_t'(r_i) + dsum) >>> M);

  always_comb begin
    sig_t t;
    psum = '0;
    for (int i = 0; i < NCAP; i++) begin
      if (ctrl_i.swap && 32'(ctrl_i.k) == i) t = x_est - r_i;
      else                                   t = x_est - digit_to_sig(d[i]);
      psum += prod_t'(est_o[i]) * prod_t'(t);
    end
    e_hat = sig_t'(psum >>> EST_FRAC);
    r_hat = cal_en ? r_i - e_hat : r_i;
    x_new = sig_t'((wide_t'(r_hat) + dsum) >>> M);
  end

  // The digit on the selected capacitor is always D_1 after routing.
  assign upd_neg = (dig_i[0] == 2'sb01) ^ ctrl_i.swap;

  for (genvar i = 0; i < NCAP; i++) begin : g_est
    always_ff @(posedge clk) begin
      if (!rst_n) acc[i] <= '0;
      else if (en && upd_en && 32'(ctrl_i.k) == i && dig_i[0] != '0)
        acc[i] <= upd_neg ? acc[i] - acc_t'(r_hat) : acc[i] + acc_t'(r_hat);
    end
    assign est_o[i] = est_t'(acc[i] >>> ASH);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_o   <= '0;
      vld_o <= 1'b0;
    end else begin
      vld_o <= en;
      if (en) x_o <= x_new;
    end
  end

  initial assert (M >= 1 && M <= 3 && AFR >= EST_FRAC)
    else $error("capcal_stage: unsupported M or MU");

endmodule
