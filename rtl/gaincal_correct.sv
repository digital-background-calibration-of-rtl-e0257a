// gaincal_correct: digital removal of a 4th-order interstage-gain error.
//
// A fully differential residue amplifier with finite, nonlinear opamp gain
// produces r = (1 + dg) * r_ideal with the even-order gain error
//   dg = dg0 + dg2 r^2 + dg4 r^4
// (odd orders cancel). Given estimates of the three coefficients, this block
// inverts the error to first order in dg:
//   R_corr = R - R * (g0 + g2 R^2 + g4 R^4)
// using two squarers and three multipliers. The error model is the published
// one; the first-order inversion, the use of the measured residue R in place
// of r, and the single register stage are this design's own choices.
//
// Interface: one sample per clock while en is high; r_o/vld_o follow one
// clock later. The coefficients use the estimate format (EST_FRAC fraction
// bits) and may change at any time.
module gaincal_correct
  import capcal_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  sig_t r_i,
  input  est_t g0_i,
  input  est_t g2_i,
  input  est_t g4_i,
  output sig_t r_o,
  output logic vld_o
);

  typedef logic signed [2*SIG_W-1:0]       wide_t;
  typedef logic signed [SIG_W+EST_W+3:0]   mix_t;

  sig_t r2, r4, err;
  mix_t poly;

  always_comb begin
    r2   = sig_t'((wide_t'(r_i) * wide_t'(r_i)) >>> FRAC);
    r4   = sig_t'((wide_t'(r2)  * wide_t'(r2))  >>> FRAC);
    poly = mix_t'(g0_i)
         + ((mix_t'(g2_i) * mix_t'(r2)) >>> FRAC)
         + ((mix_t'(g4_i) * mix_t'(r4)) >>> FRAC);          // EST_FRAC fraction
    err  = sig_t'((mix_t'(r_i) * poly) >>> EST_FRAC);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_o   <= '0;
      vld_o <= 1'b0;
    end else begin
      vld_o <= en;
      if (en) r_o <= r_i - err;
    end
  end

endmodule
