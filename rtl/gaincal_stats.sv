// gaincal_stats: statistics of the 4th-order interstage-gain calibration.
//
// For the stage under calibration a known dither PN (+1/-1) is added at its
// sub-ADC input. Z = Y_PN - D is the converter output with the stage's
// sub-ADC contribution removed, i.e. the stage residue scaled back to the
// input. Gain errors of the residue amplifier, modelled as
//   dg = dg0 + dg2 r^2 + dg4 r^4,
// leave a trace of PN in Z whose size grows with |Z|. This block measures
// that trace over a block of 2^LOG_N samples:
//   s1 = mean(PN * Z)        (cor[PN, Z],       drives dg0)
//   s3 = mean(PN * Z * Z^2)  (cov[PN, Z, Z^2],  drives dg2)
//   s5 = mean(PN * Z * Z^4)  (cov[PN, Z, Z^4],  drives dg4)
// Z^2 and Z^4 are formed with two squarers, Z^4 kept at double precision;
// PN only selects add or subtract.
// The choice of the three statistics follows the published 4th-order scheme;
// reading the three-argument cov[] as the PN correlation of Z weighted by
// Z^2 or Z^4, the block length and the word sizes are this design's own. The
// rule that turns these statistics into coefficient estimates is not part
// of this block (see gaincal_correct for the correction itself).
//
// Interface: one sample per clock while en is high. After every 2^LOG_N
// enabled samples, s1_o/s3_o/s5_o (STAT_FRAC fraction bits, so that the
// small higher-order terms keep their resolution) are updated and stat_vld_o pulses for one
// clock; they then hold until the next block ends.
module gaincal_stats
  import capcal_pkg::*;
#(
  parameter int unsigned LOG_N = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  sig_t  y_i,     // converter output word with the dither applied
  input  sig_t  d_i,     // value of the stage's sub-ADC output, same units
  input  logic  pn_i,    // dither sign: 1 = +1, 0 = -1
  output stat_t s1_o,
  output stat_t s3_o,
  output stat_t s5_o,
  output logic  stat_vld_o
);

  localparam int unsigned AW = STAT_W + LOG_N;
  typedef logic signed [AW-1:0]       acc_t;
  typedef logic signed [2*SIG_W-1:0]  w2_t;   // 2*FRAC fraction bits
  typedef logic signed [3*SIG_W-1:0]  w3_t;

  sig_t  z, z2;
  w2_t   z4;                 // 2*FRAC fraction bits
  stat_t p1, p3, p5;         // STAT_FRAC fraction bits
  acc_t  a1, a3, a5;
  acc_t  n1, n3, n5;
  logic [LOG_N-1:0] cnt;

  always_comb begin
    z  = y_i - d_i;
    z2 = sig_t'((w2_t'(z) * w2_t'(z)) >>> FRAC);
    z4 = w2_t'(z2) * w2_t'(z2);
    p1 = stat_t'(z) <<< (STAT_FRAC - FRAC);
    p3 = stat_t'((w2_t'(z) * w2_t'(z2)) >>> (2*FRAC - STAT_FRAC));
    p5 = stat_t'((w3_t'(z) * w3_t'(z4)) >>> (3*FRAC - STAT_FRAC));
    n1 = a1 + (pn_i ? acc_t'(p1) : -acc_t'(p1));
    n3 = a3 + (pn_i ? acc_t'(p3) : -acc_t'(p3));
    n5 = a5 + (pn_i ? acc_t'(p5) : -acc_t'(p5));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a1 <= '0; a3 <= '0; a5 <= '0;
      cnt <= '0;
      s1_o <= '0; s3_o <= '0; s5_o <= '0;
      stat_vld_o <= 1'b0;
    end else begin
      stat_vld_o <= 1'b0;
      if (en) begin
        cnt <= cnt + 1'b1;
        if (&cnt) begin
          // Close the block including this sample and restart.
          s1_o <= stat_t'(n1 >>> LOG_N);
          s3_o <= stat_t'(n3 >>> LOG_N);
          s5_o <= stat_t'(n5 >>> LOG_N);
          stat_vld_o <= 1'b1;
          a1 <= '0; a3 <= '0; a5 <= '0;
        end else begin
          a1 <= n1; a3 <= n3; a5 <= n5;
        end
      end
    end
  end

  initial assert (STAT_FRAC >= FRAC && STAT_FRAC <= 2*FRAC)
    else $error("gaincal_stats: unsupported STAT_FRAC");

endmodule
