// digit_combiner: digital error correction of the uncalibrated stages.
//
// The stages after the last calibrated one are plain 1.5-bit stages with a
// gain of two and digits D in {-1,0,+1}. Their digital residue seen from the
// last calibrated stage is the binary-weighted digit sum
//   R = sum_{j=1..NSTG} D_j * 2^-j   (in Vref units),
// which is what redundant (overlapping) digital correction reduces to for
// ideal stages. The residue of the last stage is not digitised. Purely
// combinational; dig_i[0] is the stage right after the calibrated ones.
module digit_combiner
  import capcal_pkg::*;
#(
  parameter int unsigned NSTG = 9
) (
  input  digit_t dig_i [NSTG],
  output sig_t   r_o
);

  always_comb begin
    r_o = '0;
    for (int j = 0; j < NSTG; j++)
      r_o += digit_to_sig(dig_i[j]) >>> (j + 1);
  end

  initial assert (NSTG < FRAC) else $error("digit_combiner: NSTG too large for FRAC");

endmodule
