// capcal_pkg: number formats shared by the calibration back end.
//
// Every analog quantity (stage input x, residue r, stage digits) is carried
// digitally in units of Vref as a two's complement fixed-point number with
// FRAC fractional bits and SIG_W bits in all, so values in [-4, 4) fit.
// Mismatch estimates delta_C use EST_FRAC fractional bits and the small
// gain-calibration statistics STAT_FRAC. A stage digit is a
// signed 2-bit value in {-1, 0, +1}. These word sizes are this design's own
// choice; the sizes of the converter (stage count, stage resolution, step
// size 2^-22) come from the 13-bit example converter the design targets.
package capcal_pkg;

  localparam int unsigned FRAC     = 20;        // fractional bits of signals
  localparam int unsigned SIG_W    = FRAC + 3;  // signal word, range [-4, 4)
  localparam int unsigned EST_FRAC = 24;        // fractional bits of estimates
  localparam int unsigned EST_W    = EST_FRAC + 2; // estimate word, range [-2, 2)

  localparam int unsigned STAT_FRAC = 36;      // fractional bits of statistics
  localparam int unsigned STAT_W    = STAT_FRAC + 3;

  typedef logic signed [SIG_W-1:0] sig_t;
  typedef logic signed [STAT_W-1:0] stat_t;
  typedef logic signed [EST_W-1:0] est_t;
  typedef logic signed [1:0]       digit_t;     // -1, 0 or +1

  // Swap control of one stage for one sample.
  typedef struct packed {
    logic       swap;  // 1: N = -1 (the selected C_S,k is in feedback)
    logic [2:0] k;     // index (0-based) of the sampling capacitor paired with C_F
  } swap_t;

  // A digit value as a signal word (x Vref).
  function automatic sig_t digit_to_sig(input digit_t d);
    sig_t one;
    one = sig_t'(1) <<< FRAC;
    return (d == 2'sb01) ? one : (d == 2'sb11) ? -one : '0;
  endfunction

endpackage
