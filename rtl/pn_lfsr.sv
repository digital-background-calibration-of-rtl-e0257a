// pn_lfsr: pseudo-random bit source.
//
// A Fibonacci linear-feedback shift register that steps once per enabled
// clock and presents one pseudo-random bit per sample. It supplies the
// capacitor-swap control N of each calibrated stage and the dither PN of the
// interstage-gain calibration, both of which only need a zero-mean random
// sign. The default polynomial x^31 + x^28 + 1 is maximal length (period
// 2^31 - 1); separate instances get separate seeds so that their sequences
// are far apart and thus uncorrelated from sample to sample. The LFSR
// structure, length and seeds are this design's choice: the source of the
// random signals is not specified beyond being pseudo-random.
//
// Interface: bit_o is the current state's output bit; it changes one clock
// after an enabled cycle. Synchronous reset loads SEED (must be non-zero).
module pn_lfsr #(
  parameter int unsigned    LEN  = 31,
  parameter int unsigned    TAP  = 28,               // second tap (1-based)
  parameter logic [LEN-1:0] SEED = LEN'(32'h1ACE_B00C)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic bit_o
);

  logic [LEN-1:0] state;
  logic           fb;

  assign fb    = state[LEN-1] ^ state[TAP-1];
  assign bit_o = state[LEN-1];

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[LEN-2:0], fb};
  end

  initial assert (SEED != '0) else $error("pn_lfsr: SEED must be non-zero");

endmodule
