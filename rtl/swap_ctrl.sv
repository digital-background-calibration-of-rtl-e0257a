// swap_ctrl: capacitor-swap control of one calibrated pipeline stage.
//
// Each sample the stage's MDAC either keeps C_F in feedback (N = +1) or
// exchanges the roles of C_F and one sampling capacitor C_S,k (N = -1).
// N is drawn from a private LFSR so that it has zero mean and is
// uncorrelated with the input and with the other stages. In a multi-bit
// stage (NCAP > 1) the capacitor k that is paired with C_F moves round-robin
// over 0..NCAP-1, one step per sample, so every sampling capacitor is swapped
// at random and calibrated in turn; a single-capacitor stage always uses k=0.
// The random N and the per-capacitor swap are the published scheme; the
// round-robin choice of k is this design's own choice.
//
// Interface: one sample per clock while smp_en is high. ctrl_o holds the
// control for the current sample and advances one clock after each enabled
// cycle. With swap_en low, N stays +1 (no swapping) but k keeps cycling.
module swap_ctrl
  import capcal_pkg::*;
#(
  parameter int unsigned NCAP = 1,                 // sampling capacitors, 2^m - 1 (<= 7)
  parameter logic [30:0] SEED = 31'h1ACE_B00C
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  smp_en,
  input  logic  swap_en,
  output swap_t ctrl_o
);

  logic       rnd;
  logic [2:0] k_q;

  pn_lfsr #(.LEN(31), .TAP(28), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .en(smp_en), .bit_o(rnd)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)                                  k_q <= '0;
    else if (smp_en)                             k_q <= (32'(k_q) == NCAP - 1) ? '0 : k_q + 3'd1;
  end

  assign ctrl_o.swap = swap_en & rnd;
  assign ctrl_o.k    = k_q;

  initial assert (NCAP >= 1 && NCAP <= 7) else $error("swap_ctrl: NCAP out of range");

endmodule
