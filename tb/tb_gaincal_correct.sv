// tb_gaincal_correct: random residues in (-1, 1) and random coefficients up
// to +-0.05; one clock after each sample the output must equal
// R - R (g0 + g2 R^2 + g4 R^4), computed here in real arithmetic, to within
// 8 LSB. It also checks that a residue carrying exactly the modelled gain
// error, r(1 + g(r)), comes back to r to within the second-order term g^2.
module tb_gaincal_correct;
  import capcal_pkg::*;

  localparam real SCALE  = real'(1 << FRAC);
  localparam real ESCALE = real'(1 << EST_FRAC);

  logic clk, rst_n, en, vld;
  sig_t r, ro;
  est_t g0, g2, g4;
  int   checks, failures;

  gaincal_correct dut (.clk, .rst_n, .en, .r_i(r), .g0_i(g0), .g2_i(g2), .g4_i(g4),
                       .r_o(ro), .vld_o(vld));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic real rnd(input real a);
    return (real'($urandom) / 4294967296.0 * 2.0 - 1.0) * a;
  endfunction

  initial begin
    real rr, a0, a2, a4, ex, got, ideal;
    checks = 0; failures = 0;
    rst_n = 1'b0; en = 1'b0; r = '0; g0 = '0; g2 = '0; g4 = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      a0 = rnd(0.05); a2 = rnd(0.05); a4 = rnd(0.05);
      g0 = est_t'($rtoi(a0 * ESCALE)); g2 = est_t'($rtoi(a2 * ESCALE)); g4 = est_t'($rtoi(a4 * ESCALE));
      a0 = real'(g0) / ESCALE; a2 = real'(g2) / ESCALE; a4 = real'(g4) / ESCALE;
      if (n % 2 == 0) begin
        rr = rnd(0.999);
        ideal = 2.0;
      end else begin
        ideal = rnd(0.9);
        rr = ideal * (1.0 + a0 + a2 * ideal * ideal + a4 * ideal ** 4);
      end
      r  = sig_t'($rtoi(rr * SCALE));
      rr = real'(r) / SCALE;
      ex = rr - rr * (a0 + a2 * rr * rr + a4 * rr ** 4);
      en = 1'b1;
      @(posedge clk); #1;
      en = 1'b0;
      check(vld, "valid missing one clock after the sample");
      got = real'(ro) / SCALE;
      check(got - ex < 8.0 / SCALE && ex - got < 8.0 / SCALE,
            $sformatf("r=%f got %f expected %f", rr, got, ex));
      if (ideal < 1.5)
        check(got - ideal < 0.03 && ideal - got < 0.03, "modelled gain error not removed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
