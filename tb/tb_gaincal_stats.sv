// tb_gaincal_stats: blocks of 2^8 samples with random Z (via y and d) and
// random PN, and random idle cycles. After each block the three outputs must
// equal the block means of PN*Z, PN*Z^3 and PN*Z^5 computed here in real
// arithmetic, the valid pulse must come exactly once per 256 enabled
// samples, and the outputs must hold between blocks.
module tb_gaincal_stats;
  import capcal_pkg::*;

  localparam int unsigned LOGN   = 8;
  localparam int          NBLK   = 200;
  localparam real         SCALE  = real'(1 << FRAC);
  localparam real         SSCALE = real'(64'd1 << STAT_FRAC);

  logic  clk, rst_n, en, pn, vld;
  sig_t  y, d;
  stat_t s1, s3, s5;
  int    checks, failures;

  gaincal_stats #(.LOG_N(LOGN)) dut (
    .clk, .rst_n, .en, .y_i(y), .d_i(d), .pn_i(pn),
    .s1_o(s1), .s3_o(s3), .s5_o(s5), .stat_vld_o(vld));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (NBLK * (1 << LOGN) * 3) @(posedge clk);
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

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  initial begin
    real e1, e3, e5, z, ps;
    checks = 0; failures = 0;
    rst_n = 1'b0; en = 1'b0; y = '0; d = '0; pn = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      e1 = 0.0; e3 = 0.0; e5 = 0.0;
      for (int n = 0; n < (1 << LOGN); n++) begin
        if ($urandom_range(0, 7) == 0) begin
          stat_t h;
          en = 1'b0; h = s1;
          @(posedge clk); #1;
          check(!vld && s1 == h, "statistics changed without a sample");
        end
        en = 1'b1;
        y  = sig_t'($signed($urandom_range(0, 2 << FRAC)) - (1 << FRAC));
        d  = sig_t'(($signed($urandom_range(0, 2)) - 1) <<< (FRAC - 2));
        pn = $urandom_range(0, 1);
        z  = real'(y - d) / SCALE;
        ps = pn ? 1.0 : -1.0;
        e1 += ps * z; e3 += ps * z * z * z; e5 += ps * z * z * z * z * z;
        @(posedge clk); #1;
        en = 1'b0;
        if (n < (1 << LOGN) - 1) check(!vld, "valid pulse inside a block");
      end
      check(vld, "valid pulse missing at the end of a block");
      e1 /= real'(1 << LOGN); e3 /= real'(1 << LOGN); e5 /= real'(1 << LOGN);
      check(near(real'(s1) / SSCALE, e1, 1.0e-6), $sformatf("s1 %e vs %e", real'(s1) / SSCALE, e1));
      check(near(real'(s3) / SSCALE, e3, 2.0e-6), $sformatf("s3 %e vs %e", real'(s3) / SSCALE, e3));
      check(near(real'(s5) / SSCALE, e5, 2.0e-6), $sformatf("s5 %e vs %e", real'(s5) / SSCALE, e5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
