// tb_digit_combiner: random digit sets for nine 1.5-bit stages; the output
// must equal sum D_j 2^-j, computed here in integer LSBs of 2^-FRAC.
module tb_digit_combiner;
  import capcal_pkg::*;

  localparam int NSTG = 9;

  digit_t d [NSTG];
  sig_t   r;
  int     checks, failures;

  digit_combiner #(.NSTG(NSTG)) dut (.dig_i(d), .r_o(r));

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp;
    checks = 0; failures = 0;
    for (int t = 0; t < 20000; t++) begin
      exp = 0;
      for (int j = 0; j < NSTG; j++) begin
        int v;
        v = (t < 3) ? ((t == 0) ? 1 : (t == 1) ? -1 : 0) : $urandom_range(0, 2) - 1;
        d[j] = digit_t'(v);
        exp += longint'(v) * (longint'(1) << (FRAC - j - 1));
      end
      #1;
      checks++;
      if (longint'(r) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL: got %0d expected %0d", r, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
