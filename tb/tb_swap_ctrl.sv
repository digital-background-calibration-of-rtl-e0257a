// tb_swap_ctrl: checks the swap control of a three-capacitor stage.
// The capacitor index must step 0,1,2,0,... once per enabled sample and
// hold otherwise; with swapping off N must stay +1; with swapping on, the
// swap bit must follow the LFSR recurrence (o[n] = o[n-31] xor o[n-28]) and
// be balanced, and every capacitor must be swapped.
module tb_swap_ctrl;
  import capcal_pkg::*;

  localparam logic [30:0] SEED = 31'h0BAD_F00D;
  localparam int          NB   = 60000;

  logic  clk, rst_n, smp_en, swap_en;
  swap_t c;
  int    checks, failures, nswap;
  int    kswap [3];
  bit    o [NB];

  swap_ctrl #(.NCAP(3), .SEED(SEED)) dut (.clk, .rst_n, .smp_en, .swap_en, .ctrl_o(c));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (NB * 3) @(posedge clk);
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

  initial begin
    int k_exp;
    checks = 0; failures = 0; nswap = 0;
    kswap = '{0, 0, 0};
    for (int n = 0; n < 31; n++) o[n] = SEED[30-n];
    for (int n = 31; n < NB; n++) o[n] = o[n-31] ^ o[n-28];
    rst_n = 1'b0; smp_en = 1'b0; swap_en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    k_exp = 0;
    for (int n = 0; n < NB; n++) begin
      swap_en = (n >= 1000);
      #1;
      check(int'(c.k) == k_exp, "capacitor index out of sequence");
      if (n < 1000) check(c.swap == 1'b0, "swap while swapping is off");
      else begin
        check(c.swap == o[n], "swap bit differs from the LFSR recurrence");
        if (c.swap) begin nswap++; kswap[c.k]++; end
      end
      if ($urandom_range(0, 7) == 0) begin
        smp_en = 1'b0;
        @(posedge clk); #1;
        check(int'(c.k) == k_exp, "index moved without a sample");
      end
      smp_en = 1'b1;
      @(posedge clk); #1;
      smp_en = 1'b0;
      k_exp = (k_exp + 1) % 3;
    end
    check(nswap > (NB - 1000) / 2 - 1000 && nswap < (NB - 1000) / 2 + 1000, "swaps not balanced");
    for (int k = 0; k < 3; k++) check(kswap[k] > 5000, "a capacitor is rarely swapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
