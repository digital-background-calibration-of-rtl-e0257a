// tb_pn_lfsr: checks the LFSR bit stream against the recurrence of its
// polynomial, o[n] = o[n-31] xor o[n-28] with o[0..30] = seed bits 30..0,
// checks that the stream holds while en is low and that ones and zeros are
// balanced over 100k bits.
module tb_pn_lfsr;

  localparam logic [30:0] SEED = 31'h2345_6789;
  localparam int          NB   = 100000;

  logic clk, rst_n, en, b;
  int   checks, failures, ones;
  bit   o [NB];

  pn_lfsr #(.LEN(31), .TAP(28), .SEED(SEED)) dut (.clk, .rst_n, .en, .bit_o(b));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (NB * 2 + 100) @(posedge clk);
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
    checks = 0; failures = 0; ones = 0;
    for (int n = 0; n < 31; n++) o[n] = SEED[30-n];
    for (int n = 31; n < NB; n++) o[n] = o[n-31] ^ o[n-28];
    rst_n = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NB; n++) begin
      check(b == o[n], $sformatf("bit %0d differs from the recurrence", n));
      ones += int'(b);
      if (n % 1000 == 500) begin
        en = 1'b0;
        @(posedge clk); #1;
        check(b == o[n], "stream moved while en was low");
      end
      en = 1'b1;
      @(posedge clk); #1;
    end
    check(ones > NB / 2 - 1000 && ones < NB / 2 + 1000, "bit stream is not balanced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
