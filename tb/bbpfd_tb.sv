// bbpfd_tb: self-checking test of the bang-bang phase-frequency detector.
// Drives a reference and a feedback square wave, with a phase lead, a phase
// lag, a higher and a lower feedback frequency and exactly aligned edges, and
// compares each decision with the one expected from the edge times.
module bbpfd_tb;
  logic clk = 0, rst_n = 1, en = 1;
  logic ref_s = 0, fb_s = 0;
  logic valid, early;
  int checks = 0, failures = 0;
  int n_one, n_zero, n_any;

  bbpfd dut (.clk, .rst_n, .en, .ref_i(ref_s), .fb_i(fb_s), .valid_o(valid), .fb_early_o(early));

  always #5 clk = ~clk;

  always @(posedge clk) if (valid) begin
    n_any++;
    if (early) n_one++; else n_zero++;
  end

  // run ref with period pr and fb with period pf, fb edges offset by off
  task automatic run(input int pr, input int pf, input int off, input int cycles);
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      ref_s = (t % pr) < pr / 2;
      fb_s  = (((t + pf - off) % pf) < pf / 2);
    end
  endtask

  task automatic expect_dec(input string what, input int want_one, input int want_zero);
    checks++;
    if (n_one != want_one || n_zero != want_zero) begin
      failures++;
      $display("FAIL %s: ones=%0d zeros=%0d, expected %0d/%0d", what, n_one, n_zero, want_one, want_zero);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fb starts first: no decision before the first fb edge, then fb early
    // by 5 cycles every period: 10 periods of 40 -> 10 decisions, all early
    n_one = 0; n_zero = 0; n_any = 0;
    run(40, 40, -5, 390);   // fb leads by 5; ends with no edge pending
    expect_dec("fb leads", 10, 0);
    // now fb lags by 7 cycles: every reference edge comes first
    n_one = 0; n_zero = 0;
    run(40, 40, 7, 400);
    checks++;
    if (n_zero != 10 || n_one != 0) begin
      failures++; $display("FAIL fb lags: ones=%0d zeros=%0d", n_one, n_zero);
    end
    // fb faster (period 30 vs 40): majority of decisions say early
    n_one = 0; n_zero = 0;
    run(40, 30, 0, 1200);
    checks++;
    if (!(n_one > n_zero + 5)) begin failures++; $display("FAIL fb fast: %0d/%0d", n_one, n_zero); end
    // fb slower (period 50 vs 40): majority late
    n_one = 0; n_zero = 0;
    run(40, 50, 0, 1200);
    checks++;
    if (!(n_zero > n_one + 5)) begin failures++; $display("FAIL fb slow: %0d/%0d", n_one, n_zero); end
    // aligned edges: alternating decisions, equal counts +/-1
    rst_n = 0; @(negedge clk); rst_n = 1;
    n_one = 0; n_zero = 0;
    fb_s = 1; @(negedge clk); fb_s = 0; ref_s = 0; // arm on one fb edge, then pair with ref
    @(negedge clk); ref_s = 1; @(negedge clk); @(negedge clk); ref_s = 0;
    repeat (3) @(negedge clk);
    n_one = 0; n_zero = 0;
    run(40, 40, 0, 800);
    checks++;
    if (n_one + n_zero != 20 || (n_one - n_zero) > 1 || (n_zero - n_one) > 1) begin
      failures++; $display("FAIL aligned: %0d/%0d", n_one, n_zero);
    end
    // disabled: no decisions
    en = 0; n_any = 0;
    run(40, 37, 3, 400);
    checks++;
    if (n_any != 0) begin failures++; $display("FAIL disabled produced %0d decisions", n_any); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
