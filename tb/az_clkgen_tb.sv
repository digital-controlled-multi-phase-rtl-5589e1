// az_clkgen_tb: drives a switching signal and measures the auto-zero
// phases: start T_WAIT cycles after the falling (or, in D mode, rising)
// edge, P1 exactly T_P1 cycles, P1d ending T_P1D cycles after P1, at least
// T_NOV cycles between P2 and P1/P1d on both sides, blanking from the
// moment P2 opens until T_SETTLE cycles after it closes again, and one
// sequence per switching period.
module az_clkgen_tb;
  localparam int T_WAIT = 2, T_NOV = 2, T_P1 = 24, T_P1D = 4, T_SETTLE = 8;
  logic clk = 0, rst_n = 1, en = 1, pwm = 0, in_d = 0;
  logic p1, p1d, p2, blank, busy;
  int checks = 0, failures = 0;
  int t = 0, t_edge = -1000, t_p2_off = -1, t_p1_on = -1, t_p1_off = -1, t_p1d_off = -1, t_p2_on = -1;
  int seqs = 0;
  logic p1_q = 0, p1d_q = 0, p2_q = 1, pwm_q = 0;

  az_clkgen #(.T_WAIT(T_WAIT), .T_NOV(T_NOV), .T_P1(T_P1), .T_P1D(T_P1D), .T_SETTLE(T_SETTLE)) dut (
    .clk, .rst_n, .en, .pwm_i(pwm), .az_in_d_i(in_d),
    .p1_o(p1), .p1d_o(p1d), .p2_o(p2), .blank_o(blank), .busy_o(busy));

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s (t=%0d)", msg, t); end
  endtask

  // observe after each edge
  always @(posedge clk) if (rst_n) begin
    #1;
    t++;
    if (!p2 && p2_q) begin
      t_p2_off = t;
      chk(t_p2_off - t_edge == T_WAIT + 1, "sequence start after edge");
      chk(blank, "blank when P2 opens");
    end
    if (p1 && !p1_q) begin t_p1_on = t; chk(t_p1_on - t_p2_off == T_NOV, "gap before P1"); end
    if (!p1 && p1_q) begin t_p1_off = t; chk(t_p1_off - t_p1_on == T_P1, "P1 width"); end
    if (!p1d && p1d_q) begin t_p1d_off = t; chk(t_p1d_off - t_p1_off == T_P1D, "P1d delay"); end
    if (p2 && !p2_q) begin
      t_p2_on = t; seqs++;
      chk(t_p2_on - t_p1d_off == T_NOV, "gap after P1d");
      chk(blank, "blank when P2 closes");
    end
    if (!blank && p2 && !p2_q) chk(0, "blank ended early");
    if (t_p2_on > 0 && t - t_p2_on == T_SETTLE) chk(!blank, "blank ended late");
    if (t_p2_on > 0 && t - t_p2_on == T_SETTLE - 1) chk(blank, "blank too short");
    chk(!(p2 && (p1 || p1d)), "overlap");
    chk(!(p1 && !p1d), "P1 without P1d");
    p1_q = p1; p1d_q = p1d; p2_q = p2;
  end

  // switching signal: 60 cycles on, 140 off; record the edge the DUT uses
  task automatic periods(input int n);
    repeat (n) begin
      @(negedge clk); pwm = 1; pwm_q = 1; if (in_d) t_edge = t;
      repeat (60) @(negedge clk);
      pwm = 0; pwm_q = 0; if (!in_d) t_edge = t;
      repeat (139) @(negedge clk);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    periods(20);
    chk(seqs >= 19 && seqs <= 20, "one sequence per period (1-D)");
    in_d = 1; seqs = 0;
    periods(20);
    chk(seqs >= 19 && seqs <= 20, "one sequence per period (D)");
    en = 0; repeat (5) @(posedge clk); #1;
    chk(p2 && !p1 && !p1d && !blank, "idle when disabled");
    $display("sequences seen: %0d", seqs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
