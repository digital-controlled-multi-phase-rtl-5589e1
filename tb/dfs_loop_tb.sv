// dfs_loop_tb: closes the frequency-synchronization loop around a simple
// model of the converter as a code-controlled oscillator, whose period
// grows with the hysteresis-window code (T = 40 + code/2 clk cycles, duty
// 25 %), and checks that the switching period locks to the reference period
// (reference applied at twice that frequency) within 1.5 %, for two
// reference frequencies, and that the code settles where the model predicts.
module dfs_loop_tb;
  logic clk = 0, rst_n = 1, en = 1;
  logic ref2x = 0, fsw = 0;
  logic [9:0] code;
  logic refdiv, dv, df;
  int checks = 0, failures = 0;
  int half_ref2x = 75;        // reference period = 4 * half_ref2x
  int osc_t = 0, osc_period = 300;
  int last_rise = 0, now = 0;
  int periods[$];

  dfs_loop dut (.clk, .rst_n, .en, .ref2x_i(ref2x), .fsw_i(fsw), .dac_code_o(code),
                .ref_div_o(refdiv), .dec_valid_o(dv), .dec_fast_o(df));

  always #5 clk = ~clk;

  // reference generator and oscillator model, updated between clock edges
  int rcnt = 0;
  always @(negedge clk) begin
    now++;
    rcnt++;
    if (rcnt >= half_ref2x) begin rcnt = 0; ref2x = ~ref2x; end
    if (osc_t == 0) osc_period = 40 + int'(code) / 2;   // new period starts
    fsw   = osc_t < osc_period / 4;
    osc_t = (osc_t + 1 >= osc_period) ? 0 : osc_t + 1;
    if (osc_t == 1) begin periods.push_back(now - last_rise); last_rise = now; end
  end

  task automatic lock_check(input int tref);
    real avg; int n;
    half_ref2x = tref / 4;
    repeat (tref * 600) @(posedge clk);
    periods.delete();
    repeat (tref * 40) @(posedge clk);
    n = periods.size();
    avg = 0;
    foreach (periods[i]) avg += periods[i];
    avg = avg / n;
    checks++;
    if (avg < 0.985 * tref || avg > 1.015 * tref) begin
      failures++; $display("FAIL Tref=%0d: mean switching period %f", tref, avg);
    end else $display("Tref=%0d: mean switching period %f over %0d periods, code %0d", tref, avg, n, code);
    // model: T = 40 + code/2 -> code near 2*(Tref-40), within the dither
    checks++;
    if (int'(code) < 2 * (tref - 40) - 20 || int'(code) > 2 * (tref - 40) + 20) begin
      failures++; $display("FAIL Tref=%0d: code %0d, expected about %0d", tref, code, 2 * (tref - 40));
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    lock_check(300);
    lock_check(200);
    lock_check(400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
