// bbm_driver_tb: random switching requests into the break-before-make
// driver. Checks that the two sides are never on together, that a side only
// turns on after the other has been off for DT cycles, that each side
// follows the request within DT+2 cycles, the 1:3 segment enables, and the
// burst-mode zero-cross turn-off of the low side.
module bbm_driver_tb;
  localparam int DT = 3;
  logic clk = 0, rst_n = 1, en = 1, pwm = 0, light = 0, burst = 0, zc = 0;
  logic hs, ls, zc_off;
  logic [1:0] hs_seg, ls_seg;
  int checks = 0, failures = 0;
  int hs_off_t = DT, ls_off_t = DT, pwm_age = 0, zc_events = 0;
  logic pwm_s = 0;

  bbm_driver #(.DT(DT)) dut (.clk, .rst_n, .en, .pwm_i(pwm), .light_i(light), .burst_i(burst),
                             .zc_i(zc), .hs_o(hs), .ls_o(ls), .hs_seg_o(hs_seg), .ls_seg_o(ls_seg),
                             .zc_off_o(zc_off));

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  logic hs_q = 0, ls_q = 0;
  always @(posedge clk) if (rst_n) begin
    #1;
    chk(!(hs && ls), "shoot-through");
    if (hs && !hs_q) chk(ls_off_t >= DT, "high side on before dead time");
    if (ls && !ls_q) chk(hs_off_t >= DT, "low side on before dead time");
    hs_off_t = hs ? 0 : hs_off_t + 1;
    ls_off_t = ls ? 0 : ls_off_t + 1;
    pwm_age  = (pwm == pwm_s) ? pwm_age + 1 : 0;
    pwm_s    = pwm;
    if (en && pwm_age == DT + 2) begin
      chk(hs == pwm, "high side does not follow request");
      if (!burst) chk(ls == !pwm, "low side does not follow request");
    end
    chk(hs_seg == {hs & ~light, hs} && ls_seg == {ls & ~light, ls}, "segments");
    hs_q = hs; ls_q = ls;
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      pwm = ~pwm;
      light = 1'($urandom_range(0, 3) == 0);
      repeat ($urandom_range(1, 15)) @(negedge clk);
    end
    // burst mode: zero cross during the low-side interval turns it off
    burst = 1; light = 1;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk); pwm = 1;
      repeat (10) @(negedge clk);
      pwm = 0;
      repeat (8) @(negedge clk);
      chk(ls, "low side on before zero cross");
      zc = 1; @(negedge clk); zc = 0;
      @(negedge clk);
      chk(!ls && zc_off, "low side not off after zero cross");
      if (!ls) zc_events++;
      repeat (8) @(negedge clk);
      chk(!ls && !hs, "both off until next cycle");
    end
    @(negedge clk); pwm = 1; repeat (10) @(negedge clk);
    chk(hs && !zc_off, "next cycle restarts");
    $display("zero-cross turn-offs: %0d", zc_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
