// multiphase_buck_ctrl_tb: end-to-end test of the converter controller at
// its default parameters, closed around buck_plant_model.
//
// Sequence and checks:
//   1. soft start completes;
//   2. the DFS loop pulls the switching period from the start value to the
//      reference period (600 clk cycles, reference applied at 2x) within
//      1.5 %; the DLL locks the quarter-period delay to 150 cycles;
//   3. the slave high sides switch 90/180/270 degrees after the master;
//   4. with current sharing off the phases are mismatched by the power-path
//      resistances (5, 50, 10, 2.5 mOhm); with it on every slave settles
//      within one tap step of the master current, using both duty-cycle
//      addition and subtraction;
//   5. the auto-zero sequence runs every period and the random comparator
//      outputs during sampling never move the latch;
//   6. undershoot / overshoot flags force the high side on / off;
//   7. phase shedding, then segmentation + burst mode with zero-cross
//      turn-off, then back to 4-phase operation;
//   8. auto-zero moved into the on-time (D) interval: every sampling phase
//      starts while the high side is on (before: while it is off), and the
//      loop stays synchronized.
// Every mechanism is counted, and one that never happened is a failure.
module multiphase_buck_ctrl_tb;
  import buck_pkg::*;

  localparam int TREF = 600;   // switching period of the reference, clk cycles

  logic clk = 0, rst_n = 1, en = 0;
  logic ref2x = 0;
  logic cmp_s_n, cmp_r_n, under = 0, over = 0, zc, below_shed = 0, below_burst = 0;
  logic [2:0] ishare_gt;
  logic cs_en = 0, az_in_d = 0;
  logic [9:0] vref_target = 10'd100;
  logic [9:0] vref_code, dfs_code;
  logic ss_done;
  logic [7:0] dll_code;
  logic az_p1, az_p1d, az_p2, az_blank;
  logic [3:0] pwm;
  logic [1:0] hs_m_seg, ls_m_seg;
  logic [2:0] hs_s, ls_s;
  mode_e mode;
  logic [2:0][5:0] cs_code;

  logic light_load = 0;
  real  r_loss [4] = '{0.005, 0.050, 0.010, 0.0025};
  int   extra_on [4] = '{0, 0, 0, 4};
  real  i_ph [4];
  int   period, glitches;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_ss = 0, n_dfs_lock = 0, n_dll_lock = 0, n_phase = 0, n_cs_add = 0, n_cs_sub = 0,
      n_cs_bal = 0, n_az = 0, n_az_glitch = 0, n_under = 0, n_over = 0,
      n_shed = 0, n_burst = 0, n_light = 0, n_zc_off = 0, n_return = 0,
      n_az_off = 0, n_az_on = 0;
  bit az_chk_on = 0;

  multiphase_buck_ctrl dut (
    .clk, .rst_n, .en_i(en), .ref2x_i(ref2x),
    .cmp_s_n_i(cmp_s_n), .cmp_r_n_i(cmp_r_n), .under_i(under), .over_i(over),
    .zc_i(zc), .below_shed_i(below_shed), .below_burst_i(below_burst),
    .ishare_gt_i(ishare_gt), .cs_en_i(cs_en), .az_in_d_i(az_in_d), .vref_target_i(vref_target),
    .vref_code_o(vref_code), .ss_done_o(ss_done), .dfs_code_o(dfs_code), .dll_code_o(dll_code),
    .az_p1_o(az_p1), .az_p1d_o(az_p1d), .az_p2_o(az_p2), .az_blank_o(az_blank),
    .pwm_o(pwm), .hs_m_seg_o(hs_m_seg), .ls_m_seg_o(ls_m_seg), .hs_s_o(hs_s), .ls_s_o(ls_s),
    .mode_o(mode), .cs_code_o(cs_code)
  );

  buck_plant_model plant (
    .clk, .hs_m(hs_m_seg[0]), .ls_m(ls_m_seg[0]), .hs_s(hs_s), .dfs_code, .az_p1d,
    .light_load, .r_loss, .extra_on,
    .cmp_s_n, .cmp_r_n, .zc, .ishare_gt, .i_ph, .period, .glitches
  );

  always #5 clk = ~clk;

  // reference at twice the switching frequency
  int rcnt = 0;
  always @(negedge clk) begin
    rcnt++;
    if (rcnt >= TREF / 4) begin rcnt = 0; ref2x = ~ref2x; end
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  // ---- monitors ----
  int now = 0, t_m_rise = 0;
  logic [3:0] pwm_q = '0;
  logic [2:0] hs_s_q = '0;
  logic hs_q = 0, ls_q = 0, az_p1_q = 0, blank_q = 0;
  bit   phase_check_on = 0;
  int   phase_err_max = 0;
  int   shed_age = 0;
  always @(posedge clk) begin
    #1;
    now++;
    if (hs_m_seg[0] && !hs_q) t_m_rise = now;
    // slave k+2 turns on (k+1) quarter periods after the master
    for (int k = 0; k < 3; k++) if (hs_s[k] && !hs_s_q[k] && phase_check_on) begin
      int d, e;
      d = now - t_m_rise;
      if (d < 0) d += period;
      e = d - (k + 1) * int'(dll_code);
      if (e < 0) e = -e;
      if (e > phase_err_max) phase_err_max = e;
      n_phase++;
    end
    if (az_p1 && !az_p1_q) n_az++;
    // the sampling phase starts in the selected interval
    if (az_p1 && !az_p1_q && az_chk_on) begin
      if (pwm[0] != az_in_d) chk(0, "auto-zero sampling outside its interval");
      else if (az_in_d) n_az_on++;
      else n_az_off++;
    end
    if (az_blank && !under && !over && pwm[0] != pwm_q[0] && blank_q)
      chk(0, "latch moved during auto-zero blanking");
    if (ls_q && !ls_m_seg[0] && !pwm[0] && mode == MODE_BURST) n_zc_off++;
    if (mode == MODE_BURST && hs_m_seg[0]) begin
      if (hs_m_seg[1]) chk(0, "75 % segment on in burst mode");
      else n_light++;
    end
    shed_age = (mode != MODE_MULTI) ? shed_age + 1 : 0;
    if (shed_age > 2 && (hs_s != 0 || ls_s != 0)) chk(0, "slave switching while shed");
    if (hs_m_seg[0] && ls_m_seg[0]) chk(0, "master shoot-through");
    pwm_q = pwm; hs_s_q = hs_s; hs_q = hs_m_seg[0]; ls_q = ls_m_seg[0];
    az_p1_q = az_p1; blank_q = az_blank;
  end

  task automatic wait_periods(input int n);
    repeat (n) @(posedge hs_m_seg[0]);
  endtask

  function automatic real mismatch(input int k);
    return (i_ph[k] - i_ph[0]) / i_ph[0];
  endfunction

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) en = 1;

    // 1. soft start
    repeat (100 * 16 + 10) @(posedge clk);
    chk(ss_done && vref_code == vref_target, "soft start");
    if (ss_done) n_ss++;

    // 2. DFS and DLL lock
    begin
      int lo, hi; real avg; int n;
      wait_periods(700);
      avg = 0; n = 0; lo = 1 << 30; hi = 0;
      repeat (64) begin
        wait_periods(1);
        avg += period; n++;
        if (period < lo) lo = period;
        if (period > hi) hi = period;
      end
      avg = avg / n;
      $display("DFS: mean period %f (%0d..%0d), code %0d", avg, lo, hi, dfs_code);
      chk(avg > 0.985 * TREF && avg < 1.015 * TREF, "DFS frequency lock");
      if (avg > 0.985 * TREF && avg < 1.015 * TREF) n_dfs_lock++;
      $display("DLL: code %0d (expect %0d)", dll_code, TREF / 4);
      chk(int'(dll_code) >= TREF / 4 - 2 && int'(dll_code) <= TREF / 4 + 2, "DLL lock");
      if (int'(dll_code) >= TREF / 4 - 2 && int'(dll_code) <= TREF / 4 + 2) n_dll_lock++;
    end

    // 3. phase spacing
    az_chk_on = 1;
    phase_check_on = 1;
    wait_periods(20);
    phase_check_on = 0;
    $display("phase spacing: %0d slave turn-ons, max error %0d cycles", n_phase, phase_err_max);
    chk(n_phase >= 50 && phase_err_max <= 2, "90-degree phase spacing");

    // 4. current sharing: off, then on
    wait_periods(5);
    $display("sharing off: I = %f %f %f %f", i_ph[0], i_ph[1], i_ph[2], i_ph[3]);
    chk(mismatch(1) < -0.5, "mismatch without current sharing");
    cs_en = 1;
    wait_periods(200);
    begin
      real acc [3];
      foreach (acc[k]) acc[k] = 0;
      repeat (64) begin
        wait_periods(1);
        for (int k = 0; k < 3; k++) acc[k] += mismatch(k + 1);
        for (int k = 0; k < 3; k++) begin
          if ($signed(cs_code[k]) > 0) n_cs_add++;
          if ($signed(cs_code[k]) < -1) n_cs_sub++;
        end
      end
      $display("sharing on: I = %f %f %f %f, codes %0d %0d %0d", i_ph[0], i_ph[1], i_ph[2], i_ph[3],
               $signed(cs_code[0]), $signed(cs_code[1]), $signed(cs_code[2]));
      for (int k = 0; k < 3; k++) begin
        real m; m = acc[k] / 64.0;
        $display("slave %0d mean mismatch %f", k + 2, m);
        // one tap moves slave current by VIN/(T*R); allow one tap step
        chk(m < 2.0 / (TREF * r_loss[k + 1]) && m > -2.0 / (TREF * r_loss[k + 1]), "current balance");
        if (m < 2.0 / (TREF * r_loss[k + 1]) && m > -2.0 / (TREF * r_loss[k + 1])) n_cs_bal++;
      end
    end

    // 5. auto-zero
    n_az_glitch = glitches;
    $display("auto-zero sequences %0d, comparator glitches during sampling %0d", n_az, n_az_glitch);

    // 6. load transient
    az_chk_on = 0;
    wait_periods(2);
    repeat (100) @(posedge clk);
    @(negedge clk); under = 1;
    repeat (6) @(posedge clk); #1;
    chk(pwm[0] == 1, "undershoot turns the high side on");
    if (pwm[0]) n_under++;
    @(negedge clk); under = 0; over = 1;
    repeat (6) @(posedge clk); #1;
    chk(pwm[0] == 0, "overshoot turns the high side off");
    if (!pwm[0]) n_over++;
    @(negedge clk); over = 0;
    wait_periods(50);

    // 7. light-load modes
    below_shed = 1;
    wait_periods(5);
    chk(mode == MODE_SHED, "phase shedding");
    if (mode == MODE_SHED) n_shed++;
    below_burst = 1; light_load = 1;
    wait_periods(20);
    chk(mode == MODE_BURST, "burst mode");
    if (mode == MODE_BURST) n_burst++;
    below_shed = 0; below_burst = 0; light_load = 0;
    repeat (10) @(posedge clk); #1;
    chk(mode == MODE_MULTI, "return to 4-phase");
    if (mode == MODE_MULTI) n_return++;
    wait_periods(40);
    chk(period > 0.9 * TREF && period < 1.1 * TREF, "still synchronized after mode changes");

    // 8. auto-zero in the D interval
    az_in_d = 1;
    wait_periods(3);
    az_chk_on = 1;
    wait_periods(100);
    begin
      real avg; avg = 0;
      repeat (32) begin wait_periods(1); avg += period; end
      avg = avg / 32.0;
      $display("auto-zero in D: %0d sequences, mean period %f", n_az_on, avg);
      chk(avg > 0.985 * TREF && avg < 1.015 * TREF, "synchronized with auto-zero in D");
    end

    $display("mechanisms: ss=%0d dfs=%0d dll=%0d phase=%0d cs_add=%0d cs_sub=%0d cs_bal=%0d az=%0d az_glitch=%0d under=%0d over=%0d shed=%0d burst=%0d light=%0d zc_off=%0d return=%0d",
             n_ss, n_dfs_lock, n_dll_lock, n_phase, n_cs_add, n_cs_sub, n_cs_bal, n_az, n_az_glitch,
             n_under, n_over, n_shed, n_burst, n_light, n_zc_off, n_return);
    $display("auto-zero in 1-D: %0d, in D: %0d", n_az_off, n_az_on);
    chk(n_ss > 0, "mechanism: soft start");
    chk(n_dfs_lock > 0, "mechanism: DFS lock");
    chk(n_dll_lock > 0, "mechanism: DLL lock");
    chk(n_phase > 0, "mechanism: phase delay");
    chk(n_cs_add > 0, "mechanism: duty-cycle addition");
    chk(n_cs_sub > 0, "mechanism: duty-cycle subtraction");
    chk(n_cs_bal == 3, "mechanism: current balance");
    chk(n_az > 100, "mechanism: auto-zero sequence");
    chk(n_az_glitch > 0, "mechanism: blanked comparator glitch");
    chk(n_under > 0 && n_over > 0, "mechanism: transient override");
    chk(n_shed > 0, "mechanism: phase shedding");
    chk(n_burst > 0 && n_light > 0, "mechanism: segmentation and burst");
    chk(n_zc_off > 0, "mechanism: zero-cross turn-off");
    chk(n_return > 0, "mechanism: return to 4-phase");
    chk(n_az_off > 50 && n_az_on > 50, "mechanism: auto-zero in 1-D and in D");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
