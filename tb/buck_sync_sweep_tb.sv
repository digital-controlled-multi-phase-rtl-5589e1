// buck_sync_sweep_tb: frequency-synchronization sweep of the complete
// controller at its default parameters, closed around buck_plant_model.
//
// The reference is stepped through switching frequencies from 3 MHz to
// 9.5 MHz, assuming a 2 GHz controller clock (one clk = 0.5 ns, which is also
// the tap delay of the phase delay line):
//   4.17 MHz (480 cycles, 60 ns between neighbouring phases), 3.0 MHz (667),
//   3.5 MHz (571), 4.0 MHz (500), 4.5 MHz (444), 9.5 MHz (211).
// The reference period need not be a multiple of four cycles: the 2x clock
// is made by a phase accumulator, so its average frequency is exact.
//
// After each step the test waits for the loops to settle and then checks,
// over 64 switching periods:
//   - the mean switching period is within 1.5 % of the reference period;
//   - the DLL code (quarter period in cycles) is within 2 of period/4;
//   - every slave turns on (k+1) quarter periods after the master, within
//     3 cycles;
//   - the DFS code is not pinned at either end of its range.
// Each frequency step and each re-lock is counted.
module buck_sync_sweep_tb;
  import buck_pkg::*;

  localparam int NSTEP = 6;
  localparam int TREFS [NSTEP] = '{480, 667, 571, 500, 444, 211};

  logic clk = 0, rst_n = 1, en = 0;
  logic ref2x = 0;
  logic cmp_s_n, cmp_r_n, zc;
  logic [2:0] ishare_gt;
  logic [9:0] vref_code, dfs_code;
  logic ss_done;
  logic [7:0] dll_code;
  logic az_p1, az_p1d, az_p2, az_blank;
  logic [3:0] pwm;
  logic [1:0] hs_m_seg, ls_m_seg;
  logic [2:0] hs_s, ls_s;
  mode_e mode;
  logic [2:0][5:0] cs_code;

  real  r_loss [4] = '{0.010, 0.010, 0.010, 0.010};
  int   extra_on [4] = '{0, 0, 0, 0};
  real  i_ph [4];
  int   period, glitches;

  int checks = 0, failures = 0;
  int n_step = 0, n_relock = 0, n_phase = 0;

  multiphase_buck_ctrl dut (
    .clk, .rst_n, .en_i(en), .ref2x_i(ref2x),
    .cmp_s_n_i(cmp_s_n), .cmp_r_n_i(cmp_r_n), .under_i(1'b0), .over_i(1'b0),
    .zc_i(zc), .below_shed_i(1'b0), .below_burst_i(1'b0),
    .ishare_gt_i(ishare_gt), .cs_en_i(1'b0), .az_in_d_i(1'b0), .vref_target_i(10'd100),
    .vref_code_o(vref_code), .ss_done_o(ss_done), .dfs_code_o(dfs_code), .dll_code_o(dll_code),
    .az_p1_o(az_p1), .az_p1d_o(az_p1d), .az_p2_o(az_p2), .az_blank_o(az_blank),
    .pwm_o(pwm), .hs_m_seg_o(hs_m_seg), .ls_m_seg_o(ls_m_seg), .hs_s_o(hs_s), .ls_s_o(ls_s),
    .mode_o(mode), .cs_code_o(cs_code)
  );

  buck_plant_model plant (
    .clk, .hs_m(hs_m_seg[0]), .ls_m(ls_m_seg[0]), .hs_s(hs_s), .dfs_code, .az_p1d,
    .light_load(1'b0), .r_loss, .extra_on,
    .cmp_s_n, .cmp_r_n, .zc, .ishare_gt, .i_ph, .period, .glitches
  );

  always #5 clk = ~clk;

  // 2x reference: toggles on average every tref/4 cycles
  int tref = TREFS[0];
  int racc = 0;
  always @(negedge clk) begin
    racc += 4;
    if (racc >= tref) begin racc -= tref; ref2x = ~ref2x; end
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (tref=%0d, t=%0t)", msg, tref, $time); end
  endtask

  // slave turn-on positions relative to the master
  int now = 0, t_m_rise = 0;
  logic [2:0] hs_s_q = '0;
  logic hs_q = 0;
  bit   phase_check_on = 0;
  int   phase_err_max = 0;
  always @(posedge clk) begin
    #1;
    now++;
    if (hs_m_seg[0] && !hs_q) t_m_rise = now;
    for (int k = 0; k < 3; k++) if (hs_s[k] && !hs_s_q[k] && phase_check_on) begin
      int d, e;
      d = now - t_m_rise;
      if (d < 0) d += period;
      e = d - (k + 1) * int'(dll_code);
      if (e < 0) e = -e;
      if (e > phase_err_max) phase_err_max = e;
      n_phase++;
    end
    hs_s_q = hs_s; hs_q = hs_m_seg[0];
  end

  task automatic wait_periods(input int n);
    repeat (n) @(posedge hs_m_seg[0]);
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) en = 1;
    wait (ss_done);

    for (int s = 0; s < NSTEP; s++) begin
      real sum, mean;
      int pmin, pmax, dq;
      tref = TREFS[s];
      n_step++;
      phase_check_on = 0;
      wait_periods(400);
      phase_check_on = 1;
      phase_err_max = 0;
      sum = 0.0; pmin = 1 << 30; pmax = 0;
      for (int i = 0; i < 64; i++) begin
        wait_periods(1);
        #2;
        sum += real'(period);
        if (period < pmin) pmin = period;
        if (period > pmax) pmax = period;
      end
      mean = sum / 64.0;
      dq = int'(dll_code) * 4 - tref;
      $display("tref %0d (%.2f MHz at 2 GHz): mean period %.1f (%0d..%0d), DFS code %0d, DLL code %0d, phase error %0d",
               tref, 2000.0 / real'(tref), mean, pmin, pmax, dfs_code, dll_code, phase_err_max);
      chk(mean > 0.985 * real'(tref) && mean < 1.015 * real'(tref), "mean switching period");
      chk(dq >= -8 && dq <= 8, "DLL quarter-period code");
      chk(phase_err_max <= 3, "slave phase spacing");
      chk(dfs_code != 0 && dfs_code != 10'h3ff, "DFS code inside its range");
      if (mean > 0.985 * real'(tref) && mean < 1.015 * real'(tref) && s > 0) n_relock++;
    end

    chk(n_step == NSTEP, "all frequency steps run");
    chk(n_relock == NSTEP - 1, "re-lock after every step");
    chk(n_phase > 0, "slave phases observed");
    $display("mechanisms: steps=%0d relocks=%0d phase=%0d", n_step, n_relock, n_phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
