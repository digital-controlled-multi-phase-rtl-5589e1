// buck_plant_model: behavioural model (not synthesizable, testbench only)
// of the analog side of the 4-phase converter, at the level the digital
// controller sees it, all in units of the controller clock.
//
// - Ripple node V_FB: rises by SR per cycle while the master high side is
//   on and falls by SF per cycle otherwise (quasi-current emulator).
// - Hysteresis window generator: V_H/V_L = +/- G * dfs_code around the
//   reference, so the switching period grows with the DAC code.
// - Sub comparators: cmp_r_n low when V_FB > V_H, cmp_s_n low when
//   V_FB < V_L. While the pre-amps are being auto-zeroed (P1d) their outputs
//   are random, as a shorted pre-amp with offset would give.
// - Phase currents: per master period, each phase's duty D_k is measured
//   from its high-side gate and averaged over about 8 periods, and I_k = (D_k*VIN - VOUT)/R_k with VOUT set so
//   that the master carries I1 (DC current-sharing model). EXTRA_ON adds
//   on-time to each slave (driver mismatch). ishare_gt[k] = I_{k+2} > I_1.
// - Zero-cross: with light_load set, V_LX is flagged above ground once the
//   master low side has conducted for ZC_T cycles (inductor current reached
//   zero).
module buck_plant_model #(
  parameter int SR = 6,
  parameter int SF = 2,
  parameter int G  = 3,
  parameter int ZC_T = 60
) (
  input  logic       clk,
  input  logic       hs_m,          // master high side on
  input  logic       ls_m,          // master low side on
  input  logic [2:0] hs_s,          // slave high sides on
  input  logic [9:0] dfs_code,
  input  logic       az_p1d,
  input  logic       light_load,
  input  real        r_loss [4],    // power-path resistance per phase (ohm)
  input  int         extra_on [4],  // on-time added per phase (cycles)
  output logic       cmp_s_n,
  output logic       cmp_r_n,
  output logic       zc,
  output logic [2:0] ishare_gt,
  output real        i_ph [4],      // last computed phase currents (A)
  output int         period,        // last master period (cycles)
  output int         glitches       // random comparator lows injected during P1d
);
  localparam real VIN = 2.0;
  localparam real I1  = 1.0;

  int vfb = 0;
  real d_avg [4] = '{0.0, 0.0, 0.0, 0.0};
  int ton [4];
  int t_cnt = 0, ls_cnt = 0;
  logic hs_m_q = 0;

  initial begin
    cmp_s_n = 1; cmp_r_n = 1; zc = 0; ishare_gt = '0; period = 0; glitches = 0;
    foreach (ton[k]) ton[k] = 0;
    foreach (i_ph[k]) i_ph[k] = 0.0;
  end

  always @(negedge clk) begin
    int vh, vl;
    vfb += hs_m ? SR : -SF;
    if (vfb < -4000000) vfb = -4000000;
    vh = G * int'(dfs_code);
    vl = -vh;
    if (az_p1d) begin
      cmp_s_n = 1'($urandom);
      cmp_r_n = 1'($urandom);
      if (!cmp_s_n || !cmp_r_n) glitches++;
    end else begin
      cmp_s_n = !(vfb < vl);
      cmp_r_n = !(vfb > vh);
    end
    // per-phase on time over one master period
    t_cnt++;
    if (hs_m) ton[0]++;
    for (int k = 0; k < 3; k++) if (hs_s[k]) ton[k + 1]++;
    if (hs_m && !hs_m_q) begin
      if (t_cnt > 10) begin
        real d [4];
        real vout;
        period = t_cnt;
        // averaged over about 8 periods, as the current-averaging circuit does
        for (int k = 0; k < 4; k++) begin
          d_avg[k] += (real'(ton[k] + (ton[k] > 0 ? extra_on[k] : 0)) / real'(t_cnt) - d_avg[k]) / 8.0;
          d[k] = d_avg[k];
        end
        vout = d[0] * VIN - I1 * r_loss[0];
        for (int k = 0; k < 4; k++) i_ph[k] = (d[k] * VIN - vout) / r_loss[k];
        for (int k = 0; k < 3; k++) ishare_gt[k] = i_ph[k + 1] > i_ph[0];
      end
      t_cnt = 0;
      foreach (ton[k]) ton[k] = 0;
    end
    hs_m_q = hs_m;
    ls_cnt = ls_m ? ls_cnt + 1 : 0;
    zc = light_load && (ls_cnt > ZC_T);
  end
endmodule
