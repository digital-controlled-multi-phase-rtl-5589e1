// multiphase_buck_ctrl: digital controller of a 4-phase master-slave
// quasi-current-mode hysteretic buck converter.
//
// The master phase closes the voltage loop: two sub comparators watch the
// ripple node V_FB against a window V_L..V_H around the reference, and an RS
// latch (hyst_latch) turns the high side on at V_L and off at V_H. The three
// slave phases carry only drivers and FETs; their switching signals are the
// master's signal delayed by 90, 180 and 270 degrees in a clocked delay line
// (dcc_delay_line) whose quarter-period delay is locked by a DLL to half the
// period of the 2 x f_sw reference. Each slave's falling edge is then moved
// by a duty-cycle adder/subtractor (duty_cycle_cal) under control of the
// current-sharing accumulators (current_share_ctrl), which equalise the
// slave currents to the master's without touching the phase grid.
//
// The switching frequency of a hysteretic converter drifts with the
// operating point; the DFS loop (dfs_loop) compares it with the reference
// divided by two and steers the 10-bit hysteresis-window DAC code until they
// match. The comparator pre-amps are auto-zeroed once per period in the
// off interval (az_clkgen), with the latch inputs blanked meanwhile. At
// light load mode_ctrl sheds the slaves and then turns off 75 % of the
// master's FETs and enables burst mode (bbm_driver). soft_start ramps the
// reference code after enable.
//
// Everything runs on one fast clock clk; a tap delay of the delay line and
// the time resolution of all loops is one clk period. Asynchronous inputs
// (reference, comparators, zero-cross, current flags) go through two-flop
// synchronizers, which adds two cycles of loop delay.
//
// Analog parts stay outside: the comparators, the current-steering DAC and
// window generator, the current sensors, the zero-cross detector and the
// power stage connect through the ports below.
module multiphase_buck_ctrl
  import buck_pkg::*;
#(
  parameter int unsigned DLL_W    = 8,      // delay code width (clk cycles per quarter period)
  parameter int unsigned DFS_KZ   = 4,
  parameter int unsigned CS_FRAC  = 2,
  parameter int unsigned DT       = 3,
  parameter int unsigned N_DEB    = 64,
  parameter int unsigned SS_STEP  = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en_i,            // converter enable
  input  logic                  ref2x_i,         // reference clock, 2 x f_sw
  // hysteretic sub comparators (active low)
  input  logic                  cmp_s_n_i,       // V_FB < V_L
  input  logic                  cmp_r_n_i,       // V_FB > V_H
  // load-transient detection
  input  logic                  under_i,
  input  logic                  over_i,
  // light-load sensing
  input  logic                  zc_i,            // master V_LX > 0 with low side on
  input  logic                  below_shed_i,
  input  logic                  below_burst_i,
  // current sharing: slave k+2 current above the master's
  input  logic [N_SLAVES-1:0]   ishare_gt_i,
  input  logic                  cs_en_i,         // current-sharing calibration on
  input  logic                  az_in_d_i,       // auto-zero in the D interval
  input  logic [9:0]            vref_target_i,
  // outputs
  output logic [9:0]            vref_code_o,     // to the reference DAC
  output logic                  ss_done_o,
  output logic [DFS_DAC_W-1:0]  dfs_code_o,      // to the hysteresis-window DAC
  output logic [DLL_W-1:0]      dll_code_o,
  output logic                  az_p1_o,
  output logic                  az_p1d_o,
  output logic                  az_p2_o,
  output logic                  az_blank_o,
  output logic [N_PHASES-1:0]   pwm_o,           // p1, p2', p3', p4'
  output logic [1:0]            hs_m_seg_o,      // master high side, segments 25 % / 75 %
  output logic [1:0]            ls_m_seg_o,
  output logic [N_SLAVES-1:0]   hs_s_o,          // slave high sides
  output logic [N_SLAVES-1:0]   ls_s_o,
  output mode_e                 mode_o,
  output logic [N_SLAVES-1:0][FINE_SEL_W:0] cs_code_o
);

  // ---------------- synchronizers ----------------
  localparam int unsigned NSYNC = 8 + N_SLAVES;
  logic ref2x, cmp_s_n, cmp_r_n, under, over, zc, below_shed, below_burst;
  logic [N_SLAVES-1:0] ishare_gt;

  sync2 #(.W(NSYNC)) u_sync (
    .clk, .rst_n,
    .d_i({ref2x_i, ~cmp_s_n_i, ~cmp_r_n_i, under_i, over_i, zc_i, below_shed_i,
          below_burst_i, ishare_gt_i}),
    .q_o({ref2x, cmp_s_n, cmp_r_n, under, over, zc, below_shed, below_burst, ishare_gt})
  );
  // comparator inputs pass inverted so that they reset to "inactive"

  // ---------------- soft start ----------------
  soft_start #(.W(10), .STEP_CYC(SS_STEP)) u_ss (
    .clk, .rst_n, .en(en_i), .target_i(vref_target_i),
    .vref_o(vref_code_o), .done_o(ss_done_o)
  );

  // ---------------- master phase ----------------
  logic p1, blank, az_busy, v_s, v_r;

  az_clkgen u_az (
    .clk, .rst_n, .en(en_i), .pwm_i(p1), .az_in_d_i,
    .p1_o(az_p1_o), .p1d_o(az_p1d_o), .p2_o(az_p2_o), .blank_o(blank), .busy_o(az_busy)
  );
  assign az_blank_o = blank;

  hyst_latch u_latch (
    .clk, .rst_n, .en(en_i),
    .cmp_s_n_i(~cmp_s_n), .cmp_r_n_i(~cmp_r_n), .blank_i(blank),
    .under_i(under), .over_i(over),
    .v_s_o(v_s), .v_r_o(v_r), .pwm_o(p1)
  );

  logic dfs_valid, dfs_fast, ref_div;
  dfs_loop #(.KZ(DFS_KZ)) u_dfs (
    .clk, .rst_n, .en(en_i & ss_done_o),
    .ref2x_i(ref2x), .fsw_i(p1),
    .dac_code_o(dfs_code_o), .ref_div_o(ref_div),
    .dec_valid_o(dfs_valid), .dec_fast_o(dfs_fast)
  );

  // ---------------- operating mode ----------------
  logic slaves_en, light, burst;
  mode_ctrl #(.N_DEB(N_DEB)) u_mode (
    .clk, .rst_n, .en(en_i),
    .below_shed_i(below_shed), .below_burst_i(below_burst),
    .mode_o, .slaves_en_o(slaves_en), .light_o(light), .burst_o(burst)
  );

  logic m_hs, m_ls, m_zc_off;
  bbm_driver #(.DT(DT)) u_drv_m (
    .clk, .rst_n, .en(en_i), .pwm_i(p1), .light_i(light), .burst_i(burst), .zc_i(zc),
    .hs_o(m_hs), .ls_o(m_ls), .hs_seg_o(hs_m_seg_o), .ls_seg_o(ls_m_seg_o), .zc_off_o(m_zc_off)
  );

  // ---------------- phase synchronization ----------------
  logic dll_fb, dll_valid, dll_early;
  dll #(.CODE_W(DLL_W)) u_dll (
    .clk, .rst_n, .en(en_i), .ref2x_i(ref2x),
    .code_o(dll_code_o), .clk_fb_o(dll_fb), .dec_valid_o(dll_valid), .dec_early_o(dll_early)
  );

  logic [N_SLAVES-1:0]                p_raw;
  logic [N_SLAVES-1:0][FINE_TAPS-1:0] taps_a, taps_b;
  dcc_delay_line #(.CODE_W(DLL_W)) u_dl (
    .clk, .rst_n, .en(en_i & slaves_en), .p1_i(p1), .code_i(dll_code_o),
    .p_o(p_raw), .a_o(taps_a), .b_o(taps_b)
  );

  // ---------------- current sharing ----------------
  logic p1_d, cs_strobe;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) p1_d <= 1'b0;
    else        p1_d <= p1;
  assign cs_strobe = p1 & ~p1_d;

  dcc_sel_t [N_SLAVES-1:0]    cs_sel;
  logic signed [FINE_SEL_W:0] cs_code [N_SLAVES];
  current_share_ctrl #(.FRAC(CS_FRAC)) u_cs (
    .clk, .rst_n, .en(en_i & slaves_en & cs_en_i), .strobe_i(cs_strobe),
    .gt_master_i(ishare_gt), .sel_o(cs_sel), .code_o(cs_code)
  );

  logic [N_SLAVES-1:0] p_cal;
  logic [N_SLAVES-1:0] unused_h, unused_l;
  for (genvar k = 0; k < N_SLAVES; k++) begin : g_slave
    logic hs_unused_seg, ls_unused_seg, zc_unused;
    duty_cycle_cal u_dcc (
      .p_i(p_raw[k]), .a_i(taps_a[k]), .b_i(taps_b[k]), .sel_i(cs_sel[k]), .p_o(p_cal[k])
    );
    bbm_driver #(.DT(DT)) u_drv_s (
      .clk, .rst_n, .en(en_i & slaves_en), .pwm_i(p_cal[k]),
      .light_i(1'b0), .burst_i(1'b0), .zc_i(1'b0),
      .hs_o(hs_s_o[k]), .ls_o(ls_s_o[k]),
      .hs_seg_o({hs_unused_seg, unused_h[k]}), .ls_seg_o({ls_unused_seg, unused_l[k]}),
      .zc_off_o(zc_unused)
    );
    assign cs_code_o[k] = cs_code[k];
  end

  assign pwm_o = {p_cal, p1};

endmodule
