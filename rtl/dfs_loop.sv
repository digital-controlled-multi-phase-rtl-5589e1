// dfs_loop: digital frequency synchronization (DFS) loop of the master phase.
//
// The hysteretic buck converter is treated as a current-controlled
// oscillator whose frequency falls as the hysteresis window widens. The
// external reference (applied at twice the wanted switching frequency) is
// divided by two and compared with the master switching signal in a
// bang-bang PFD. A "switching too early/fast" decision steps the PI filter up,
// which raises the 10-bit current-steering DAC code, widens the window and
// slows the converter; the opposite decision narrows it. In lock the
// switching frequency equals the divided reference and the code dithers by
// 2*KZ+1 around its mean.
//
// Interface: ref2x_i and fsw_i are level signals synchronous to clk
// (synchronize them outside). dac_code_o drives the hysteresis-window DAC.
// Timing: one filter update per detector decision, i.e. about one per
// switching period; the code changes two clk cycles after the edge that
// completes a pair.
// The divide-by-two, BB-PFD, PI filter with KZ = 4 and 10-bit DAC follow the
// design description; the start code (mid-scale) is this implementation's
// choice.
module dfs_loop #(
  parameter int unsigned DAC_W = buck_pkg::DFS_DAC_W,
  parameter int unsigned KZ    = 4,
  parameter int unsigned INIT  = (1 << (DAC_W - 1))
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             ref2x_i,     // reference at 2 x f_sw
  input  logic             fsw_i,       // master switching signal (high-side on)
  output logic [DAC_W-1:0] dac_code_o,  // hysteresis-window DAC code
  output logic             ref_div_o,   // divided reference, f_ref
  output logic             dec_valid_o, // detector decision strobe
  output logic             dec_fast_o   // decision: switching early/fast
);

  logic ref2x_d;
  logic [DAC_W-1:0] acc_unused;

  // divide the reference by two on its rising edges
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref2x_d   <= 1'b0;
      ref_div_o <= 1'b0;
    end else begin
      ref2x_d <= ref2x_i;
      if (!en)                      ref_div_o <= 1'b0;
      else if (ref2x_i && !ref2x_d) ref_div_o <= ~ref_div_o;
    end
  end

  bbpfd u_pfd (
    .clk, .rst_n, .en,
    .ref_i     (ref_div_o),
    .fb_i      (fsw_i),
    .valid_o   (dec_valid_o),
    .fb_early_o(dec_fast_o)
  );

  pi_filter #(.W(DAC_W), .KZ(KZ), .INIT(INIT)) u_lpf (
    .clk, .rst_n, .en,
    .valid_i(dec_valid_o),
    .up_i   (dec_fast_o),
    .code_o (dac_code_o),
    .acc_o  (acc_unused)
  );

endmodule
