// dll: delay-locked loop that sets the delay of the phase delay line.
//
// A replica sub delay line delays CLK_ref (applied at 2 x f_sw) by `code_o`
// clk cycles. Its inverted output CLK_FB is compared with CLK_ref in a
// bang-bang PFD. With zero delay CLK_FB rises half a reference period after
// CLK_ref; the loop lengthens the delay while CLK_FB is early and shortens it
// while it is late, and locks when the delay equals half a reference period,
// i.e. 0.25 T_s of the switching period: 90 degrees per sub delay line.
//
// In silicon the filter code goes through a DAC to the tail current of
// current-starved inverters. Here the delay line is a clocked tapped delay,
// so code_o is the delay in clk cycles and feeds dcc_delay_line directly
// (a larger code means a longer delay, i.e. a smaller tail current).
//
// Interface: ref2x_i synchronous to clk. code_o holds between CODE_MIN and
// 2**CODE_W-1; CODE_MIN keeps room for the 32 early taps of each slave.
// Timing: about one update per reference period.
// The BB-PFD / LPF / DAC / delay-line loop and the inverted feedback follow
// the design description; code width, limits, pure-integral filter (KZ = 0)
// and the start value are this implementation's choices.
module dll #(
  parameter int unsigned CODE_W   = 8,
  parameter int unsigned CODE_MIN = buck_pkg::FINE_TAPS + 2,
  parameter int unsigned KZ       = 0,
  parameter int unsigned INIT     = CODE_MIN
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              ref2x_i,
  output logic [CODE_W-1:0] code_o,
  output logic              clk_fb_o,     // inverted replica output
  output logic              dec_valid_o,
  output logic              dec_early_o
);

  localparam int unsigned LEN = (1 << CODE_W);

  logic [LEN-1:0]    rep;       // rep[k] = ref2x_i delayed by k+1 cycles
  logic [CODE_W-1:0] acc_unused;
  logic              clk_fb0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rep <= '0;
    else        rep <= {rep[LEN-2:0], ref2x_i};
  end

  // CLK_FB0 = CLK_ref delayed by code cycles
  assign clk_fb0  = rep[code_o - CODE_W'(1)];
  assign clk_fb_o = ~clk_fb0;

  bbpfd u_pfd (
    .clk, .rst_n, .en,
    .ref_i     (ref2x_i),
    .fb_i      (clk_fb_o),
    .valid_o   (dec_valid_o),
    .fb_early_o(dec_early_o)
  );

  // feedback early -> delay too short -> larger code
  pi_filter #(.W(CODE_W), .KZ(KZ), .CODE_MIN(CODE_MIN), .CODE_MAX(LEN - 1), .INIT(INIT)) u_lpf (
    .clk, .rst_n, .en,
    .valid_i(dec_valid_o),
    .up_i   (dec_early_o),
    .code_o (code_o),
    .acc_o  (acc_unused)
  );

endmodule
