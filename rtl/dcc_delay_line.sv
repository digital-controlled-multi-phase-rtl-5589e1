// dcc_delay_line: duty-cycle-calibrated delay line (DCC-DL) of the slave phases.
//
// The master switching signal p1 runs through three sub delay lines in
// series. Each sub delay line is a duty-cycle addition section (DCA), a raw
// section and a duty-cycle subtraction section (DCS); together they delay by
// one quarter of the switching period, so their outputs p2, p3 and p4 are
// 90, 180 and 270 degrees behind p1. Around every slave output the line
// offers 32 early taps B[j] (the DCS taps just before it, B[j] leads by j+1
// tap delays) and 32 late taps A[j] (the DCA taps just after it, A[j] lags by
// j+1 tap delays), which duty_cycle_cal combines with the slave signal.
//
// Implementation: the current-starved inverter chain is replaced by a
// shift register clocked by the fast controller clock, so one tap delay t_d
// is one clk period and the raw length per sub line is `code_i` cycles, the
// value locked by the DLL. Output p_o[k] is p1 delayed by (k+1)*code_i
// cycles. code_i must be at least FINE+1 so every early tap exists. en = 0
// clears the line (the delay line is shut down in phase-shedding mode).
// All outputs are registered taps, so they are glitch-free.
// The sub-line structure, 32 taps per DCA/DCS and the 90-degree spacing
// follow the design description; the clocked implementation is this
// implementation's choice.
module dcc_delay_line #(
  parameter int unsigned CODE_W = 8,
  parameter int unsigned FINE   = buck_pkg::FINE_TAPS,
  parameter int unsigned NS     = buck_pkg::N_SLAVES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   p1_i,
  input  logic [CODE_W-1:0]      code_i,          // quarter-period delay in clk cycles
  output logic [NS-1:0]          p_o,             // p2..p4 before calibration
  output logic [NS-1:0][FINE-1:0] a_o,            // late taps around each slave
  output logic [NS-1:0][FINE-1:0] b_o             // early taps around each slave
);

  localparam int unsigned MAXC = (1 << CODE_W) - 1;
  localparam int unsigned LEN  = NS * MAXC + FINE + 1;
  localparam int unsigned IW   = $clog2(LEN + 1) + 1;
  localparam int unsigned XW   = $clog2(LEN);

  logic [LEN-1:0] sr;  // sr[d-1] = p1 delayed by d cycles

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sr <= '0;
    else if (!en) sr <= '0;
    else          sr <= {sr[LEN-2:0], p1_i};
  end

  always_comb begin
    for (int k = 0; k < NS; k++) begin
      logic [IW-1:0] base;
      base   = IW'(k + 1) * IW'(code_i);          // delay of slave k+2
      p_o[k] = sr[XW'(base - IW'(1))];
      for (int j = 0; j < FINE; j++) begin
        b_o[k][j] = sr[XW'(base - IW'(2 + j))];   // leads by j+1
        a_o[k][j] = sr[XW'(base + IW'(j))];       // lags by j+1
      end
    end
  end

endmodule
