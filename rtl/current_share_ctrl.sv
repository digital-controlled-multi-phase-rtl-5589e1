// current_share_ctrl: accumulators of the current-sharing loop.
//
// Once per switching period (strobe_i, the master's turn-on) the loop reads,
// for every slave, the comparator that tells whether that slave's average
// current is above the master's. Above: the slave's accumulator counts down
// (less duty cycle); below: it counts up. The accumulator has FRAC extra
// low bits, so the selection only moves after the comparison has pointed
// the same way for several periods. Its upper bits form a signed code c in
// [-FINE, FINE-1]:
//   c >= 0 : add,      OR with late tap  A[c]      (+(c+1) tap delays)
//   c <  0 : subtract, AND with early tap B[-c-1]  (-(-c) tap delays)
// In steady state the code toggles by one LSB.
//
// Interface: en = 0 holds the accumulators at reset (calibration off).
// sel_o is registered and changes the cycle after strobe_i.
// Compare-and-step behaviour and the toggling steady state follow the design
// description; FRAC, the code mapping and the start value (c = -1, the
// shortest subtraction) are this implementation's choices.
module current_share_ctrl
  import buck_pkg::*;
#(
  parameter int unsigned NS   = N_SLAVES,
  parameter int unsigned FRAC = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 strobe_i,     // once per switching period
  input  logic [NS-1:0]        gt_master_i,  // slave current > master current
  output dcc_sel_t [NS-1:0]    sel_o,
  output logic signed [FINE_SEL_W:0] code_o [NS]
);

  localparam int AW = FINE_SEL_W + 1 + FRAC;
  localparam logic signed [AW-1:0] AMAX = (AW'(1) <<< (AW - 1)) - AW'(1);
  localparam logic signed [AW-1:0] AMIN = -(AW'(1) <<< (AW - 1));
  localparam logic signed [AW-1:0] ARST = -(AW'(1) <<< FRAC);   // c = -1

  logic signed [AW-1:0] acc [NS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NS; k++) acc[k] <= ARST;
    end else if (!en) begin
      for (int k = 0; k < NS; k++) acc[k] <= ARST;
    end else if (strobe_i) begin
      for (int k = 0; k < NS; k++) begin
        if (gt_master_i[k]) acc[k] <= (acc[k] == AMIN) ? AMIN : acc[k] - AW'(1);
        else                acc[k] <= (acc[k] == AMAX) ? AMAX : acc[k] + AW'(1);
      end
    end
  end

  always_comb begin
    for (int k = 0; k < NS; k++) begin
      logic signed [FINE_SEL_W:0] c;
      c = acc[k][AW-1:FRAC];
      code_o[k]    = c;
      sel_o[k].inc = ~c[FINE_SEL_W];
      sel_o[k].idx = c[FINE_SEL_W] ? FINE_SEL_W'(~c) : c[FINE_SEL_W-1:0];  // -c-1 == ~c
    end
  end

endmodule
