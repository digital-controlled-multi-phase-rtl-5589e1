// pi_filter: digital proportional-integral loop filter for a bang-bang loop.
//
// Each decision e = +1 (up_i = 1) or -1 (up_i = 0) is added to an integrating
// accumulator, and the output code is the accumulator plus the feed-forward
// (proportional) term KZ*e:
//     acc[n]  = sat(acc[n-1] + e[n])
//     code[n] = sat(acc[n] + KZ*e[n])
// Both saturate to [CODE_MIN, CODE_MAX]. With KZ = 0 it is a plain
// integrator. When the decisions alternate in lock the code swings by
// 2*KZ + 1 between cycles.
//
// Interface: update on valid_i; en = 0 freezes the filter. code_o is
// registered and changes the cycle after valid_i. The accumulator-plus-Kz
// structure, 10-bit output and KZ = 4 follow the design description; the
// saturation, the initial value and the exact step are this
// implementation's choices.
module pi_filter #(
  parameter int unsigned W        = 10,
  parameter int unsigned KZ       = 4,
  parameter int unsigned CODE_MIN = 0,
  parameter int unsigned CODE_MAX = (1 << W) - 1,
  parameter int unsigned INIT     = (1 << (W - 1))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         valid_i,
  input  logic         up_i,
  output logic [W-1:0] code_o,
  output logic [W-1:0] acc_o
);

  localparam int SW = W + 3;  // signed working width, room for +/-(KZ+1)

  logic [W-1:0] acc;
  logic signed [SW-1:0] acc_next, code_next;

  function automatic logic signed [SW-1:0] sat(input logic signed [SW-1:0] v);
    if (v < $signed(SW'(CODE_MIN)))      return $signed(SW'(CODE_MIN));
    else if (v > $signed(SW'(CODE_MAX))) return $signed(SW'(CODE_MAX));
    else                                 return v;
  endfunction

  always_comb begin
    acc_next  = sat($signed({3'b000, acc}) + (up_i ? SW'(1) : -SW'(1)));
    code_next = sat(acc_next + (up_i ? $signed(SW'(KZ)) : -$signed(SW'(KZ))));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= W'(INIT);
      code_o <= W'(INIT);
    end else if (en && valid_i) begin
      acc    <= acc_next[W-1:0];
      code_o <= code_next[W-1:0];
    end
  end

  assign acc_o = acc;

  initial begin
    assert (KZ < (1 << W)) else $error("pi_filter: KZ too large for W");
    assert (CODE_MIN <= INIT && INIT <= CODE_MAX) else $error("pi_filter: INIT out of range");
  end

endmodule
