// duty_cycle_cal: duty-cycle adder/subtractor of one slave phase.
//
// The slave signal p keeps its rising edge (so the 90-degree phase grid set
// by the DLL is untouched) and only its falling edge moves:
//   add      (sel.inc = 1): p' = p | A[idx]  -- A[idx] lags p by idx+1 taps,
//                           the pulse is stretched by idx+1 tap delays;
//   subtract (sel.inc = 0): p' = p & B[idx]  -- B[idx] leads p by idx+1 taps,
//                           the pulse is shortened by idx+1 tap delays.
// MUX64 is the choice among the 64 taps, MUX2 the choice between the OR and
// AND results. Purely combinational; its inputs are registered taps.
// The OR adder, AND subtractor, 32-tap groups and the MUX64/MUX2 structure
// follow the design description.
module duty_cycle_cal
  import buck_pkg::*;
#(
  parameter int unsigned FINE = FINE_TAPS
) (
  input  logic            p_i,    // slave signal from the delay line
  input  logic [FINE-1:0] a_i,    // late taps (duty-cycle addition)
  input  logic [FINE-1:0] b_i,    // early taps (duty-cycle subtraction)
  input  dcc_sel_t        sel_i,
  output logic            p_o     // calibrated slave signal
);

  logic tap;     // MUX64 output
  logic v_inc;   // OR gate
  logic v_dec;   // AND gate

  always_comb begin
    tap   = sel_i.inc ? a_i[sel_i.idx] : b_i[sel_i.idx];
    v_inc = p_i | tap;
    v_dec = p_i & tap;
    p_o   = sel_i.inc ? v_inc : v_dec;   // MUX2
  end

endmodule
