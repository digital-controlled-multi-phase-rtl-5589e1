// bbpfd: bang-bang phase-frequency detector.
//
// Compares the rising edges of a reference and a feedback signal, both
// already synchronous to clk. For each edge pair it emits one binary
// decision: fb_early_o = 1 when the feedback edge came first (feedback too
// early or too fast), 0 when the reference edge came first. A second edge of
// the same signal before the other one arrives is a frequency error and also
// produces a decision in the same direction, so the detector pulls in
// frequency as well as phase. Edges of both signals in the same clk cycle
// (phase error below one clk period) yield the opposite of the previous
// decision, so a locked loop dithers symmetrically.
//
// After reset the detector waits for the first feedback edge before it
// pairs edges. This makes a delay-locked loop that starts at its minimum
// delay pair each feedback edge with the following reference edge.
//
// Timing: decisions come out registered, valid_o for one cycle, one clk after
// the edge that completes a pair. Binary output and frequency detection
// follow the design description; the state machine and the tie rule are this
// implementation's choices.
module bbpfd (
  input  logic clk,
  input  logic rst_n,
  input  logic en,          // 0: hold in the armed state, no decisions
  input  logic ref_i,       // reference (level, synchronous)
  input  logic fb_i,        // feedback (level, synchronous)
  output logic valid_o,     // one-cycle pulse per decision
  output logic fb_early_o   // decision, valid while valid_o is high, held after
);

  typedef enum logic [1:0] {ARM, IDLE, REF_FIRST, FB_FIRST} state_e;

  state_e state;
  logic   ref_d, fb_d;
  logic   ref_rise, fb_rise;

  assign ref_rise = ref_i & ~ref_d;
  assign fb_rise  = fb_i  & ~fb_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ARM;
      ref_d      <= 1'b0;
      fb_d       <= 1'b0;
      valid_o    <= 1'b0;
      fb_early_o <= 1'b0;
    end else begin
      ref_d   <= ref_i;
      fb_d    <= fb_i;
      valid_o <= 1'b0;
      if (!en) begin
        state <= ARM;
      end else begin
        unique case (state)
          ARM: if (fb_rise) state <= FB_FIRST;
          IDLE: begin
            if (ref_rise && fb_rise) begin
              valid_o    <= 1'b1;
              fb_early_o <= ~fb_early_o;
            end else if (ref_rise) begin
              state <= REF_FIRST;
            end else if (fb_rise) begin
              state <= FB_FIRST;
            end
          end
          REF_FIRST: begin
            if (fb_rise || ref_rise) begin
              valid_o    <= 1'b1;
              fb_early_o <= 1'b0;
              // a new reference edge stays pending for the next pair
              state      <= ref_rise ? REF_FIRST : IDLE;
            end
          end
          FB_FIRST: begin
            if (ref_rise || fb_rise) begin
              valid_o    <= 1'b1;
              fb_early_o <= 1'b1;
              state      <= fb_rise ? FB_FIRST : IDLE;
            end
          end
          default: state <= ARM;
        endcase
      end
    end
  end

endmodule
