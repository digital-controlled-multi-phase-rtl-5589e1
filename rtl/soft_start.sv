// soft_start: start-up ramp of the regulation reference.
//
// After enable the reference code rises from zero to the target by one LSB
// every STEP_CYC clk cycles, so the output voltage, and the inrush current
// that charges the output capacitor, build up gradually. If the target is
// changed later the code follows it at the same rate. done_o is set once the
// code has first reached the target.
//
// Interface: target_i static or slowly varying; vref_o registered.
// The existence of a soft-start function is taken from the design
// description; the linear ramp, its rate and the code width are this
// implementation's choices.
module soft_start #(
  parameter int unsigned W        = 10,
  parameter int unsigned STEP_CYC = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] target_i,
  output logic [W-1:0] vref_o,
  output logic         done_o
);

  localparam int unsigned CW = $clog2(STEP_CYC + 1);

  logic [CW-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vref_o <= '0;
      div    <= '0;
      done_o <= 1'b0;
    end else if (!en) begin
      vref_o <= '0;
      div    <= '0;
      done_o <= 1'b0;
    end else begin
      if (vref_o == target_i) begin
        done_o <= 1'b1;
        div    <= '0;
      end else if (div == CW'(STEP_CYC - 1)) begin
        div    <= '0;
        vref_o <= (vref_o < target_i) ? vref_o + W'(1) : vref_o - W'(1);
      end else begin
        div <= div + CW'(1);
      end
    end
  end

endmodule
