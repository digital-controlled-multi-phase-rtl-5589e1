// mode_ctrl: light-load operating-mode control of the converter.
//
// Two comparators of the averaged inductor current against preset
// thresholds select how much of the converter runs:
//   MODE_MULTI : all four phases and the delay line run;
//   MODE_SHED  : current below the shedding threshold -> the three slaves
//                and the duty-cycle-calibrated delay line are shut down;
//   MODE_BURST : current below the lower threshold -> additionally 75 % of
//                the master's FETs and drivers are off and burst mode
//                (zero-cross turn-off of the low side) is enabled.
// Moving to a lighter mode needs the condition to hold for N_DEB consecutive
// clk cycles and goes one step at a time; moving to a heavier mode happens
// at once, so a load step is met with all phases.
//
// Interface: inputs synchronous to clk, outputs registered.
// The three modes and their contents follow the design description; the
// debounce, the step order and the immediate return are this
// implementation's choices.
module mode_ctrl
  import buck_pkg::*;
#(
  parameter int unsigned N_DEB = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  below_shed_i,   // average current below phase-shedding threshold
  input  logic  below_burst_i,  // average current below segmentation/burst threshold
  output mode_e mode_o,
  output logic  slaves_en_o,
  output logic  light_o,
  output logic  burst_o
);

  localparam int unsigned CW = $clog2(N_DEB + 1);

  mode_e         target;
  logic [CW-1:0] deb;

  always_comb begin
    if (below_burst_i && below_shed_i) target = MODE_BURST;
    else if (below_shed_i)             target = MODE_SHED;
    else                               target = MODE_MULTI;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_o <= MODE_MULTI;
      deb    <= '0;
    end else if (!en) begin
      mode_o <= MODE_MULTI;
      deb    <= '0;
    end else if (target < mode_o) begin
      mode_o <= target;                 // heavier load: at once
      deb    <= '0;
    end else if (target > mode_o) begin
      if (deb == CW'(N_DEB - 1)) begin
        mode_o <= (mode_o == MODE_MULTI) ? MODE_SHED : MODE_BURST;
        deb    <= '0;
      end else begin
        deb <= deb + CW'(1);
      end
    end else begin
      deb <= '0;
    end
  end

  always_comb begin
    slaves_en_o = (mode_o == MODE_MULTI);
    light_o     = (mode_o == MODE_BURST);
    burst_o     = (mode_o == MODE_BURST);
  end

endmodule
