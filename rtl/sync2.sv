// sync2: two-flop synchronizer for W independent asynchronous inputs
// (comparator outputs and the external reference clock). Output lags the
// input by two clk edges; reset value zero.
module sync2 #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d_i,
  output logic [W-1:0] q_o
);

  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q_o  <= '0;
    end else begin
      meta <= d_i;
      q_o  <= meta;
    end
  end

endmodule
