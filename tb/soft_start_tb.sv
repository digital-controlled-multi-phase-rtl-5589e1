// soft_start_tb: checks that the reference code ramps from zero to the
// target by one LSB every STEP_CYC cycles (so it arrives after
// target*STEP_CYC cycles), never overshoots, flags done, and follows a later
// target change at the same rate.
module soft_start_tb;
  localparam int W = 10, STEP = 16;
  logic clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] target = 10'd200, vref;
  logic done;
  int checks = 0, failures = 0;

  soft_start #(.W(W), .STEP_CYC(STEP)) dut (.clk, .rst_n, .en, .target_i(target), .vref_o(vref), .done_o(done));

  always #5 clk = ~clk;

  initial begin
    int n, prev;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); en = 1;
    n = 0; prev = 0;
    while (vref != target && n < 10000) begin
      @(posedge clk); #1; n++;
      checks++;
      if (int'(vref) < prev || int'(vref) > prev + 1 || vref > target) begin failures++; $display("FAIL step"); end
      prev = vref;
    end
    checks++;
    if (n != 200 * STEP) begin failures++; $display("FAIL ramp took %0d cycles", n); end
    repeat (2) @(posedge clk); #1;
    checks++; if (!done) begin failures++; $display("FAIL done"); end
    target = 10'd150; n = 0;
    while (vref != target && n < 10000) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != 50 * STEP || !done) begin failures++; $display("FAIL ramp down %0d", n); end
    en = 0; @(posedge clk); #1;
    checks++; if (vref != 0 || done) begin failures++; $display("FAIL disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
