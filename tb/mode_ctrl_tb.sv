// mode_ctrl_tb: drives the two load-current flags and checks the mode
// sequence: one step down after N_DEB steady cycles, no step for shorter
// dips, immediate return to a heavier mode, and the enables of each mode.
module mode_ctrl_tb;
  import buck_pkg::*;
  localparam int N_DEB = 16;
  logic clk = 0, rst_n = 1, en = 1, bs = 0, bb = 0;
  mode_e mode;
  logic slaves_en, light, burst;
  int checks = 0, failures = 0;

  mode_ctrl #(.N_DEB(N_DEB)) dut (.clk, .rst_n, .en, .below_shed_i(bs), .below_burst_i(bb),
                                  .mode_o(mode), .slaves_en_o(slaves_en), .light_o(light), .burst_o(burst));

  always #5 clk = ~clk;

  task automatic expect_mode(input mode_e m, input string msg);
    checks++;
    if (mode != m || slaves_en != (m == MODE_MULTI) || light != (m == MODE_BURST) || burst != (m == MODE_BURST)) begin
      failures++; $display("FAIL %s: mode %s", msg, mode.name());
    end
  endtask

  task automatic hold(input bit s, input bit b, input int n);
    @(negedge clk); bs = s; bb = b;
    repeat (n - 1) @(negedge clk);
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    expect_mode(MODE_MULTI, "after reset");
    hold(1, 0, N_DEB - 2); hold(0, 0, 3);       // short dip: no change
    expect_mode(MODE_MULTI, "short dip");
    hold(1, 0, N_DEB + 1);
    expect_mode(MODE_SHED, "shedding");
    hold(1, 1, N_DEB - 2);
    expect_mode(MODE_SHED, "before burst debounce");
    hold(1, 1, 4);
    expect_mode(MODE_BURST, "burst");
    hold(1, 0, 2);
    expect_mode(MODE_SHED, "immediate return to shed");
    hold(1, 1, N_DEB + 1);
    expect_mode(MODE_BURST, "burst again");
    hold(0, 0, 2);
    expect_mode(MODE_MULTI, "load step");
    hold(1, 1, N_DEB + 1);
    expect_mode(MODE_SHED, "one step at a time");
    hold(1, 1, N_DEB + 1);
    expect_mode(MODE_BURST, "second step");
    en = 0; hold(1, 1, 2);
    expect_mode(MODE_MULTI, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
