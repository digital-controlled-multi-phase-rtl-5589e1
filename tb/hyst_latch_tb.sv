// hyst_latch_tb: checks the hysteretic RS latch against a reference model
// for random comparator, blanking and transient inputs, and in a directed
// sequence that a comparator glitch during auto-zero blanking cannot flip
// the latch.
module hyst_latch_tb;
  logic clk = 0, rst_n = 1, en = 1;
  logic s_n = 1, r_n = 1, blank = 0, under = 0, over = 0;
  logic vs, vr, pwm;
  int checks = 0, failures = 0;
  bit m_q = 0;

  hyst_latch dut (.clk, .rst_n, .en, .cmp_s_n_i(s_n), .cmp_r_n_i(r_n), .blank_i(blank),
                  .under_i(under), .over_i(over), .v_s_o(vs), .v_r_o(vr), .pwm_o(pwm));

  always #5 clk = ~clk;

  task automatic cyc(input bit s, input bit r, input bit bl, input bit un, input bit ov, input bit e);
    bit es, er;
    @(negedge clk);
    s_n = s; r_n = r; blank = bl; under = un; over = ov; en = e;
    #1;
    es = s | bl; er = r | bl;
    checks++;
    if (vs != es || vr != er) begin failures++; if (failures < 10) $display("FAIL OR gates"); end
    @(posedge clk);
    if (!e) m_q = 0;
    else if (ov) m_q = 0;
    else if (un) m_q = 1;
    else if (!er) m_q = 0;
    else if (!es) m_q = 1;
    #1;
    checks++;
    if (pwm != m_q) begin failures++; if (failures < 10) $display("FAIL q=%0b model %0b", pwm, m_q); end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++)
      cyc($urandom_range(0, 3) != 0, $urandom_range(0, 3) != 0, $urandom_range(0, 4) == 0,
          $urandom_range(0, 30) == 0, $urandom_range(0, 30) == 0, $urandom_range(0, 50) != 0);
    // directed: latch on, then blanked glitches on both inputs change nothing
    cyc(0, 1, 0, 0, 0, 1); cyc(1, 1, 0, 0, 0, 1);
    for (int i = 0; i < 20; i++) cyc(1'($urandom), 1'($urandom), 1, 0, 0, 1);
    checks++;
    if (!pwm) begin failures++; $display("FAIL blanked glitch reset the latch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
