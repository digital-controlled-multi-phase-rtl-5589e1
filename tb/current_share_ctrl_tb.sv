// current_share_ctrl_tb: compares the current-sharing accumulators with an
// independent model over random comparator streams, checks the mapping to
// the add/subtract selection and the clamping, and closes the loop with a
// model of a slave whose current rises with the code: the code must settle
// at the balance point and then toggle by one LSB.
module current_share_ctrl_tb;
  import buck_pkg::*;
  localparam int NS = 3, FRAC = 2;
  logic clk = 0, rst_n = 1, en = 1, strobe = 0;
  logic [NS-1:0] gt = '0;
  dcc_sel_t [NS-1:0] sel;
  logic signed [5:0] code [NS];
  int checks = 0, failures = 0;
  int m_acc [NS];

  current_share_ctrl #(.FRAC(FRAC)) dut (.clk, .rst_n, .en, .strobe_i(strobe), .gt_master_i(gt),
                                         .sel_o(sel), .code_o(code));

  always #5 clk = ~clk;

  task automatic compare();
    for (int k = 0; k < NS; k++) begin
      int c; c = m_acc[k] >>> FRAC;   // floor division
      checks++;
      if (code[k] != 6'(c) || sel[k].inc != (c >= 0) ||
          sel[k].idx != 5'(c >= 0 ? c : -c - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d code=%0d model=%0d", k, code[k], c);
      end
    end
  endtask

  task automatic strobe_once(input logic [NS-1:0] g);
    @(negedge clk); gt = g; strobe = 1;
    @(negedge clk); strobe = 0;
    for (int k = 0; k < NS; k++)
      if (g[k]) m_acc[k] = (m_acc[k] > -128) ? m_acc[k] - 1 : m_acc[k];
      else      m_acc[k] = (m_acc[k] < 127) ? m_acc[k] + 1 : m_acc[k];
    compare();
  endtask

  initial begin
    for (int k = 0; k < NS; k++) m_acc[k] = -(1 << FRAC);
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); compare();
    for (int i = 0; i < 2000; i++) strobe_once(3'($urandom));
    for (int i = 0; i < 300; i++) strobe_once(3'b000);   // clamp high
    for (int i = 0; i < 300; i++) strobe_once(3'b111);   // clamp low
    // closed loop: slave current = 10 + 2*code, master = 37 -> balance at code 13.5
    for (int i = 0; i < 400; i++) begin
      logic [NS-1:0] g;
      for (int k = 0; k < NS; k++) g[k] = (10 + 2 * int'(code[k]) + 4 * k) > 37;
      strobe_once(g);
    end
    begin
      int lo [NS], hi [NS];
      for (int k = 0; k < NS; k++) begin lo[k] = 99; hi[k] = -99; end
      for (int i = 0; i < 100; i++) begin
        logic [NS-1:0] g;
        for (int k = 0; k < NS; k++) g[k] = (10 + 2 * int'(code[k]) + 4 * k) > 37;
        strobe_once(g);
        for (int k = 0; k < NS; k++) begin
          if (code[k] < lo[k]) lo[k] = code[k];
          if (code[k] > hi[k]) hi[k] = code[k];
        end
      end
      for (int k = 0; k < NS; k++) begin
        checks++;
        if (hi[k] - lo[k] != 1 || 10 + 2 * lo[k] + 4 * k > 37 || 10 + 2 * hi[k] + 4 * k <= 37) begin
          failures++; $display("FAIL settle k=%0d code %0d..%0d", k, lo[k], hi[k]);
        end
      end
    end
    // disable: back to the reset code
    en = 0; @(negedge clk); @(negedge clk);
    checks++;
    if (code[0] != -6'sd1 || sel[0].inc || sel[0].idx != 0) begin failures++; $display("FAIL disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
