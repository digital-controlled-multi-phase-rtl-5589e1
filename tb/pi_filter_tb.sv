// pi_filter_tb: compares the PI loop filter with an independent model
// (integer arithmetic with clamping) over random decision streams, checks
// saturation at both ends and the 2*KZ+1 swing of alternating decisions.
module pi_filter_tb;
  localparam int W = 10, KZ = 4;
  logic clk = 0, rst_n = 1, en = 1, valid = 0, up = 0;
  logic [W-1:0] code, acc;
  int checks = 0, failures = 0;
  int m_acc, m_code;

  pi_filter #(.W(W), .KZ(KZ)) dut (.clk, .rst_n, .en, .valid_i(valid), .up_i(up), .code_o(code), .acc_o(acc));

  always #5 clk = ~clk;

  function automatic int clamp(input int v);
    return v < 0 ? 0 : (v > (1 << W) - 1 ? (1 << W) - 1 : v);
  endfunction

  task automatic step(input bit v, input bit u);
    @(negedge clk); valid = v; up = u;
    @(posedge clk);
    if (v && en) begin
      m_acc  = clamp(m_acc + (u ? 1 : -1));
      m_code = clamp(m_acc + (u ? KZ : -KZ));
    end
    #1;
    checks++;
    if (code != W'(m_code) || acc != W'(m_acc)) begin
      failures++;
      if (failures < 10) $display("FAIL code=%0d acc=%0d model %0d/%0d", code, acc, m_code, m_acc);
    end
  endtask

  initial begin
    m_acc = 1 << (W - 1); m_code = m_acc;
    #1 rst_n = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) step($urandom_range(0, 3) != 0, $urandom_range(0, 1) == 1);
    for (int i = 0; i < 1200; i++) step(1, 1);      // run into the top
    checks++; if (code != '1) begin failures++; $display("FAIL no upper saturation"); end
    for (int i = 0; i < 1200; i++) step(1, 0);      // and the bottom
    checks++; if (code != '0) begin failures++; $display("FAIL no lower saturation"); end
    for (int i = 0; i < 300; i++) step(1, 1);
    begin
      int c0, c1;
      step(1, 0); c0 = code; step(1, 1); c1 = code;
      checks++;
      if (c1 - c0 != 2 * KZ + 1) begin failures++; $display("FAIL swing %0d", c1 - c0); end
    end
    en = 0;
    for (int i = 0; i < 50; i++) step(1, 1);         // frozen
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
