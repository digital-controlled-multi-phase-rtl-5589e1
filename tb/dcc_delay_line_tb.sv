// dcc_delay_line_tb: feeds a random switching pattern into the delay line
// and checks every slave output and every early/late tap against a history
// of the input kept in the testbench, for several delay codes, and that the
// line clears when disabled.
module dcc_delay_line_tb;
  localparam int NS = 3, FINE = 32;
  logic clk = 0, rst_n = 1, en = 1, p1 = 0;
  logic [7:0] code = 8'd50;
  logic [NS-1:0] p;
  logic [NS-1:0][FINE-1:0] a, b;
  int checks = 0, failures = 0;
  bit hist[$];   // hist[d] = p1 as driven d cycles ago (d = 0: current)

  dcc_delay_line dut (.clk, .rst_n, .en, .p1_i(p1), .code_i(code), .p_o(p), .a_o(a), .b_o(b));

  always #5 clk = ~clk;

  function automatic bit h(input int d);
    return (d < hist.size()) ? hist[d] : 1'b0;
  endfunction

  task automatic run(input int cycles);
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      p1 = ($urandom_range(0, 9) < 3) ? ~p1 : p1;
      @(posedge clk);
      hist.push_front(p1);   // after this edge the line holds p1 delayed by 1
      #1;
      if (hist.size() > 3 * 255 + 40) for (int k = 0; k < NS; k++) begin
        int base = (k + 1) * int'(code);
        checks++;
        if (p[k] != h(base - 1 + 0)) begin failures++; if (failures < 10) $display("FAIL p[%0d]", k); end
        for (int j = 0; j < FINE; j++) begin
          if (b[k][j] != h(base - 1 - (j + 1)) || a[k][j] != h(base - 1 + (j + 1))) begin
            failures++;
            if (failures < 10) $display("FAIL tap k=%0d j=%0d code=%0d", k, j, code);
          end
        end
      end
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(900);
    code = 8'd33; run(300);
    code = 8'd255; run(300);
    code = 8'd120; run(300);
    // disabled: everything cleared
    en = 0; @(posedge clk); #1;
    checks++;
    if (p != '0 || a != '0 || b != '0) begin failures++; $display("FAIL not cleared"); end
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
