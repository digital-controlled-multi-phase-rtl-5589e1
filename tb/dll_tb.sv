// dll_tb: drives the delay-locked loop with reference clocks of several
// periods and checks that the locked delay code equals half the reference
// period (a quarter of the switching period), and that the code then only
// dithers by one step.
module dll_tb;
  logic clk = 0, rst_n = 1, en = 1, ref2x = 0;
  logic [7:0] code;
  logic fb, dv, de;
  int checks = 0, failures = 0;
  int half = 60, rcnt = 0;

  dll dut (.clk, .rst_n, .en, .ref2x_i(ref2x), .code_o(code), .clk_fb_o(fb),
           .dec_valid_o(dv), .dec_early_o(de));

  always #5 clk = ~clk;
  always @(negedge clk) begin
    rcnt++;
    if (rcnt >= half) begin rcnt = 0; ref2x = ~ref2x; end
  end

  task automatic lock_check(input int h);
    int lo, hi;
    half = h;
    repeat (2 * h * 400) @(posedge clk);
    lo = 1000; hi = 0;
    repeat (2 * h * 50) begin
      @(posedge clk);
      if (int'(code) < lo) lo = code;
      if (int'(code) > hi) hi = code;
    end
    checks++;
    if (lo < h - 1 || hi > h + 1 || hi - lo > 2) begin
      failures++; $display("FAIL half period %0d: code range %0d..%0d", h, lo, hi);
    end else $display("half period %0d: code %0d..%0d", h, lo, hi);
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    lock_check(60);
    lock_check(100);
    lock_check(45);
    lock_check(200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
