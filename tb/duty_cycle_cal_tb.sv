// duty_cycle_cal_tb: checks the duty-cycle adder/subtractor against its
// truth table (OR with the selected late tap, AND with the selected early
// tap) for random tap vectors and every selection, and checks on a real
// pulse that the rising edge stays and the falling edge moves by idx+1.
module duty_cycle_cal_tb;
  import buck_pkg::*;
  logic p;
  logic [31:0] a, b;
  dcc_sel_t sel;
  logic po;
  int checks = 0, failures = 0;

  duty_cycle_cal dut (.p_i(p), .a_i(a), .b_i(b), .sel_i(sel), .p_o(po));

  // pulse of width 40 starting at t=20; taps are the same pulse shifted
  function automatic bit pulse(input int t);
    return t >= 20 && t < 60;
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      bit exp;
      p = 1'($urandom); a = $urandom; b = $urandom;
      sel.inc = 1'($urandom); sel.idx = 5'($urandom);
      #1;
      exp = sel.inc ? (p | a[sel.idx]) : (p & b[sel.idx]);
      checks++;
      if (po != exp) begin failures++; if (failures < 10) $display("FAIL truth table"); end
    end
    // pulse test
    for (int inc = 0; inc < 2; inc++) for (int idx = 0; idx < 32; idx += 7) begin
      int rise, fall; bit prev;
      sel.inc = inc[0]; sel.idx = 5'(idx);
      rise = -1; fall = -1; prev = 0;
      for (int t = 0; t < 120; t++) begin
        p = pulse(t);
        for (int j = 0; j < 32; j++) begin a[j] = pulse(t - (j + 1)); b[j] = pulse(t + (j + 1)); end
        #1;
        if (po && !prev && rise < 0) rise = t;
        if (!po && prev && fall < 0) fall = t;
        prev = po;
      end
      checks++;
      if (rise != 20 || fall != (inc ? 60 + idx + 1 : 60 - idx - 1)) begin
        failures++; $display("FAIL pulse inc=%0d idx=%0d rise=%0d fall=%0d", inc, idx, rise, fall);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
