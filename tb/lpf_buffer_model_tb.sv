// lpf_buffer_model_tb: drives the filter model with pulse trains of 125
// clocks of 10 ns and several duty cycles and checks that the settled,
// period-averaged output equals duty * 2.5 V within 10 mV: 38.4 % -> 0.96 V
// and 44.8 % -> 1.12 V (the two bias points of the first MZI), 9.6 % and
// 90.4 % near the ends of the range, 48 % for the largest four-bit code; and that a step from 0.96 V to 1.12 V settles only after
// several time constants (the output is filtered, not switched).
module lpf_buffer_model_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic pwm = 0;
  real vout;
  int checks = 0, failures = 0;
  int hi_clocks = 0;

  lpf_buffer_model dut (.pwm_in(pwm), .vout);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse train generator: period 1250 ns, high for hi_clocks * 10 ns
  initial forever begin
    for (int c = 0; c < 125; c++) begin
      pwm = (c < hi_clocks);
      #10;
    end
  end

  // average of vout over one PWM period
  task automatic avg(output real v);
    v = 0.0;
    for (int c = 0; c < 125; c++) begin #10; v += vout; end
    v /= 125.0;
  endtask

  task automatic settle_and_check(input int hi, input real want);
    real v;
    hi_clocks = hi;
    #(200us);
    avg(v);
    check(v > want - 0.01 && v < want + 0.01,
          $sformatf("duty %0d/125: %f V, want %f V", hi, v, want));
  endtask

  initial begin
    real v;
    settle_and_check(48, 0.96);
    // step to 44.8 %: shortly after, the output is still near 0.96 V
    hi_clocks = 56;
    #(2us);
    avg(v);
    check(v < 1.0, $sformatf("output filtered right after the step: %f V", v));
    settle_and_check(56, 1.12);
    settle_and_check(12, 0.24);
    settle_and_check(113, 2.26);
    settle_and_check(60, 1.2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
