// voltage_control_tb: checks the PWM voltage control module.
// Measures, for every MZI and every PWM period, the period length (125
// clocks) and the number of high clocks, and compares it with
// code * 4 for the code selected by the MZI's state bit: 12 (38.4 %, 0.96 V
// of 2.5 V) for bar and 14 (44.8 %, 1.12 V) for cross bar after reset, then
// new calibration codes written through the port (0, 15 and others).
// A state change must show in the first full period after it.
module voltage_control_tb;
  import lucc_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int PERIOD = 125, STEP = 4;

  logic clk = 0, rst_n = 1;
  logic [N_MZI-1:0] mzi_state = '0;
  logic cal_wr_en = 0, cal_sel = 0;
  logic [2:0] cal_mzi = 0;
  logic [3:0] cal_code = 0;
  logic [N_MZI-1:0] pwm;
  logic period_start;
  int checks = 0, failures = 0;

  voltage_control dut (.clk, .rst_n, .mzi_state, .cal_wr_en, .cal_mzi, .cal_sel,
                       .cal_code, .pwm, .period_start);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected codes, kept by the testbench
  int code [N_MZI][2];

  // Measure one whole period starting at period_start; return high counts.
  task automatic measure(output int hi [N_MZI], output int len);
    for (int m = 0; m < N_MZI; m++) hi[m] = 0;
    len = 0;
    while (!period_start) @(negedge clk);
    do begin
      for (int m = 0; m < N_MZI; m++) if (pwm[m]) hi[m]++;
      len++;
      @(negedge clk);
    end while (!period_start);
  endtask

  task automatic expect_period(input string tag);
    int hi [N_MZI];
    int len;
    measure(hi, len);
    check(len == PERIOD, $sformatf("%s: period %0d clocks", tag, len));
    for (int m = 0; m < N_MZI; m++)
      check(hi[m] == code[m][mzi_state[m]] * STEP,
            $sformatf("%s: MZI%0d state %0d high %0d clocks, want %0d", tag, m+1,
                      mzi_state[m], hi[m], code[m][mzi_state[m]] * STEP));
  endtask

  initial begin
    int hi [N_MZI];
    int len;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < N_MZI; m++) begin code[m][0] = 12; code[m][1] = 14; end
    // reset codes: 38.4 % bar, 44.8 % cross
    measure(hi, len);           // first period after reset
    check(hi[0] == 48, "bar duty 38.4 % after reset");
    check(int'(real'(hi[0]) / PERIOD * 1000.0) == 384, "48/125 is 38.4 %");
    // switch everything to cross; the change is taken at the next period
    // start, so the very next whole period must already show it
    @(negedge clk);
    mzi_state = '1;
    expect_period("cross after reset");
    check(int'(real'(code[0][1] * STEP) / PERIOD * 2500.0) == 1120,
          "cross bias 1.12 V");
    // calibrate each MZI differently
    for (int m = 0; m < N_MZI; m++)
      for (int s = 0; s < 2; s++) begin
        @(negedge clk);
        cal_wr_en = 1; cal_mzi = 3'(m); cal_sel = s[0];
        code[m][s] = (m * 3 + s * 7 + 1) % 16;
        if (m == 0 && s == 0) code[m][s] = 0;
        if (m == 4 && s == 1) code[m][s] = 15;
        cal_code = 4'(code[m][s]);
      end
    @(negedge clk);
    cal_wr_en = 0;
    // an out-of-range MZI number is ignored
    cal_wr_en = 1; cal_mzi = 3'd7; cal_code = 4'd9;
    @(negedge clk);
    cal_wr_en = 0;
    for (int k = 0; k < 8; k++) begin
      measure(hi, len);
      mzi_state = 5'($urandom);
      @(negedge clk);
      expect_period($sformatf("random states %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
