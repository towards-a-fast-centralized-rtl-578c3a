// voltage_control: the voltage control module, one pulse-width-modulated
// (PWM) output per MZI.
//
// The bias an MZI needs for bar and for cross bar differs from MZI to MZI
// because of fabrication spread. Instead of trimming each device, every MZI
// gets two calibration codes of CODE_W bits: one used while the controller
// wants it in state 0 (bar) and one for state 1 (cross bar). The PWM train is
// filtered off chip into a DC bias proportional to its duty cycle, so the
// code sets the bias voltage: duty = code * STEP / PERIOD.
//
// With the defaults, PERIOD = 125 clocks and STEP = 4 clocks give a duty
// step of 3.2 %, i.e. 80 mV of a 2.5 V full scale (0 % -> 0 V, 100 % ->
// 2.5 V). Four-bit codes thus reach 0 .. 1.2 V in 80 mV steps. The reset
// codes are those of the first MZI of the prototype: 12 (38.4 %, 0.96 V) for
// bar and 14 (44.8 %, 1.12 V) for cross bar; each MZI is meant to be
// recalibrated through the write port.
//
// Timing: a free-running counter divides the clock into PWM periods. Each
// output's duty is reloaded from its state bit and calibration code at the
// end of every period, so a state change appears at the next period start
// (within PERIOD+1 clocks) and no period is ever cut short. Within a period
// the output is high for the first code*STEP clocks. Outputs are registered.
//
// The 80 mV step, 2.5 V range, four-bit resolution and the two MZI1
// duty cycles are the prototype's; the counter structure, the period of 125
// clocks that makes those numbers exact, the calibration port and the update
// at period boundaries are this design's choices.
module voltage_control
#(
  parameter int unsigned PERIOD     = 125, // clocks per PWM period
  parameter int unsigned STEP       = 4,   // clocks per code step
  parameter int unsigned CODE_W     = 4,   // calibration code width
  parameter int unsigned BAR_CODE   = 12,  // reset code for state 0 (bar)
  parameter int unsigned CROSS_CODE = 14,  // reset code for state 1 (cross)
  localparam int unsigned CNT_W = $clog2(PERIOD),
  localparam int unsigned N_MZI = lucc_pkg::N_MZI,
  localparam int unsigned MZI_W = $clog2(N_MZI)
) (
  input  logic              clk,
  input  logic              rst_n,      // asynchronous, active low
  input  logic [N_MZI-1:0]  mzi_state,  // 0 = bar, 1 = cross bar
  // calibration port
  input  logic              cal_wr_en,
  input  logic [MZI_W-1:0]  cal_mzi,    // 0 = MZI1
  input  logic              cal_sel,    // which state's code to write
  input  logic [CODE_W-1:0] cal_code,
  output logic [N_MZI-1:0]  pwm,        // pulse trains to the filters
  output logic              period_start // one clock at each period start
);
  timeunit 1ns;
  timeprecision 1ps;

  if ((2**CODE_W - 1) * STEP > PERIOD) begin : g_bad_range
    $error("largest code does not fit in one PWM period");
  end

  logic [CODE_W-1:0] code_q [N_MZI][2];
  logic [CNT_W-1:0]  cnt_q;
  logic [CNT_W-1:0]  duty_q [N_MZI];
  logic              wrap;

  assign wrap = (cnt_q == CNT_W'(PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      for (int m = 0; m < N_MZI; m++) begin
        code_q[m][0] <= CODE_W'(BAR_CODE);
        code_q[m][1] <= CODE_W'(CROSS_CODE);
        duty_q[m]    <= CNT_W'(BAR_CODE * STEP);
      end
      pwm          <= '0;
      period_start <= 1'b0;
    end else begin
      cnt_q <= wrap ? '0 : cnt_q + 1'b1;
      if (cal_wr_en && int'(cal_mzi) < N_MZI)
        code_q[cal_mzi][cal_sel] <= cal_code;
      for (int m = 0; m < N_MZI; m++) begin
        if (wrap)
          duty_q[m] <= CNT_W'(int'(code_q[m][mzi_state[m]]) * STEP);
        pwm[m] <= (cnt_q < duty_q[m]);
      end
      period_start <= (cnt_q == '0);
    end
  end

endmodule
