// lpf_buffer_model: behavioural model (not synthesizable) of the analog
// low-pass filter and operational-amplifier buffer between a PWM output of
// the voltage control module and the bias electrode of one MZI.
//
// The filter is a first-order RC low pass of time constant TAU_NS, driven
// by the pulse train swinging between 0 V and VHIGH; the buffer is an ideal
// unity-gain follower. Its settled output is therefore duty * VHIGH, the
// linear duty-to-voltage law the bias method relies on (0 % -> 0 V,
// 100 % -> 2.5 V by default).
//
// The model is event driven and exact: at every edge of the pulse train it
// advances the capacitor voltage over the time since the previous edge with
// the closed-form exponential response to the level held during that time.
// vout therefore changes only at pulse edges; a constant input leaves it at
// its last value.
//
// The 2.5 V full scale is the prototype's; the first-order filter, its time
// constant and the ideal buffer are this model's choices.
module lpf_buffer_model #(
  parameter real VHIGH  = 2.5,     // pulse high level, volts
  parameter real TAU_NS = 20000.0  // RC time constant, ns
) (
  input  logic pwm_in,  // pulse train from the voltage control module
  output real  vout     // buffered bias voltage, volts
);
  timeunit 1ns;
  timeprecision 1ps;

  real v_q;      // capacitor voltage at the last edge
  real t_last;   // time of the last edge, ns
  real level_q;  // input level since the last edge, volts

  initial begin
    v_q     = 0.0;
    t_last  = 0.0;
    level_q = 0.0;
  end

  always @(pwm_in) begin
    v_q     = level_q + (v_q - level_q) * $exp(-($realtime - t_last) / TAU_NS);
    t_last  = $realtime;
    level_q = pwm_in ? VHIGH : 0.0;
  end

  assign vout = v_q;

endmodule
