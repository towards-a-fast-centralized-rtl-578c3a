// lucc_top_tb: end-to-end test of the whole controller system at its
// default sizes (4 transmitters, 4 receivers, 5 MZIs, 125-clock PWM period,
// 4-bit bias codes).
//
// Part 1 replays the prototype's demonstration sequence: TX1 -> RX2, its
// end, TX1 -> RX2 a second time, then TX1 and TX2 both asking for RX2 in the
// same cycle (TX1 wins, TX2 waits in the round-robin queue and gets RX2
// right after TX1's TailAck), then TX1 -> RX2 and TX2 -> RX3 at the same time
// (the two receivers of the demonstration; both paths need MZI1 in bar, so
// both are granted together). Long connections let the filtered bias of
// MZI1 settle: 0.96 V while it is in bar (TX1 -> RX2), 1.12 V in cross
// (TX2 -> RX2).
// Part 2 recalibrates MZI2, reprograms one routing entry and runs random
// traffic on all four transmitters.
// Throughout, a monitor checks Ack one clock after LinkReq when nothing
// blocks the request, that every enabled payload's light reaches the
// receiver its transmitter asked for (fabric model independent of the
// routing table), and counts each mechanism: grant, contention, wait on a
// busy receiver or MZI, MZI shared by two connections, release, MZI state
// change seen on the bias, calibration write, reprogrammed route. A
// mechanism that never happened counts as a failure.
module lucc_top_tb;
  import lucc_pkg::*;
  import switch_fabric_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 1;
  logic [N_TX-1:0] start = '0;
  logic [N_TX-1:0][1:0] dst = '0;
  logic [N_TX-1:0][15:0] length = '0;
  logic [N_TX-1:0] payload_en, tx_busy, link_req, ack, tail, tail_ack;
  logic [N_MZI-1:0] mzi_state, pwm, mzi_busy;
  real bias_v [N_MZI];
  logic lut_wr_en = 0;
  logic [1:0] lut_wr_tx = 0, lut_wr_rx = 0;
  route_t lut_wr_data = '0;
  logic cal_wr_en = 0, cal_sel = 0;
  logic [2:0] cal_mzi = 0;
  logic [3:0] cal_code = 0;
  logic [N_RX-1:0] rx_busy;
  logic [1:0] rr_ptr;
  logic contention, pwm_period_start;
  int checks = 0, failures = 0;

  lucc_top dut (.*);

  always #5 clk = ~clk;   // 100 MHz

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- monitor ----------------
  int n_grant = 0, n_contention = 0, n_wait = 0, n_shared = 0, n_release = 0;
  int n_state_change = 0, n_payload = 0, n_new_route = 0;
  logic [3:0][1:0] want;          // receiver each transmitter asked for
  logic [3:0]      prev_req = '0, prev_ack = '0, blocked = '0;
  logic [4:0]      prev_state = '0;
  logic            mon_on = 0;

  always @(negedge clk) if (mon_on) begin
    logic [4:0] vis, vis_all;
    vis_all = '0;
    for (int t = 0; t < 4; t++) begin
      if (ack[t] && !prev_ack[t]) begin
        n_grant++;
        if (!blocked[t])
          check(prev_req[t], $sformatf("TX%0d Ack one clock after LinkReq", t+1));
        blocked[t] = 1'b0;
      end
      if (link_req[t] && !ack[t] && !tail[t] && prev_req[t]) begin
        blocked[t] = 1'b1;
        n_wait++;
      end
      if (tail_ack[t]) n_release++;
      if (payload_en[t]) begin
        n_payload++;
        check(trace(t, mzi_state, vis) == int'(want[t]),
              $sformatf("TX%0d payload does not reach RX%0d", t+1, want[t]+1));
      end
      if (ack[t]) begin
        void'(trace(t, mzi_state, vis));
        if ((vis & vis_all) != '0) n_shared++;
        vis_all |= vis;
      end
    end
    if (contention) n_contention++;
    if (mzi_state != prev_state) n_state_change++;
    prev_req   = link_req;
    prev_ack   = ack;
    prev_state = mzi_state;
  end

  // ---------------- helpers ----------------
  task automatic launch(input logic [3:0] which, input int d, input int len);
    for (int t = 0; t < 4; t++)
      if (which[t]) begin
        start[t] = 1; dst[t] = 2'(d); length[t] = 16'(len); want[t] = 2'(d);
      end
    @(negedge clk);
    start = '0;
  endtask

  task automatic wait_idle();
    while (tx_busy != '0) @(negedge clk);
    @(negedge clk);
  endtask

  function automatic logic near(input real v, input real want_v);
    return v > want_v - 0.02 && v < want_v + 0.02;
  endfunction

  // bias of MZI m averaged over one PWM period (removes the ripple)
  task automatic avg_bias(input int m, output real v);
    v = 0.0;
    for (int c = 0; c < 125; c++) begin @(negedge clk); v += bias_v[m]; end
    v /= 125.0;
  endtask

  // count high clocks of pwm[m] over one whole PWM period
  task automatic duty_of(input int m, output int hi);
    hi = 0;
    while (!pwm_period_start) @(negedge clk);
    do begin
      if (pwm[m]) hi++;
      @(negedge clk);
    end while (!pwm_period_start);
  endtask

  initial begin
    int hi;
    real v;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mon_on = 1;
    @(negedge clk);

    // ---- Part 1: the demonstration sequence ----
    // TX1 -> RX2, long enough for the bias to settle (15000 clocks)
    launch(4'b0001, 1, 15000);
    @(negedge clk);
    check(link_req[0] && ack[0], "TX1 granted one clock after LinkReq");
    repeat (13700) @(negedge clk);
    check(mzi_state[0] == 1'b0 && mzi_state[1] == 1'b1, "TX1->RX2 sets MZI1 bar, MZI2 cross");
    avg_bias(0, v);
    check(near(v, 0.96), $sformatf("MZI1 bar bias %f V, want 0.96 V", v));
    avg_bias(1, v);
    check(near(v, 1.12), $sformatf("MZI2 cross bias %f V, want 1.12 V", v));
    wait_idle();
    // second time TX1 -> RX2
    launch(4'b0001, 1, 200);
    wait_idle();
    // conflict: TX1 and TX2 both for RX2 in the same cycle
    launch(4'b0011, 1, 300);
    check(contention, "TX1 and TX2 contend for RX2");
    @(negedge clk);
    check(ack[0] && !ack[1], "TX1 wins the contention");
    while (!tail_ack[0]) begin
      check(!ack[1], "TX2 waits while TX1 holds RX2");
      @(negedge clk);
    end
    @(negedge clk);
    check(ack[1], "TX2 granted the clock after TX1's TailAck");
    length[1] = 0;
    wait_idle();
    // TX1 -> RX2 and TX2 -> RX3 together: both need MZI1 in bar, so both
    // are granted in the same clock
    want[1] = 2'd2;
    start[1] = 1; dst[1] = 2'd2; length[1] = 16'd50;
    launch(4'b0001, 1, 50);
    @(negedge clk);
    check(ack[0] && ack[1], "TX1->RX2 and TX2->RX3 held at the same time");
    check(mzi_state[0] == 1'b0 && mzi_busy[0], "MZI1 shared in bar");
    wait_idle();
    // TX2 -> RX2 alone, long: MZI1 now cross
    launch(4'b0010, 1, 15000);
    repeat (14300) @(negedge clk);
    check(mzi_state[0] == 1'b1, "TX2->RX2 sets MZI1 cross");
    avg_bias(0, v);
    check(near(v, 1.12), $sformatf("MZI1 cross bias %f V, want 1.12 V", v));
    wait_idle();

    // ---- Part 2: calibration, table programming, random traffic ----
    // recalibrate MZI2 cross to code 11 (35.2 %, 0.88 V)
    cal_wr_en = 1; cal_mzi = 3'd1; cal_sel = 1'b1; cal_code = 4'd11;
    @(negedge clk);
    cal_wr_en = 0;
    launch(4'b0001, 1, 600);        // TX1 -> RX2 puts MZI2 in cross
    @(negedge clk);
    duty_of(1, hi);                 // period in flight may be old
    duty_of(1, hi);
    check(hi == 44, $sformatf("MZI2 recalibrated duty %0d clocks, want 44", hi));
    wait_idle();
    // route TX1 -> RX2 over MZI1 cross, MZI5 bar, MZI2 bar
    lut_wr_en = 1; lut_wr_tx = 2'd0; lut_wr_rx = 2'd1;
    lut_wr_data = '{valid: 1'b1, use_m: 5'b10011, state: 5'b00001};
    @(negedge clk);
    lut_wr_en = 0;
    launch(4'b0001, 1, 20);
    @(negedge clk);
    check(ack[0] && mzi_busy == 5'b10011, "reprogrammed route in use");
    if (ack[0] && mzi_busy == 5'b10011) n_new_route++;
    wait_idle();
    // random traffic on all four transmitters
    for (int cyc = 0; cyc < 20000; cyc++) begin
      for (int t = 0; t < 4; t++)
        if (!tx_busy[t] && !start[t] && $urandom_range(7) == 0) begin
          start[t] = 1; dst[t] = 2'($urandom_range(3)); want[t] = dst[t];
          length[t] = 16'($urandom_range(1, 40));
        end
      @(negedge clk);
      start = '0;
    end
    wait_idle();

    $display("grants=%0d releases=%0d contentions=%0d waits=%0d shared=%0d",
             n_grant, n_release, n_contention, n_wait, n_shared);
    $display("state_changes=%0d payload_clocks=%0d new_route=%0d",
             n_state_change, n_payload, n_new_route);
    check(n_grant > 0,        "mechanism: grant");
    check(n_release == n_grant, "every grant released");
    check(n_contention > 0,   "mechanism: contention");
    check(n_wait > 0,         "mechanism: wait in round-robin queue");
    check(n_shared > 0,       "mechanism: MZI shared by two connections");
    check(n_state_change > 0, "mechanism: MZI state change");
    check(n_payload > 0,      "mechanism: payload sent");
    check(n_new_route > 0,    "mechanism: reprogrammed route");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
