// lucc_fpga_tb: checks that the controller's decisions reach the pulse
// trains. A TX1 -> RX2 connection (MZI1 bar, MZI2 cross) must give MZI1 a
// 48/125 duty (38.4 %) and MZI2 56/125 (44.8 %); TX2 -> RX2 (MZI1 cross)
// must give MZI1 56/125; after a calibration write the new code is used.
module lucc_fpga_tb;
  import lucc_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 1;
  logic [N_TX-1:0] link_req = '0, tail = '0;
  logic [N_TX-1:0][1:0] req_dst = '0;
  logic [N_TX-1:0] ack, tail_ack;
  logic [N_MZI-1:0] mzi_state, pwm, mzi_busy;
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

  lucc_fpga dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // high clocks of every pwm output over the second whole period from now
  task automatic duties(output int hi [N_MZI]);
    for (int k = 0; k < 2; k++) begin
      for (int m = 0; m < N_MZI; m++) hi[m] = 0;
      while (!pwm_period_start) @(negedge clk);
      do begin
        for (int m = 0; m < N_MZI; m++) if (pwm[m]) hi[m]++;
        @(negedge clk);
      end while (!pwm_period_start);
    end
  endtask

  task automatic connect(input int t, input int d);
    link_req[t] = 1; req_dst[t] = 2'(d);
    @(negedge clk);
    check(ack[t], $sformatf("TX%0d granted one clock after LinkReq", t+1));
  endtask

  task automatic release_tx(input int t);
    tail[t] = 1;
    @(negedge clk);
    check(tail_ack[t], "TailAck");
    tail[t] = 0; link_req[t] = 0;
  endtask

  initial begin
    int hi [N_MZI];
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    connect(0, 1);
    duties(hi);
    check(hi[0] == 48, $sformatf("MZI1 bar duty %0d/125, want 48", hi[0]));
    check(hi[1] == 56, $sformatf("MZI2 cross duty %0d/125, want 56", hi[1]));
    release_tx(0);
    connect(1, 1);
    duties(hi);
    check(hi[0] == 56, $sformatf("MZI1 cross duty %0d/125, want 56", hi[0]));
    check(hi[1] == 56, $sformatf("MZI2 cross duty %0d/125, want 56", hi[1]));
    cal_wr_en = 1; cal_mzi = 0; cal_sel = 1; cal_code = 4'd13;
    @(negedge clk);
    cal_wr_en = 0;
    duties(hi);
    check(hi[0] == 52, $sformatf("MZI1 recalibrated cross duty %0d/125, want 52", hi[0]));
    release_tx(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
