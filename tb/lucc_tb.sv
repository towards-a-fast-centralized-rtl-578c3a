// lucc_tb: checks the controller (routing table + scheduler) as one unit.
// With the reset table: a request is granted one clock later with MZI
// states that carry the light to the requested receiver (fabric model).
// Then the table is reprogrammed: TX1->RX2 is moved onto the longer path
// through MZI5 (MZI1 cross, MZI5 bar, MZI2 bar), which the controller must
// now use; TX2->RX3 must then wait because it needs MZI1 in bar; an entry
// marked invalid is never granted.
module lucc_tb;
  import lucc_pkg::*;
  import switch_fabric_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 1;
  logic [N_TX-1:0] link_req = '0, tail = '0;
  logic [N_TX-1:0][1:0] req_dst = '0;
  logic [N_TX-1:0] ack, tail_ack;
  logic [N_MZI-1:0] mzi_state, mzi_busy;
  logic [N_RX-1:0] rx_busy;
  logic [1:0] rr_ptr;
  logic contention;
  logic lut_wr_en = 0;
  logic [1:0] lut_wr_tx = 0, lut_wr_rx = 0;
  route_t lut_wr_data = '0;
  int checks = 0, failures = 0;

  lucc dut (.clk, .rst_n, .link_req, .req_dst, .tail, .ack, .tail_ack, .mzi_state,
            .lut_wr_en, .lut_wr_tx, .lut_wr_rx, .lut_wr_data, .mzi_busy, .rx_busy,
            .rr_ptr, .contention);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic connect_and_release(input int t, input int d);
    logic [4:0] vis;
    link_req[t] = 1; req_dst[t] = 2'(d);
    @(negedge clk);
    check(ack[t], $sformatf("TX%0d->RX%0d granted in one clock", t+1, d+1));
    check(trace(t, mzi_state, vis) == d, $sformatf("TX%0d light reaches RX%0d", t+1, d+1));
    check(vis == mzi_busy, "busy MZIs are the ones on the path");
    tail[t] = 1;
    @(negedge clk);
    check(tail_ack[t] && !ack[t], "TailAck one clock after Tail");
    tail[t] = 0; link_req[t] = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [4:0] vis;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++)
      for (int d = 0; d < 4; d++) connect_and_release(t, d);
    // reprogram TX1->RX2 onto the path through MZI5
    lut_wr_en = 1; lut_wr_tx = 0; lut_wr_rx = 1;
    lut_wr_data = '{valid: 1'b1, use_m: 5'b10011, state: 5'b00001};
    @(negedge clk);
    // mark TX4->RX4 as having no path
    lut_wr_tx = 3; lut_wr_rx = 3; lut_wr_data = '{valid: 1'b0, use_m: '0, state: '0};
    @(negedge clk);
    lut_wr_en = 0;
    link_req[0] = 1; req_dst[0] = 2'd1;
    @(negedge clk);
    check(ack[0], "TX1->RX2 granted on the new path");
    check(mzi_state[0] == 1'b1 && mzi_state[4] == 1'b0 && mzi_state[1] == 1'b0,
          "new path: MZI1 cross, MZI5 bar, MZI2 bar");
    check(trace(0, mzi_state, vis) == 1 && vis == 5'b10011, "light takes the path through MZI5");
    // TX2->RX3 needs MZI1 bar: must wait; TX4->RX4 invalid: never granted
    link_req[1] = 1; req_dst[1] = 2'd2;
    link_req[3] = 1; req_dst[3] = 2'd3;
    repeat (3) begin
      @(negedge clk);
      check(!ack[1], "TX2->RX3 waits for MZI1");
      check(!ack[3], "invalid entry not granted");
    end
    tail[0] = 1;
    @(negedge clk);
    tail[0] = 0; link_req[0] = 0;
    @(negedge clk);
    check(ack[1], "TX2->RX3 granted after release");
    check(trace(1, mzi_state, vis) == 2, "TX2 light reaches RX3");
    repeat (3) begin @(negedge clk); check(!ack[3], "invalid entry still not granted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
