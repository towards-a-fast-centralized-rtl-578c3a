// route_lut_tb: checks the routing table against the fabric model.
// For every (TX, RX) pair the reset contents must be valid, must lead the
// light from TX to RX when the listed MZIs take the listed states (whatever
// the other MZIs do), must cross exactly the listed MZIs, and must be a
// shortest path (no MZI setting reaches RX through fewer MZIs). Then entries
// are rewritten through the programming port, read back one cycle later on
// all read ports, and a reset restores the defaults.
module route_lut_tb;
  import lucc_pkg::*;
  import switch_fabric_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 1;
  logic wr_en = 0;
  logic [1:0] wr_tx = 0, wr_rx = 0;
  route_t wr_data = '0;
  logic [N_TX-1:0][1:0] rd_dst = '0;
  route_t [N_TX-1:0] rd_route;
  int checks = 0, failures = 0;

  route_lut dut (
    .clk, .rst_n, .wr_en, .wr_tx, .wr_rx, .wr_data, .rd_dst, .rd_route
  );

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  route_t saved [N_TX][N_RX];

  initial begin
    logic [4:0] vis, st;
    int rx_got, best;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < N_RX; r++) begin
      for (int t = 0; t < N_TX; t++) rd_dst[t] = 2'(r);
      #1;
      for (int t = 0; t < N_TX; t++) begin
        route_t e;
        e = rd_route[t];
        saved[t][r] = e;
        check(e.valid, $sformatf("TX%0d->RX%0d not valid", t+1, r+1));
        // shortest possible path length by exhaustive search
        best = 99;
        for (int s = 0; s < 32; s++) begin
          rx_got = trace(t, 5'(s), vis);
          if (rx_got == r && $countones(vis) < best) best = $countones(vis);
        end
        for (int k = 0; k < 4; k++) begin
          st = (5'($urandom) & ~e.use_m) | e.state;
          rx_got = trace(t, st, vis);
          check(rx_got == r, $sformatf("TX%0d->RX%0d reaches RX%0d", t+1, r+1, rx_got+1));
          check(vis == e.use_m, $sformatf("TX%0d->RX%0d crosses %b, table says %b",
                                          t+1, r+1, vis, e.use_m));
        end
        check($countones(e.use_m) == best,
              $sformatf("TX%0d->RX%0d uses %0d MZIs, shortest is %0d",
                        t+1, r+1, $countones(e.use_m), best));
      end
    end
    // reprogram two entries
    @(negedge clk);
    wr_en = 1; wr_tx = 2; wr_rx = 1; wr_data = '{valid: 1'b0, use_m: 5'b10101, state: 5'b00100};
    @(negedge clk);
    wr_tx = 0; wr_rx = 3; wr_data = '{valid: 1'b1, use_m: 5'b11111, state: 5'b01010};
    @(negedge clk);
    wr_en = 0;
    rd_dst = {2'd0, 2'd1, 2'd2, 2'd3}; // TX4:RX1 TX3:RX2 TX2:RX3 TX1:RX4
    #1;
    check(rd_route[2] == route_t'({1'b0, 5'b10101, 5'b00100}), "write TX3->RX2");
    check(rd_route[0] == route_t'({1'b1, 5'b11111, 5'b01010}), "write TX1->RX4");
    check(rd_route[1] == saved[1][2], "TX2->RX3 unchanged");
    check(rd_route[3] == saved[3][0], "TX4->RX1 unchanged");
    // reset restores the default table
    rst_n = 0; #1; rst_n = 1;
    #1;
    check(rd_route[2] == saved[2][1], "reset restores TX3->RX2");
    check(rd_route[0] == saved[0][3], "reset restores TX1->RX4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
