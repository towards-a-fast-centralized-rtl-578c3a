// lucc_scheduler_tb: self-checking test of the one-cycle scheduler, fed by
// the real routing table.
//
// Directed part: Ack and the MZI states one clock after LinkReq; the
// contention of TX1 and TX2 for RX2 (TX1 wins after reset, TX2 waits in the
// round-robin queue and is granted right after TX1's TailAck); a request for
// a busy receiver; two paths sharing MZI5 in the same state granted
// together; two paths needing MZI1 in opposite states; the round-robin
// pointer giving the next contention to the loser.
// Random part: four transmitters request random receivers, hold their
// connections for random times and end them with Tail. Every cycle the test
// checks, with a fabric model written independently of the table, that each
// held connection's light reaches its receiver, that Ack only rises on a
// request and TailAck only on Tail, and that no waiting request could have
// been added to the granted set (the schedule is maximal).
module lucc_scheduler_tb;
  import lucc_pkg::*;
  import switch_fabric_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 1;
  logic [N_TX-1:0] link_req = '0, tail = '0;
  logic [N_TX-1:0][1:0] req_dst = '0;
  route_t [N_TX-1:0] req_route;
  logic [N_TX-1:0] ack, tail_ack;
  logic [N_MZI-1:0] mzi_state, mzi_busy;
  logic [N_RX-1:0] rx_busy;
  logic [1:0] rr_ptr;
  logic contention;
  int checks = 0, failures = 0;
  int n_grant = 0, n_contention = 0, n_busy_wait = 0, n_release = 0, n_shared = 0;

  route_lut u_lut (.clk, .rst_n, .wr_en(1'b0), .wr_tx(2'd0), .wr_rx(2'd0),
                   .wr_data('0), .rd_dst(req_dst), .rd_route(req_route));
  lucc_scheduler dut (.clk, .rst_n, .link_req, .req_dst, .tail, .req_route,
                      .ack, .tail_ack, .mzi_state, .mzi_busy, .rx_busy,
                      .rr_ptr, .contention);

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

  // shortest path length for every pair, from the fabric model
  int shortest [4][4];
  initial begin
    logic [4:0] vis;
    int r;
    for (int t = 0; t < 4; t++) for (int d = 0; d < 4; d++) shortest[t][d] = 99;
    for (int t = 0; t < 4; t++)
      for (int s = 0; s < 32; s++) begin
        r = trace(t, 5'(s), vis);
        if ($countones(vis) < shortest[t][r]) shortest[t][r] = $countones(vis);
      end
  end

  // Can the connections in `on` (tx -> dst) all be carried at once over
  // shortest paths?
  function automatic logic compatible(input logic [3:0] on, input logic [3:0][1:0] dst);
    logic [4:0] vis;
    logic ok;
    for (int s = 0; s < 32; s++) begin
      ok = 1'b1;
      for (int t = 0; t < 4; t++)
        if (on[t]) begin
          if (trace(t, 5'(s), vis) != int'(dst[t]) || $countones(vis) != shortest[t][dst[t]])
            ok = 1'b0;
        end
      if (ok) return 1'b1;
    end
    return 1'b0;
  endfunction

  // ---------------- per-cycle monitor ----------------
  logic [3:0]       prev_req, prev_tail, prev_ack;
  logic [3:0][1:0]  prev_dst, held_dst;
  logic             mon_on = 0;

  always @(posedge clk) begin
    prev_req  <= link_req;
    prev_tail <= tail;
    prev_ack  <= ack;
    prev_dst  <= req_dst;
  end

  always @(negedge clk) if (mon_on) begin
    logic [4:0] vis;
    logic [3:0] on;
    for (int t = 0; t < 4; t++) begin
      if (ack[t] && !prev_ack[t]) begin
        n_grant++;
        held_dst[t] = prev_dst[t];
        check(prev_req[t] && !prev_tail[t], $sformatf("Ack of TX%0d without request", t+1));
      end
      if (tail_ack[t]) begin
        n_release++;
        check(prev_tail[t] && prev_ack[t] && !ack[t], $sformatf("TailAck of TX%0d without Tail", t+1));
      end else if (prev_ack[t] && !ack[t]) begin
        check(1'b0, $sformatf("TX%0d lost Ack without TailAck", t+1));
      end
      if (ack[t])
        check(trace(t, mzi_state, vis) == int'(held_dst[t]),
              $sformatf("TX%0d light does not reach RX%0d", t+1, held_dst[t]+1));
    end
    if (contention) n_contention++;
    // maximality: a request that waited last cycle must not fit now
    for (int t = 0; t < 4; t++)
      if (prev_req[t] && !prev_tail[t] && !prev_ack[t] && !ack[t]) begin
        logic [3:0][1:0] d;
        d = held_dst;
        d[t] = prev_dst[t];
        on = prev_ack | ack;  // held during the decision, or granted by it
        on[t] = 1'b1;
        check(!compatible(on, d),
              $sformatf("TX%0d to RX%0d was left waiting although it fits", t+1, prev_dst[t]+1));
      end
  end

  // ---------------- directed helpers ----------------
  task automatic req(input int t, input int d);
    link_req[t] = 1'b1; req_dst[t] = 2'(d);
  endtask

  task automatic finish_tx(input int t);
    tail[t] = 1'b1;
    @(negedge clk);
    check(tail_ack[t] && !ack[t], $sformatf("TailAck of TX%0d one clock after Tail", t+1));
    tail[t] = 1'b0; link_req[t] = 1'b0;
  endtask

  // ---------------- random traffic state ----------------
  int phase [4];
  int hold  [4];

  initial begin
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mon_on = 1;
    @(negedge clk);
    // 1. single request: Ack and MZI states one clock after LinkReq
    req(0, 1);
    @(negedge clk);
    check(ack == 4'b0001, "TX1 Ack one clock after LinkReq");
    check(mzi_state[0] == 1'b0 && mzi_state[1] == 1'b1, "TX1->RX2: MZI1 bar, MZI2 cross");
    check(rx_busy == 4'b0010, "RX2 busy");
    // 2. TX3 asks for the busy RX2: it waits, no contention
    req(2, 1);
    repeat (3) begin
      @(negedge clk);
      check(ack[2] == 1'b0, "TX3 waits for busy RX2");
      check(!contention, "busy target is not a contention");
      n_busy_wait++;
    end
    finish_tx(0);
    @(negedge clk);
    check(ack[2], "TX3 granted right after TX1 released RX2");
    finish_tx(2);
    @(negedge clk);
    // 3. contention: TX1 and TX2 both for RX2 in the same cycle
    check(rr_ptr == 2'd0, "pointer still at TX1 with no contention so far");
    req(0, 1); req(1, 1);
    #1 check(contention, "contention flagged");
    @(negedge clk);
    check(ack[0] && !ack[1], "TX1 wins the first contention");
    check(rr_ptr == 2'd1, "pointer moves past TX1");
    repeat (2) begin @(negedge clk); check(!ack[1], "TX2 waits in the queue"); end
    finish_tx(0);
    @(negedge clk);
    check(ack[1], "TX2 granted right after TX1's TailAck");
    check(mzi_state[0] == 1'b1 && mzi_state[1] == 1'b1, "TX2->RX2: MZI1 cross, MZI2 cross");
    finish_tx(1);
    @(negedge clk);
    // 4. next contention goes to TX2 (pointer at TX2)
    req(0, 0); req(1, 0);
    @(negedge clk);
    check(ack[1] && !ack[0], "TX2 wins the second contention");
    check(rr_ptr == 2'd2, "pointer moves past TX2");
    finish_tx(1);
    @(negedge clk);
    check(ack[0], "TX1 follows");
    finish_tx(0);
    link_req = '0;
    @(negedge clk);
    // 5. two paths sharing MZI5 in the cross state: both granted together
    req(1, 2); req(2, 0);
    @(negedge clk);
    check(ack[1] && ack[2], "TX2->RX3 and TX3->RX1 granted together");
    check(mzi_state[4] == 1'b1 && mzi_busy[4], "MZI5 shared in cross");
    if (ack[1] && ack[2]) n_shared++;
    finish_tx(1);
    finish_tx(2);
    @(negedge clk);
    // 6. different receivers but opposite states on MZI1: one waits
    req(0, 0); req(1, 1);
    @(negedge clk);
    check($countones(ack[1:0]) == 1, "TX1->RX1 and TX2->RX2 exclude each other");
    if (ack[0]) finish_tx(0); else finish_tx(1);
    @(negedge clk);
    check($countones(ack[1:0]) == 1, "the other one follows");
    if (ack[0]) finish_tx(0); else finish_tx(1);
    link_req = '0;
    @(negedge clk);

    // random traffic
    for (int t = 0; t < 4; t++) phase[t] = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      for (int t = 0; t < 4; t++) begin
        case (phase[t])
          0: if ($urandom_range(3) == 0) begin req(t, $urandom_range(3)); phase[t] = 1; end
          1: if (ack[t]) begin hold[t] = $urandom_range(12); phase[t] = 2; end
          2: if (hold[t] == 0) begin tail[t] = 1'b1; phase[t] = 3; end else hold[t]--;
          3: if (tail_ack[t]) begin tail[t] = 1'b0; link_req[t] = 1'b0; phase[t] = 0; end
          default: ;
        endcase
      end
      @(negedge clk);
      for (int t = 0; t < 4; t++) if (link_req[t] && !ack[t] && phase[t] == 1) n_busy_wait++;
      if ($countones(mzi_busy) != 0 && $countones(ack) > 1) n_shared++;
    end
    check(n_grant > 100, "random traffic made grants");
    check(n_contention > 10, "random traffic made contentions");
    $display("grants=%0d releases=%0d contentions=%0d waits=%0d concurrent=%0d",
             n_grant, n_release, n_contention, n_busy_wait, n_shared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
