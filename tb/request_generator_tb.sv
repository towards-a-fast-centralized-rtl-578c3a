// request_generator_tb: drives one transmitter-side request generator
// against a scripted controller. Checks LinkReq one clock after start with
// the latched destination, waiting for a late Ack, payload_en for exactly
// `length` clocks starting the clock after Ack, Tail after the payload,
// LinkReq and Tail held until TailAck, return to idle, a start pulse
// ignored while busy, and length 0 sent as 1.
module request_generator_tb;
  import lucc_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 1;
  logic start = 0, ack = 0, tail_ack = 0;
  logic [1:0] dst = 0;
  logic [15:0] length = 0;
  logic link_req, tail, payload_en, busy;
  logic [1:0] req_dst;
  int checks = 0, failures = 0;

  request_generator dut (.clk, .rst_n, .start, .dst, .length, .link_req, .req_dst,
                         .tail, .ack, .tail_ack, .payload_en, .busy);

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

  task automatic transaction(input int d, input int len, input int ack_delay,
                             input int tailack_delay);
    int n;
    @(negedge clk);
    check(!busy && !link_req && !tail, "idle before start");
    start = 1; dst = 2'(d); length = 16'(len);
    @(negedge clk);
    start = 0; dst = 2'(d + 1);   // later changes of dst must not matter
    check(link_req && req_dst == 2'(d) && !tail && !payload_en,
          $sformatf("LinkReq for RX%0d one clock after start", d + 1));
    // a second start while busy is ignored
    start = 1;
    repeat (ack_delay) begin
      @(negedge clk);
      start = 0;
      check(link_req && !payload_en, "waiting for Ack");
    end
    start = 0;
    ack = 1;
    @(negedge clk);
    n = 0;
    while (payload_en) begin
      check(link_req && !tail, "LinkReq held during payload");
      n++;
      @(negedge clk);
    end
    check(n == ((len == 0) ? 1 : len), $sformatf("payload %0d clocks, want %0d", n, len));
    check(tail && link_req, "Tail right after the payload");
    repeat (tailack_delay) begin
      @(negedge clk);
      check(tail && link_req, "Tail held until TailAck");
    end
    tail_ack = 1;
    @(negedge clk);
    tail_ack = 0; ack = 0;
    check(!link_req && !tail && !busy, "idle the clock after TailAck");
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    transaction(1, 5, 0, 0);
    transaction(2, 17, 3, 2);
    transaction(0, 0, 1, 4);
    transaction(3, 1, 6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
