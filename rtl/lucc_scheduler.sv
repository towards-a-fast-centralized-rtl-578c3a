// lucc_scheduler: one-clock-cycle connection scheduler of the look-up-table
// centralized controller.
//
// Every cycle it looks at the link requests of all transmitters (TX) at once.
// A request is eligible when LinkReq is high, Tail is low, the TX holds no
// connection yet and the routing table has a path for it. Eligible requests
// are visited in round-robin order starting at the priority pointer; each is
// granted if its target receiver is free and every MZI on its path is either
// unused or already set to the state the path needs (so two light paths may
// share an MZI when they agree on its state). A grant claims the receiver
// and the MZIs at once, so later requests in the same cycle see them as
// taken. Requests that lose simply wait: the transmitter keeps LinkReq high.
//
// The priority pointer moves to one past the first granted TX, but only in a
// cycle in which an eligible request lost to another request of the same
// cycle (a contention). Without contention the pointer stays, so after reset
// TX1 wins the first contention.
//
// Timing: requests are decided combinationally and registered on the next
// rising clock edge. Ack[i] and the new MZI states appear together one clock
// after LinkReq[i] is seen; Ack[i] stays high for the whole connection. When
// a connected TX raises Tail, the connection is released at the next edge and
// TailAck[i] is high for exactly that one following cycle; the freed receiver
// and MZIs can be granted again from that cycle on. MZIs that no connection
// uses keep their last state.
//
// The decision steps (LinkReq received, target available, conflict check,
// round-robin queue, load MZI configuration, send grant, wait for the end of
// communication) follow the controller's published flow; the exact pointer
// rule, the level-type Ack and the one-cycle TailAck are this design's
// choices. The lint note SYNCASYNCNET on rst_n stands: the assertions at
// the end use the asynchronous reset as their disable condition.
module lucc_scheduler
  import lucc_pkg::*;
#(
  localparam int unsigned RX_W = $clog2(N_RX),
  localparam int unsigned TX_W = $clog2(N_TX)
) (
  input  logic                  clk,
  input  logic                  rst_n,       // asynchronous, active low
  input  logic [N_TX-1:0]       link_req,    // LinkReq, one bit per TX
  input  logic [N_TX-1:0][RX_W-1:0] req_dst, // requested receiver of each TX
  input  logic [N_TX-1:0]       tail,        // Tail: end of communication
  input  route_t [N_TX-1:0]     req_route,   // table entry for (TX i, req_dst[i])
  output logic [N_TX-1:0]       ack,         // Ack: connection granted and held
  output logic [N_TX-1:0]       tail_ack,    // TailAck: connection released
  output logic [N_MZI-1:0]      mzi_state,   // 0 = bar, 1 = cross bar
  output logic [N_MZI-1:0]      mzi_busy,    // MZIs carrying a connection
  output logic [N_RX-1:0]       rx_busy,     // receivers carrying a connection
  output logic [TX_W-1:0]       rr_ptr,      // TX with highest priority
  output logic                  contention   // a request lost to a same-cycle grant
);
  timeunit 1ns;
  timeprecision 1ps;

  // Connection state, one entry per TX.
  logic [N_TX-1:0]           conn_q;
  logic [N_TX-1:0][RX_W-1:0] conn_dst_q;
  route_t [N_TX-1:0]         conn_route_q;
  logic [N_MZI-1:0]          mzi_state_q;
  logic [TX_W-1:0]           ptr_q;

  // Combinational decision.
  logic [N_TX-1:0]  eligible, grant, lost_to_peer, release_c;
  logic [N_MZI-1:0] used_now, next_state;
  logic [N_RX-1:0]  rx_now;
  logic             any_lost_to_peer;
  logic [TX_W-1:0]  first_grant;
  logic             first_found;

  always_comb begin
    logic [N_MZI-1:0] used_tmp;
    logic [N_RX-1:0]  rx_tmp;
    logic             clash_now, clash_tmp;
    int unsigned      idx;

    clash_now = 1'b0;
    clash_tmp = 1'b0;
    idx       = 0;
    // Resources held by existing connections.
    used_now = '0;
    rx_now   = '0;
    for (int j = 0; j < N_TX; j++) begin
      if (conn_q[j]) begin
        used_now |= conn_route_q[j].use_m;
        rx_now[conn_dst_q[j]] = 1'b1;
      end
    end

    for (int i = 0; i < N_TX; i++) begin
      eligible[i]  = link_req[i] && !tail[i] && !conn_q[i] && req_route[i].valid;
      release_c[i] = tail[i] && conn_q[i];
    end

    // Greedy allocation in round-robin order.
    used_tmp     = used_now;
    rx_tmp       = rx_now;
    next_state   = mzi_state_q;
    grant        = '0;
    lost_to_peer = '0;
    first_grant  = ptr_q;
    first_found  = 1'b0;
    for (int k = 0; k < N_TX; k++) begin
      idx = (int'(ptr_q) + k) % N_TX;
      if (eligible[idx]) begin
        clash_now = rx_now[req_dst[idx]] ||
                    |(used_now & req_route[idx].use_m &
                      (mzi_state_q ^ req_route[idx].state));
        clash_tmp = rx_tmp[req_dst[idx]] ||
                    |(used_tmp & req_route[idx].use_m &
                      (next_state ^ req_route[idx].state));
        if (!clash_tmp) begin
          grant[idx]            = 1'b1;
          used_tmp             |= req_route[idx].use_m;
          rx_tmp[req_dst[idx]]  = 1'b1;
          next_state            = (next_state & ~req_route[idx].use_m) |
                                  req_route[idx].state;
          if (!first_found) begin
            first_found = 1'b1;
            first_grant = TX_W'(idx);
          end
        end else if (!clash_now) begin
          // Would fit against existing connections: lost to a peer.
          lost_to_peer[idx] = 1'b1;
        end
      end
    end
    any_lost_to_peer = |lost_to_peer;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conn_q       <= '0;
      conn_dst_q   <= '0;
      conn_route_q <= '0;
      mzi_state_q  <= '0;
      ptr_q        <= '0;
      tail_ack     <= '0;
    end else begin
      for (int i = 0; i < N_TX; i++) begin
        if (grant[i]) begin
          conn_q[i]       <= 1'b1;
          conn_dst_q[i]   <= req_dst[i];
          conn_route_q[i] <= req_route[i];
        end else if (release_c[i]) begin
          conn_q[i]       <= 1'b0;
        end
      end
      tail_ack    <= release_c;
      mzi_state_q <= next_state;
      if (any_lost_to_peer && first_found)
        ptr_q <= TX_W'((int'(first_grant) + 1) % N_TX);
    end
  end

  assign ack       = conn_q;
  assign mzi_state = mzi_state_q;
  assign mzi_busy  = used_now;
  assign rx_busy   = rx_now;
  assign rr_ptr    = ptr_q;
  assign contention = any_lost_to_peer;

  // Every held connection must find its MZIs in the states its path needs,
  // no receiver may be shared, and Ack may only rise on a request.
  for (genvar j = 0; j < N_TX; j++) begin : g_chk
    a_state_ok: assert property (@(posedge clk) disable iff (!rst_n)
      conn_q[j] |-> (((mzi_state_q ^ conn_route_q[j].state) & conn_route_q[j].use_m) == '0))
      else $error("connection of TX%0d sees a wrong MZI state", j + 1);
    a_ack_on_req: assert property (@(posedge clk) disable iff (!rst_n)
      !conn_q[j] ##1 conn_q[j] |-> $past(link_req[j]))
      else $error("Ack of TX%0d rose without LinkReq", j + 1);
    for (genvar m = j + 1; m < N_TX; m++) begin : g_pair
      a_rx_excl: assert property (@(posedge clk) disable iff (!rst_n)
        (conn_q[j] && conn_q[m]) |-> (conn_dst_q[j] != conn_dst_q[m]))
        else $error("TX%0d and TX%0d share a receiver", j + 1, m + 1);
    end
  end

endmodule
