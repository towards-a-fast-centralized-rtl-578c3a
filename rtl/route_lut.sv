// route_lut: programmable routing look-up table of the centralized
// controller.
//
// One entry per (transmitter, receiver) pair, N_TX*N_RX entries, each a
// route_t: a valid bit, the set of MZIs the light path crosses and the state
// (bar/cross) each of them must take. Reset loads the shortest-path table of
// the 5-MZI fabric from lucc_pkg::default_route; the write port lets a host
// load the table of another topology, which is how the controller is
// retargeted. Every transmitter has its own combinational read port, so all
// requests are looked up in the same cycle as they are scheduled.
//
// Timing: reads are combinational. A write takes effect at the rising edge
// and is seen by reads from the next cycle on. Programming the table while
// connections are held is allowed; held connections keep the entry they were
// granted with.
//
// Holding the switch configurations in a table follows the controller's
// published architecture; the entry layout, the placement of TX3/TX4/RX1/RX4
// in the reset contents and the write port are this design's choices.
module route_lut
  import lucc_pkg::*;
#(
  localparam int unsigned RX_W = $clog2(N_RX),
  localparam int unsigned TX_W = $clog2(N_TX)
) (
  input  logic                      clk,
  input  logic                      rst_n,     // asynchronous, active low
  // programming port
  input  logic                      wr_en,
  input  logic [TX_W-1:0]           wr_tx,
  input  logic [RX_W-1:0]           wr_rx,
  input  route_t                    wr_data,
  // one read port per transmitter: entry (TX i, rd_dst[i])
  input  logic [N_TX-1:0][RX_W-1:0] rd_dst,
  output route_t [N_TX-1:0]         rd_route
);
  timeunit 1ns;
  timeprecision 1ps;

  route_t table_q [N_TX*N_RX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < N_TX; t++)
        for (int r = 0; r < N_RX; r++)
          table_q[t*N_RX + r] <= default_route(2'(t), 2'(r));
    end else if (wr_en) begin
      table_q[int'(wr_tx)*N_RX + int'(wr_rx)] <= wr_data;
    end
  end

  always_comb begin
    for (int i = 0; i < N_TX; i++)
      rd_route[i] = table_q[i*N_RX + int'(rd_dst[i])];
  end

endmodule
