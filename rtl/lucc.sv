// lucc: the look-up-table centralized controller (LUCC) for the 4x4
// multistage MZI switch.
//
// It joins the routing table (route_lut) and the one-cycle scheduler
// (lucc_scheduler). Each transmitter presents LinkReq with the number of the
// receiver it wants; its table entry is read combinationally, the scheduler
// resolves availability, MZI conflicts and contention in the same cycle, and
// at the next rising edge Ack and the MZI states are registered together.
// mzi_state goes to the voltage control module, which turns each state bit
// into a bias voltage.
//
// Interface: per-TX LinkReq / destination / Tail in, per-TX Ack / TailAck
// out (bit i is TX i+1), the table programming port, and status outputs.
// Timing: Ack one clock after LinkReq; TailAck one clock after Tail.
module lucc
  import lucc_pkg::*;
#(
  localparam int unsigned RX_W = $clog2(N_RX),
  localparam int unsigned TX_W = $clog2(N_TX)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_TX-1:0]           link_req,
  input  logic [N_TX-1:0][RX_W-1:0] req_dst,
  input  logic [N_TX-1:0]           tail,
  output logic [N_TX-1:0]           ack,
  output logic [N_TX-1:0]           tail_ack,
  output logic [N_MZI-1:0]          mzi_state,
  // routing table programming
  input  logic                      lut_wr_en,
  input  logic [TX_W-1:0]           lut_wr_tx,
  input  logic [RX_W-1:0]           lut_wr_rx,
  input  route_t                    lut_wr_data,
  // status
  output logic [N_MZI-1:0]          mzi_busy,
  output logic [N_RX-1:0]           rx_busy,
  output logic [TX_W-1:0]           rr_ptr,
  output logic                      contention
);
  timeunit 1ns;
  timeprecision 1ps;

  route_t [N_TX-1:0] req_route;

  route_lut u_lut (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (lut_wr_en),
    .wr_tx    (lut_wr_tx),
    .wr_rx    (lut_wr_rx),
    .wr_data  (lut_wr_data),
    .rd_dst   (req_dst),
    .rd_route (req_route)
  );

  lucc_scheduler u_sched (
    .clk        (clk),
    .rst_n      (rst_n),
    .link_req   (link_req),
    .req_dst    (req_dst),
    .tail       (tail),
    .req_route  (req_route),
    .ack        (ack),
    .tail_ack   (tail_ack),
    .mzi_state  (mzi_state),
    .mzi_busy   (mzi_busy),
    .rx_busy    (rx_busy),
    .rr_ptr     (rr_ptr),
    .contention (contention)
  );

endmodule
