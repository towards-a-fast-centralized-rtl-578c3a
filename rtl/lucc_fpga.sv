// lucc_fpga: the logic that sits in the FPGA of the prototype: the
// look-up-table centralized controller (routing table + one-cycle scheduler)
// and the PWM voltage control module, wired so that the controller's MZI
// states select each MZI's calibrated duty cycle.
//
// Interface: the LinkReq / destination / Tail inputs and Ack / TailAck
// outputs of the transmitters (bit i is TX i+1), the MZI states and the five
// pulse trains for the off-chip filters, and the programming ports of the
// routing table and of the bias calibration codes.
// Timing: Ack and mzi_state one clock after LinkReq; the pulse trains take a
// new state at the next PWM period start (within PWM_PERIOD + 1 clocks).
// Fully synthesizable.
module lucc_fpga
  import lucc_pkg::*;
#(
  parameter int unsigned PWM_PERIOD = 125,  // clocks per PWM period
  parameter int unsigned PWM_STEP   = 4,    // clocks per code step
  parameter int unsigned CODE_W     = 4,    // calibration code width
  localparam int unsigned RX_W  = $clog2(N_RX),
  localparam int unsigned TX_W  = $clog2(N_TX),
  localparam int unsigned MZI_W = $clog2(N_MZI)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_TX-1:0]           link_req,
  input  logic [N_TX-1:0][RX_W-1:0] req_dst,
  input  logic [N_TX-1:0]           tail,
  output logic [N_TX-1:0]           ack,
  output logic [N_TX-1:0]           tail_ack,
  output logic [N_MZI-1:0]          mzi_state,
  output logic [N_MZI-1:0]          pwm,
  input  logic                      lut_wr_en,
  input  logic [TX_W-1:0]           lut_wr_tx,
  input  logic [RX_W-1:0]           lut_wr_rx,
  input  route_t                    lut_wr_data,
  input  logic                      cal_wr_en,
  input  logic [MZI_W-1:0]          cal_mzi,
  input  logic                      cal_sel,
  input  logic [CODE_W-1:0]         cal_code,
  output logic [N_MZI-1:0]          mzi_busy,
  output logic [N_RX-1:0]           rx_busy,
  output logic [TX_W-1:0]           rr_ptr,
  output logic                      contention,
  output logic                      pwm_period_start
);
  timeunit 1ns;
  timeprecision 1ps;

  lucc u_lucc (
    .clk         (clk),
    .rst_n       (rst_n),
    .link_req    (link_req),
    .req_dst     (req_dst),
    .tail        (tail),
    .ack         (ack),
    .tail_ack    (tail_ack),
    .mzi_state   (mzi_state),
    .lut_wr_en   (lut_wr_en),
    .lut_wr_tx   (lut_wr_tx),
    .lut_wr_rx   (lut_wr_rx),
    .lut_wr_data (lut_wr_data),
    .mzi_busy    (mzi_busy),
    .rx_busy     (rx_busy),
    .rr_ptr      (rr_ptr),
    .contention  (contention)
  );

  voltage_control #(
    .PERIOD (PWM_PERIOD),
    .STEP   (PWM_STEP),
    .CODE_W (CODE_W)
  ) u_vctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .mzi_state    (mzi_state),
    .cal_wr_en    (cal_wr_en),
    .cal_mzi      (cal_mzi),
    .cal_sel      (cal_sel),
    .cal_code     (cal_code),
    .pwm          (pwm),
    .period_start (pwm_period_start)
  );

endmodule
