// lucc_top: the electrical side of the prototype switch system: one request
// generator per transmitter, the FPGA logic (lucc_fpga: the look-up-table
// centralized controller, LUCC, and the PWM voltage control module) and one
// filter/buffer model per MZI.
//
// Flow: a start pulse on a transmitter makes its request generator raise
// LinkReq with the wanted receiver. The controller looks the pair up in its
// routing table and, in one clock, grants it (Ack) and sets the MZI states,
// or leaves it waiting in round-robin order. The voltage control module
// turns each MZI state into a pulse train whose duty cycle is that MZI's
// calibrated code for the state; the filter/buffer models turn the trains
// into bias voltages (bias_v). After Ack the transmitter's payload_en is high
// for the requested length; then Tail / TailAck release the path.
//
// The optical parts (transmitter lasers and modulators, the MZI chip, the
// receivers) are outside: mzi_state and bias_v are what drives the chip,
// payload_en is what enables each transmitter's packet generation.
//
// Timing: LinkReq one clock after start; Ack and mzi_state one clock after
// LinkReq; pwm follows a state change within one PWM period (125 clocks);
// bias_v settles with the filter time constant. Everything but the
// filter/buffer models (behavioural, analog) is synthesizable.
module lucc_top
  import lucc_pkg::*;
#(
  parameter int unsigned LEN_W      = 16,      // payload length width
  parameter int unsigned PWM_PERIOD = 125,     // clocks per PWM period
  parameter int unsigned PWM_STEP   = 4,       // clocks per code step
  parameter int unsigned CODE_W     = 4,       // calibration code width
  parameter real         LPF_TAU_NS = 20000.0, // filter time constant
  localparam int unsigned RX_W  = $clog2(N_RX),
  localparam int unsigned TX_W  = $clog2(N_TX),
  localparam int unsigned MZI_W = $clog2(N_MZI)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // transmitter side
  input  logic [N_TX-1:0]            start,
  input  logic [N_TX-1:0][RX_W-1:0]  dst,
  input  logic [N_TX-1:0][LEN_W-1:0] length,
  output logic [N_TX-1:0]            payload_en,
  output logic [N_TX-1:0]            tx_busy,
  // controller handshake, brought out for observation
  output logic [N_TX-1:0]            link_req,
  output logic [N_TX-1:0]            ack,
  output logic [N_TX-1:0]            tail,
  output logic [N_TX-1:0]            tail_ack,
  // switch drive
  output logic [N_MZI-1:0]           mzi_state,
  output logic [N_MZI-1:0]           pwm,
  output real                        bias_v [N_MZI],
  // routing table and bias calibration programming
  input  logic                       lut_wr_en,
  input  logic [TX_W-1:0]            lut_wr_tx,
  input  logic [RX_W-1:0]            lut_wr_rx,
  input  route_t                     lut_wr_data,
  input  logic                       cal_wr_en,
  input  logic [MZI_W-1:0]           cal_mzi,
  input  logic                       cal_sel,
  input  logic [CODE_W-1:0]          cal_code,
  // status
  output logic [N_MZI-1:0]           mzi_busy,
  output logic [N_RX-1:0]            rx_busy,
  output logic [TX_W-1:0]            rr_ptr,
  output logic                       contention,
  output logic                       pwm_period_start
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [N_TX-1:0][RX_W-1:0] req_dst;

  for (genvar i = 0; i < N_TX; i++) begin : g_tx
    request_generator #(.LEN_W(LEN_W)) u_reqgen (
      .clk        (clk),
      .rst_n      (rst_n),
      .start      (start[i]),
      .dst        (dst[i]),
      .length     (length[i]),
      .link_req   (link_req[i]),
      .req_dst    (req_dst[i]),
      .tail       (tail[i]),
      .ack        (ack[i]),
      .tail_ack   (tail_ack[i]),
      .payload_en (payload_en[i]),
      .busy       (tx_busy[i])
    );
  end

  lucc_fpga #(
    .PWM_PERIOD (PWM_PERIOD),
    .PWM_STEP   (PWM_STEP),
    .CODE_W     (CODE_W)
  ) u_fpga (
    .clk              (clk),
    .rst_n            (rst_n),
    .link_req         (link_req),
    .req_dst          (req_dst),
    .tail             (tail),
    .ack              (ack),
    .tail_ack         (tail_ack),
    .mzi_state        (mzi_state),
    .pwm              (pwm),
    .lut_wr_en        (lut_wr_en),
    .lut_wr_tx        (lut_wr_tx),
    .lut_wr_rx        (lut_wr_rx),
    .lut_wr_data      (lut_wr_data),
    .cal_wr_en        (cal_wr_en),
    .cal_mzi          (cal_mzi),
    .cal_sel          (cal_sel),
    .cal_code         (cal_code),
    .mzi_busy         (mzi_busy),
    .rx_busy          (rx_busy),
    .rr_ptr           (rr_ptr),
    .contention       (contention),
    .pwm_period_start (pwm_period_start)
  );

  for (genvar m = 0; m < N_MZI; m++) begin : g_bias
    lpf_buffer_model #(.TAU_NS(LPF_TAU_NS)) u_lpf (
      .pwm_in (pwm[m]),
      .vout   (bias_v[m])
    );
  end

endmodule
