// request_generator: transmitter-side handshake with the centralized
// controller, one per transmitter (TX).
//
// On a start pulse it latches a destination receiver and a payload length,
// raises LinkReq with that destination and waits, for as long as it takes,
// for Ack. While Ack is high it enables the optical packet generation
// (payload_en) for `length` clocks, then raises Tail and waits for TailAck,
// after which it drops LinkReq and Tail together and is idle again. LinkReq
// stays high for the whole transaction.
//
// States: IDLE -> REQ (LinkReq) -> SEND (payload_en) -> TAIL (LinkReq, Tail)
// -> IDLE. A start pulse outside IDLE is ignored. A length of 0 is sent as 1.
//
// Timing: LinkReq rises the clock after start. payload_en rises the clock
// after Ack is seen and lasts exactly `length` clocks; Tail rises right after
// it. The generator is idle again the clock after TailAck.
//
// The LinkReq / Ack / Tail / TailAck signal set is the controller's; the
// state machine and the payload length counter are this design's choices.
// The lint note SYNCASYNCNET on rst_n stands: the assertion below uses
// the asynchronous reset as its disable condition.
module request_generator
#(
  parameter int unsigned LEN_W = 16,   // width of the payload length
  localparam int unsigned RX_W = $clog2(lucc_pkg::N_RX)
) (
  input  logic            clk,
  input  logic            rst_n,       // asynchronous, active low
  input  logic            start,       // begin a transaction
  input  logic [RX_W-1:0] dst,         // receiver wanted
  input  logic [LEN_W-1:0] length,     // payload length in clocks
  output logic            link_req,
  output logic [RX_W-1:0] req_dst,
  output logic            tail,
  input  logic            ack,
  input  logic            tail_ack,
  output logic            payload_en,  // optical packet generation enabled
  output logic            busy
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_SEND, S_TAIL} state_e;

  state_e           state_q;
  logic [LEN_W-1:0] left_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      left_q  <= '0;
      req_dst <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_REQ;
          req_dst <= dst;
          left_q  <= (length == '0) ? LEN_W'(1) : length;
        end
        S_REQ:  if (ack) state_q <= S_SEND;
        S_SEND: begin
          left_q <= left_q - 1'b1;
          if (left_q == LEN_W'(1)) state_q <= S_TAIL;
        end
        S_TAIL: if (tail_ack) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign link_req   = (state_q != S_IDLE);
  assign tail       = (state_q == S_TAIL);
  assign payload_en = (state_q == S_SEND);
  assign busy       = (state_q != S_IDLE);

  // Payload may only be sent over a granted connection.
  a_payload_acked: assert property (@(posedge clk) disable iff (!rst_n)
    payload_en |-> ack) else $error("payload enabled without Ack");

endmodule
