// AER-in I/O block: four-phase receiver for incoming address events.
//
// The block samples the Rqst line on every clock edge. When Rqst is high
// and the queue has room it stores the event address (sign, x, y) in the
// event queue and raises Ack; once Rqst has been seen low again it drops Ack,
// which ends the handshake. With a sender that answers at once an event is
// taken every two clock cycles (50 Meps at a 100 MHz clock, the prototype's
// peak input rate) until the queue is full; then Ack is withheld, which holds
// the sender off until the controller frees a position.
//
// Following the prototype, Rqst is sampled directly by the clock that
// drives the state machine; the address must be stable while Rqst is high
// (bundled data). The reset state (Ack low, queue empty) is this design's
// choice. Downstream, evt/evt_valid present the oldest queued event and
// evt_pop removes it.
module aer_in_io
  import conv_pkg::*;
#(
  parameter int unsigned DEPTH = Q_DEPTH
) (
  input  logic      clk,
  input  logic      rst_n,
  // incoming AER bus
  input  in_event_t in_addr,
  input  logic      in_rqst,
  output logic      in_ack,
  // to the controller
  output in_event_t evt,
  output logic      evt_valid,
  input  logic      evt_pop,
  output logic      q_full
);

  typedef enum logic {IDLE, ACKED} hs_state_e;
  hs_state_e state;

  logic       q_empty;
  logic       push;
  logic [$clog2(DEPTH+1)-1:0] q_count;

  assign push = (state == IDLE) && in_rqst && !q_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      in_ack <= 1'b0;
    end else begin
      unique case (state)
        IDLE:  if (push)     begin state <= ACKED; in_ack <= 1'b1; end
        ACKED: if (!in_rqst) begin state <= IDLE;  in_ack <= 1'b0; end
      endcase
    end
  end

  event_queue #(.DW($bits(in_event_t)), .DEPTH(DEPTH)) u_queue (
    .clk      (clk),
    .rst_n    (rst_n),
    .push     (push),
    .push_data(in_addr),
    .pop      (evt_pop),
    .pop_data (evt),
    .full     (q_full),
    .empty    (q_empty),
    .count    (q_count)
  );

  assign evt_valid = !q_empty;

endmodule
