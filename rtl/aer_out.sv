// AER-out block: burst-mode transmitter for the signed pixel events.
//
// Pixels with a pending event raise their row's request. When the row latch
// is empty a round-robin row arbiter picks one requesting row and
// acknowledges it for one clock cycle; that row's events, two column lines
// per column (positive and negative), are copied into the row latch and the
// pixels drop their requests. The latched events are then sent one after the
// other, lowest column first and the positive event of a column before the
// negative one, on the output bus with the address (sign, x = column, y =
// row, both local array indices) and a four-phase Rqst/Ack handshake:
// Rqst rises with a stable address, the receiver raises Ack, Rqst falls,
// the receiver drops Ack. With a receiver that answers at once, one event
// leaves every two clock cycles. Only when the latch is empty is the next
// row arbitrated.
//
// The organisation (row arbiter, row latch, sequential column readout, an
// extra sign bit and two column lines per column) follows the document. The
// prototype's transmitter is asynchronous and self-timed; this one is a
// synchronous equivalent, and its arbitration orders are this design's
// choice.
module aer_out
  import conv_pkg::*;
#(
  parameter int unsigned N = N_PIX
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // pixel array side
  input  logic [N-1:0]         row_req,
  output logic [N-1:0]         row_ack,
  input  logic [N-1:0]         col_pos,
  input  logic [N-1:0]         col_neg,
  // output AER bus
  output logic                 out_sign,
  output logic [$clog2(N)-1:0] out_x,
  output logic [$clog2(N)-1:0] out_y,
  output logic                 out_rqst,
  input  logic                 out_ack
);

  localparam int unsigned NB = $clog2(N);

  logic [N-1:0]  lat_pos, lat_neg;
  logic [NB-1:0] lat_row;
  logic          lat_busy;
  logic [NB-1:0] row_idx;
  logic [N-1:0]  row_grant;

  // Next event in the latch: lowest column, positive first.
  logic          nxt_valid, nxt_neg;
  logic [NB-1:0] nxt_col;

  typedef enum logic [1:0] {TX_IDLE, TX_REQ, TX_WAIT_LOW} tx_state_e;
  tx_state_e tx;

  assign lat_busy = |(lat_pos | lat_neg);

  rr_arbiter #(.N(N)) u_row_arb (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (row_req),
    .accept   (!lat_busy),
    .grant    (row_grant),
    .grant_idx(row_idx)
  );

  assign row_ack = lat_busy ? '0 : row_grant;

  always_comb begin
    nxt_valid = 1'b0;
    nxt_neg   = 1'b0;
    nxt_col   = '0;
    for (int c = N - 1; c >= 0; c--) begin
      if (lat_pos[c] || lat_neg[c]) begin
        nxt_valid = 1'b1;
        nxt_col   = NB'(c);
        nxt_neg   = !lat_pos[c];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat_pos  <= '0;
      lat_neg  <= '0;
      lat_row  <= '0;
      tx       <= TX_IDLE;
      out_rqst <= 1'b0;
      out_sign <= 1'b0;
      out_x    <= '0;
      out_y    <= '0;
    end else begin
      if (!lat_busy && |row_req) begin
        lat_pos <= col_pos;
        lat_neg <= col_neg;
        lat_row <= row_idx;
      end
      unique case (tx)
        TX_IDLE, TX_WAIT_LOW: begin
          if (!(tx == TX_WAIT_LOW && out_ack) && nxt_valid) begin
            out_rqst <= 1'b1;
            out_sign <= nxt_neg;
            out_x    <= nxt_col;
            out_y    <= lat_row;
            tx       <= TX_REQ;
          end else if (!out_ack) begin
            tx <= TX_IDLE;
          end
        end
        TX_REQ: begin
          if (out_ack) begin
            out_rqst <= 1'b0;
            tx       <= TX_WAIT_LOW;
            if (out_sign) lat_neg[out_x] <= 1'b0;
            else          lat_pos[out_x] <= 1'b0;
          end
        end
        default: tx <= TX_IDLE;
      endcase
    end
  end

  // Four-phase rule: the address stays put while Rqst is high.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_rqst && !out_ack |=> $stable({out_sign, out_x, out_y}))
    else $error("aer_out: address changed during request");

endmodule
