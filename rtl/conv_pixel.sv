// Convolution pixel: signed, weighted charge-packet integrate-and-fire cell.
//
// The pixel keeps the kernel word copied into it for the current event in a
// weight register (load), and clears it when the controller erases the
// array after the integration pulse (erase). While the global pulse is high,
// every clock cycle adds the weight magnitude to the pixel's integrator, with
// a sign given by the event sign (which pulse line is active) and the weight
// sign: positive pulse with positive weight, or negative pulse with negative
// weight, charges upwards; the two mixed cases charge downwards. So one event
// adds |w| times the pulse width, as a current I_w switched for a fixed time
// does in the prototype.
//
// When the integrator reaches +threshold the pixel raises a positive event
// request, at -threshold a negative one, and the integrator returns to zero
// (the reference level). The request is held until the AER-out block
// acknowledges the pixel's row (row_ack), which is when the event has been
// copied to the output latch. A second crossing of the same sign before that
// adds nothing to the pending request.
//
// The analog integrating capacitor, the two comparators and the calibrated
// current sources are replaced here by a signed ACC_W-bit accumulator and a
// digital threshold, this design's digital equivalent; per-pixel mismatch and
// its calibration have no counterpart in it. The integrator saturates instead
// of wrapping.
module conv_pixel
  import conv_pkg::*;
#(
  parameter int unsigned AWID = ACC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  weight_t           w_in,
  input  logic              erase,
  input  logic              pulse_pos,
  input  logic              pulse_neg,
  input  logic [AWID-2:0]   threshold,
  input  logic              row_ack,
  output logic              ev_pos,
  output logic              ev_neg
);

  weight_t                 w;
  logic signed [AWID-1:0]  acc;
  logic signed [AWID:0]    sum;
  logic signed [AWID:0]    th;
  logic                    active, up;
  logic                    fire_pos, fire_neg;

  localparam logic signed [AWID:0] ACC_MAX = (AWID+1)'(2**(AWID-1) - 1);
  localparam logic signed [AWID:0] ACC_MIN = -ACC_MAX;

  assign active = (pulse_pos || pulse_neg) && (w.mag != '0);
  assign up     = pulse_pos ^ w.sign;
  assign th     = $signed({2'b00, threshold});

  always_comb begin
    sum = (AWID+1)'(acc);
    if (active) sum = up ? sum + $signed({1'b0, (AWID)'(w.mag)})
                         : sum - $signed({1'b0, (AWID)'(w.mag)});
    if (sum > ACC_MAX) sum = ACC_MAX;
    if (sum < ACC_MIN) sum = ACC_MIN;
    fire_pos = active && (sum >= th);
    fire_neg = active && (sum <= -th);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w      <= '0;
      acc    <= '0;
      ev_pos <= 1'b0;
      ev_neg <= 1'b0;
    end else begin
      if (erase)     w <= '0;
      else if (load) w <= w_in;

      if (fire_pos || fire_neg) acc <= '0;
      else                      acc <= sum[AWID-1:0];

      ev_pos <= (ev_pos && !row_ack) || fire_pos;
      ev_neg <= (ev_neg && !row_ack) || fire_neg;
    end
  end

endmodule
