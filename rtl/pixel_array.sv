// N x N array of convolution pixels with its row and column wiring.
//
// Loading: the y-decoder's one-hot row_load strobe makes one row take the N
// kernel words on the column bus (from the x-neighbourhood block). The global
// erase, the two pulse lines and the firing threshold go to every pixel.
//
// Output side, as in a burst-mode AER transmitter: each pixel's event
// request is OR-ed over its row into row_req for the row arbiter. When the
// arbiter acknowledges a row (one-hot row_ack), that row drives its pending
// events on two column lines per column, col_pos and col_neg, and its pixels
// drop their requests at the next clock edge. Row r, column c is the pixel
// at coordinates (x_min + c, y_min + r).
module pixel_array
  import conv_pkg::*;
#(
  parameter int unsigned N    = N_PIX,
  parameter int unsigned AWID = ACC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      row_load,
  input  weight_t [N-1:0]   col_words,
  input  logic              erase,
  input  logic              pulse_pos,
  input  logic              pulse_neg,
  input  logic [AWID-2:0]   threshold,
  input  logic [N-1:0]      row_ack,
  output logic [N-1:0]      row_req,
  output logic [N-1:0]      col_pos,
  output logic [N-1:0]      col_neg
);

  logic [N-1:0] ev_pos [N];
  logic [N-1:0] ev_neg [N];

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      conv_pixel #(.AWID(AWID)) u_pix (
        .clk      (clk),
        .rst_n    (rst_n),
        .load     (row_load[r]),
        .w_in     (col_words[c]),
        .erase    (erase),
        .pulse_pos(pulse_pos),
        .pulse_neg(pulse_neg),
        .threshold(threshold),
        .row_ack  (row_ack[r]),
        .ev_pos   (ev_pos[r][c]),
        .ev_neg   (ev_neg[r][c])
      );
    end
    assign row_req[r] = |(ev_pos[r] | ev_neg[r]);
  end

  always_comb begin
    col_pos = '0;
    col_neg = '0;
    for (int r = 0; r < N; r++) begin
      if (row_ack[r]) begin
        col_pos = col_pos | ev_pos[r];
        col_neg = col_neg | ev_neg[r];
      end
    end
  end

endmodule
