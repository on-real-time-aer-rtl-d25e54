// Row decoder of the pixel array.
//
// Turns the array row index chosen by the controller into a one-hot load
// strobe: while load is high, row row_idx of the pixel array takes the
// column words on its inputs into its weight registers. Combinational. The
// document names the block and its function; the one-hot decoder is the
// simplest circuit that does it.
module y_decoder #(
  parameter int unsigned N = conv_pkg::N_PIX
) (
  input  logic [$clog2(N)-1:0] row_idx,
  input  logic                 load,
  output logic [N-1:0]         row_load
);

  always_comb begin
    row_load = '0;
    if (load) row_load[row_idx] = 1'b1;
  end

endmodule
