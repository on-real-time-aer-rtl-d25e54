// X-neighbourhood selection: shifts a kernel RAM row left or right onto the
// pixel array columns.
//
// For each event the controller computes dx = x_o - x_min - r, the column
// offset between the kernel's first RAM column and the array's first
// column. Pixel column p must receive RAM column p - dx (zero where that
// column does not exist). As in the prototype, the shift is a connection
// matrix: two decoders turn the offset magnitude and the right/left bit into
// one active row of the matrix, row k connecting RAM column c to pixel
// column c + k (right shift) or c - k (left shift), and the gated terms of
// each pixel column are OR-ed together. Row 0 is the unshifted connection.
// Offsets of N or more select no row, so every column reads zero.
//
// Combinational; shift_mag and shift_right are held by the controller for
// all the row copies of one event.
module x_neighbourhood
  import conv_pkg::*;
#(
  parameter int unsigned N = N_PIX
) (
  input  weight_t [N-1:0]      ram_cols,
  input  logic [$clog2(N):0]   shift_mag,    // |dx|
  input  logic                 shift_right,  // 1: dx >= 0
  output weight_t [N-1:0]      pix_cols
);

  logic [N-1:0] sel_right, sel_left;  // one-hot decoder outputs

  always_comb begin
    sel_right = '0;
    sel_left  = '0;
    for (int k = 0; k < N; k++) begin
      if (shift_mag == ($clog2(N)+1)'(k)) begin
        sel_right[k] = shift_right;
        sel_left[k]  = !shift_right;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < N; p++) begin
      pix_cols[p] = '0;
      for (int k = 0; k < N; k++) begin
        if (p - k >= 0 && sel_right[k]) pix_cols[p] = pix_cols[p] | ram_cols[p - k];
        if (p + k < N  && sel_left[k])  pix_cols[p] = pix_cols[p] | ram_cols[p + k];
      end
    end
  end

endmodule
