// Testbench for x_neighbourhood: random RAM rows shifted by every offset in
// both directions, including offsets of N and more; pixel column p must
// hold RAM column p - dx, or zero.
module tb_x_neighbourhood;
  import conv_pkg::*;
  localparam int N = 16;
  weight_t [N-1:0] ram_cols, pix_cols;
  logic [4:0] shift_mag;
  logic shift_right;
  int checks = 0, failures = 0;

  x_neighbourhood #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++)
      for (int dx = -N; dx <= N; dx++) begin
        for (int c = 0; c < N; c++) ram_cols[c] = weight_t'($urandom);
        shift_mag   = 5'(dx < 0 ? -dx : dx);
        shift_right = (dx >= 0);
        #1;
        for (int p = 0; p < N; p++) begin
          weight_t exp;
          exp = (p - dx >= 0 && p - dx < N) ? ram_cols[p - dx] : '0;
          checks++;
          if (pix_cols[p] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL dx=%0d p=%0d got %h exp %h", dx, p, pix_cols[p], exp);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
