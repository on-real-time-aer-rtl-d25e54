// Testbench for y_decoder: every row index with load high and low.
module tb_y_decoder;
  localparam int N = 16;
  logic [3:0] row_idx;
  logic load;
  logic [N-1:0] row_load;
  int checks = 0, failures = 0;

  y_decoder #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 2; l++)
      for (int i = 0; i < N; i++) begin
        row_idx = 4'(i);
        load    = l[0];
        #1;
        checks++;
        if (row_load !== (l[0] ? (N'(1) << i) : '0)) begin
          failures++;
          $display("FAIL idx=%0d load=%0d got %b", i, l, row_load);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
