// Testbench for pixel_array: random kernel rows are loaded through the
// row strobes, signed pulses fired and the weights erased, as the controller
// does; a simple row acknowledger reads requesting rows. A reference array
// of integrate-and-fire cells predicts every pixel's requests; the row
// requests and the column lines of the acknowledged row are compared with it
// every cycle.
module tb_pixel_array;
  import conv_pkg::*;
  localparam int N = 16, AWID = 12;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] row_load = '0, row_ack, row_req, col_pos, col_neg;
  weight_t [N-1:0] col_words = '0;
  logic erase = 0, pulse_pos = 0, pulse_neg = 0;
  logic [AWID-2:0] threshold = 11'd60;
  int checks = 0, failures = 0;
  int m_acc [N][N];
  bit m_pos [N][N], m_neg [N][N];
  weight_t m_w [N][N];
  int n_ev = 0;

  pixel_array #(.N(N), .AWID(AWID)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Acknowledge the lowest requesting row, every other cycle.
  always_comb begin
    row_ack = '0;
    for (int r = N - 1; r >= 0; r--) if (row_req[r]) begin row_ack = '0; row_ack[r] = 1; end
  end

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      automatic int sum = m_acc[r][c];
      automatic bit act = (pulse_pos || pulse_neg) && m_w[r][c].mag != 0;
      automatic bit fp, fn;
      if (act) sum += ((pulse_pos != m_w[r][c].sign) ? 1 : -1) * int'(m_w[r][c].mag);
      fp = act && sum >= int'(threshold);
      fn = act && sum <= -int'(threshold);
      if (fp || fn) n_ev++;
      m_acc[r][c] = (fp || fn) ? 0 : sum;
      m_pos[r][c] = (m_pos[r][c] && !row_ack[r]) || fp;
      m_neg[r][c] = (m_neg[r][c] && !row_ack[r]) || fn;
      if (erase) m_w[r][c] = '0; else if (row_load[r]) m_w[r][c] = col_words[c];
    end
  end

  task automatic compare();
    for (int r = 0; r < N; r++) begin
      automatic bit req = 0;
      for (int c = 0; c < N; c++) req |= m_pos[r][c] | m_neg[r][c];
      checks++;
      if (row_req[r] !== req) begin failures++; if (failures < 10) $display("FAIL row_req %0d", r); end
      if (row_ack[r]) for (int c = 0; c < N; c++) begin
        checks++;
        if (col_pos[c] !== m_pos[r][c] || col_neg[c] !== m_neg[r][c]) begin
          failures++; if (failures < 10) $display("FAIL column %0d of row %0d", c, r);
        end
      end
    end
  endtask

  initial begin
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      m_acc[r][c] = 0; m_pos[r][c] = 0; m_neg[r][c] = 0; m_w[r][c] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 400; e++) begin
      automatic int sg = $urandom % 2;
      automatic int first = $urandom % N;
      automatic int q = 1 + $urandom % (N - first);
      for (int j = 0; j < q; j++) begin
        @(negedge clk); compare();
        for (int c = 0; c < N; c++) col_words[c] = weight_t'($urandom);
        row_load = N'(1) << (first + j);
        @(negedge clk); compare();
        row_load = '0;
      end
      for (int k = 0; k < 2; k++) begin
        @(negedge clk); compare();
        pulse_pos = (sg == 0); pulse_neg = (sg == 1);
      end
      @(negedge clk); compare();
      pulse_pos = 0; pulse_neg = 0; erase = 1;
      @(negedge clk); compare();
      erase = 0;
    end
    repeat (40) begin @(negedge clk); compare(); end
    checks++;
    if (n_ev < 200) begin failures++; $display("FAIL too few events %0d", n_ev); end
    $display("pixel events %0d", n_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
