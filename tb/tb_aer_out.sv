// Testbench for aer_out: a model of the pixel array's request side
// (pending positive/negative flags per pixel, OR-ed per row, driven onto
// the column lines of the acknowledged row, cleared at that edge) raises
// random events; a four-phase receiver with random delays takes them.
// Checks that every event leaves exactly once with the right sign and
// address, that no row is acknowledged while events are still latched, and,
// with an eager receiver, one event every two cycles within a row burst.
module tb_aer_out;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] row_req, row_ack, col_pos, col_neg;
  logic out_sign, out_rqst, out_ack = 0;
  logic [3:0] out_x, out_y;
  logic [N-1:0] pend_pos [N], pend_neg [N];
  int expected [2][N][N];
  int checks = 0, failures = 0, n_gen = 0, n_out = 0, n_ack_rows = 0;
  bit eager = 0, gen_on = 1;
  int last_rise = -100, cyc = 0, n_fast = 0, n_gap = 0;

  aer_out #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb begin
    col_pos = '0;
    col_neg = '0;
    for (int r = 0; r < N; r++) begin
      row_req[r] = |(pend_pos[r] | pend_neg[r]);
      if (row_ack[r]) begin col_pos |= pend_pos[r]; col_neg |= pend_neg[r]; end
    end
  end

  // Pixel side: clear on acknowledge, then maybe raise new events.
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++) begin pend_pos[r] <= '0; pend_neg[r] <= '0; end
    end else begin
      if ($countones(row_ack) > 1) begin failures++; $display("FAIL several rows acknowledged"); end
      if (row_ack != 0) n_ack_rows++;
      for (int r = 0; r < N; r++) begin
        logic [N-1:0] np, nn;
        np = row_ack[r] ? '0 : pend_pos[r];
        nn = row_ack[r] ? '0 : pend_neg[r];
        for (int c = 0; c < N; c++) begin
          if (gen_on && ($urandom % 4000) == 0 && !np[c] && !row_ack[r]) begin
            np[c] = 1; expected[0][r][c]++; n_gen++;
          end
          if (gen_on && ($urandom % 4000) == 0 && !nn[c] && !row_ack[r]) begin
            nn[c] = 1; expected[1][r][c]++; n_gen++;
          end
        end
        pend_pos[r] <= np;
        pend_neg[r] <= nn;
      end
    end
  end

  // Receiver.
  always @(posedge out_rqst) begin
    if (cyc - last_rise == 2) n_fast++;
    else n_gap++;
    last_rise = cyc;
  end
  initial begin
    forever begin
      wait (out_rqst && !out_ack);
      begin
        if (!eager) repeat ($urandom % 4) @(posedge clk);
        checks++;
        if (expected[out_sign][out_y][out_x] <= 0) begin
          failures++; $display("FAIL unexpected event s=%0d x=%0d y=%0d", out_sign, out_x, out_y);
        end else expected[out_sign][out_y][out_x]--;
        n_out++;
        #1 out_ack = 1;
        wait (!out_rqst);
        if (!eager) repeat ($urandom % 3) @(posedge clk);
        #1 out_ack = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (30000) @(posedge clk);
    eager = 1;
    n_fast = 0; n_gap = 0;
    repeat (30000) @(posedge clk);
    gen_on = 0;
    repeat (2000) @(posedge clk);
    for (int s = 0; s < 2; s++) for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      checks++;
      if (expected[s][r][c] != 0) begin failures++; $display("FAIL event lost s=%0d r=%0d c=%0d", s, r, c); end
    end
    checks++;
    if (n_out != n_gen || n_gen < 500) begin failures++; $display("FAIL counts gen=%0d out=%0d", n_gen, n_out); end
    checks++;
    if (n_fast < 20) begin failures++; $display("FAIL no back-to-back events at 2 cycles (%0d)", n_fast); end
    $display("generated %0d, sent %0d, rows acknowledged %0d, 2-cycle spacings %0d", n_gen, n_out, n_ack_rows, n_fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
