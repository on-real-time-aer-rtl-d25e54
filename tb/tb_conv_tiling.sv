// Tiling testbench: four conv_chip instances at their default size (16 x 16
// pixels each) cover a 32 x 32 input space as a 2 x 2 tile, as several
// chips of a larger array would.
//
// Each chip is given its own window in the configuration registers
// (x_min/x_max, y_min/y_max = 0..15 or 16..31) and the same kernel. Every
// input event is broadcast to all four chips: the sender raises Rqst on all
// inputs, waits until every chip has raised Ack, drops Rqst and waits until
// every Ack has fallen (a four-phase fork/join, as an AER splitter would
// do). Each chip's output stream goes to its own receiver, which maps the
// local pixel address back to the shared 32 x 32 space. An integrate-and-
// fire reference over the whole 32 x 32 space predicts the exact number of
// positive and negative events of every pixel; the tiled result must match
// it, in particular for kernels that straddle the tile boundaries.
//
// Counted mechanisms, each of which must occur: an event whose kernel
// touches two or four tiles, a chip dropping an event that misses its
// window, and a queue-full stall on some chip. The broadcast handshake and
// the sizes are this testbench's choices; the window registers and the
// tiling follow the chip's intended use.
module tb_conv_tiling;
  import conv_pkg::*;
  localparam int N = 16, AWID = 12, W = 2, NCELL = 31, T = 2, G = N * T;
  localparam int S = 3, R = 2;

  logic clk = 0, rst_n = 0;
  in_event_t in_addr = '0;
  logic in_rqst = 0;
  logic [3:0] in_ack;
  logic [3:0] cfg_we = '0;
  cfg_addr_e cfg_addr = CFG_X_MIN;
  logic [AW-1:0] cfg_data = '0;
  logic ram_state = 0, ram_data_in = 0, ram_shift = 0, ram_wr = 0;
  logic [PW_W-1:0] pulse_width = PW_W'(W);
  logic [AWID-2:0] fire_threshold = 11'd120;
  logic [3:0] out_sign, out_rqst, out_ack;
  logic [3:0] out_x [4], out_y [4];
  logic [3:0] ipot_data_out;
  logic [7:0] ipot_range_sel [4][NCELL];
  logic [7:0] ipot_dac_code [4][NCELL];
  logic [NCELL-1:0] ipot_to_test [4];
  logic [3:0] evt_taken, queue_full, busy;
  win_class_e evt_class [4];

  int checks = 0, failures = 0;
  int kern [N][N];
  int acc [G][G];
  int exp_cnt [2][G][G], got_cnt [2][G][G];
  int n_multi2 = 0, n_multi4 = 0, n_drop = 0, n_stall = 0;

  always #5 clk = ~clk;

  for (genvar t = 0; t < 4; t++) begin : g_chip
    conv_chip u_chip (
      .clk, .rst_n,
      .in_addr, .in_rqst, .in_ack (in_ack[t]),
      .cfg_we (cfg_we[t]), .cfg_addr, .cfg_data,
      .ram_state, .ram_data_in, .ram_shift, .ram_wr,
      .pulse_width, .fire_threshold,
      .out_sign (out_sign[t]), .out_x (out_x[t]), .out_y (out_y[t]),
      .out_rqst (out_rqst[t]), .out_ack (out_ack[t]),
      .ipot_sclk (clk), .ipot_shift (1'b0), .ipot_data_in (1'b0),
      .ipot_data_out (ipot_data_out[t]),
      .ipot_range_sel (ipot_range_sel[t]), .ipot_dac_code (ipot_dac_code[t]),
      .ipot_to_test (ipot_to_test[t]),
      .evt_taken (evt_taken[t]), .evt_class (evt_class[t]),
      .queue_full (queue_full[t]), .busy (busy[t])
    );

    // Receiver of tile t: tile column t % 2, tile row t / 2.
    initial begin
      out_ack[t] = 0;
      wait (rst_n);
      forever begin
        wait (out_rqst[t] && !out_ack[t]);
        got_cnt[out_sign[t]][N * (t / 2) + int'(out_y[t])][N * (t % 2) + int'(out_x[t])]++;
        #1 out_ack[t] = 1;
        wait (!out_rqst[t]);
        #1 out_ack[t] = 0;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < 4; t++)
      if (evt_taken[t] && evt_class[t] == WIN_NONE) n_drop++;
    if (queue_full != '0) n_stall++;
  end

  // ------------------------------------------------------------- helpers
  task automatic write_cfg(input int t, input cfg_addr_e a, input int v);
    @(negedge clk);
    cfg_we[t] = 1; cfg_addr = a; cfg_data = AW'(v);
    @(negedge clk);
    cfg_we = '0;
  endtask

  // The same kernel is shifted into all four chips at once.
  task automatic load_kernel();
    ram_state = 0;
    for (int row = 0; row < N; row++) begin
      logic [4 + N*6 - 1:0] frame;
      for (int c = 0; c < N; c++) begin
        automatic int w = kern[row][c];
        frame[(N-1-c)*6 +: 6] = {w < 0, 5'(w < 0 ? -w : w)};
      end
      frame[4 + N*6 - 1 -: 4] = 4'(row);
      for (int b = 0; b < 4 + N*6; b++) begin
        @(negedge clk);
        ram_data_in = frame[b]; ram_shift = 1;
      end
      @(negedge clk);
      ram_shift = 0; ram_wr = 1;
      @(negedge clk);
      ram_wr = 0;
    end
    @(negedge clk);
    ram_state = 1;
  endtask

  // Reference over the whole G x G space.
  task automatic model_event(input in_event_t e);
    automatic bit [3:0] hit = '0;
    for (int y = 0; y < G; y++) for (int x = 0; x < G; x++) begin
      automatic int dx = x - int'(e.x);
      automatic int dy = y - int'(e.y);
      automatic int w, step;
      if (dx < -R || dx > R || dy < -S || dy > S) continue;
      hit[2 * (y / N) + (x / N)] = 1'b1;
      w = kern[dy + S][dx + R];
      if (w == 0) continue;
      step = e.sign ? -w : w;
      for (int k = 0; k < W; k++) begin
        acc[y][x] += step;
        if (acc[y][x] >= int'(fire_threshold)) begin exp_cnt[0][y][x]++; acc[y][x] = 0; end
        else if (acc[y][x] <= -int'(fire_threshold)) begin exp_cnt[1][y][x]++; acc[y][x] = 0; end
      end
    end
    if ($countones(hit) == 2) n_multi2++;
    if ($countones(hit) == 4) n_multi4++;
  endtask

  // Broadcast four-phase send: join on all Acks high, then all low.
  task automatic send_event(input in_event_t e);
    in_addr = e;
    in_rqst = 1;
    wait (in_ack == 4'hF);
    #1;
    model_event(e);
    in_rqst = 0;
    wait (in_ack == 4'h0);
    #1;
  endtask

  // ----------------------------------------------------------------- main
  initial begin
    for (int y = 0; y < G; y++) for (int x = 0; x < G; x++) begin
      acc[y][x] = 0;
      for (int sg = 0; sg < 2; sg++) begin exp_cnt[sg][y][x] = 0; got_cnt[sg][y][x] = 0; end
    end
    for (int rr = 0; rr < N; rr++) for (int c = 0; c < N; c++)
      kern[rr][c] = (rr <= 2 * S && c <= 2 * R) ? int'($urandom % 63) - 31 : 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      write_cfg(t, CFG_X_MIN, N * (t % 2));
      write_cfg(t, CFG_X_MAX, N * (t % 2) + N - 1);
      write_cfg(t, CFG_Y_MIN, N * (t / 2));
      write_cfg(t, CFG_Y_MAX, N * (t / 2) + N - 1);
      write_cfg(t, CFG_S, S);
      write_cfg(t, CFG_R, R);
    end
    load_kernel();

    // Bursts of events, half of them near the tile boundaries.
    for (int b = 0; b < 20; b++) begin
      for (int i = 0; i < 20; i++) begin
        in_event_t e;
        e.sign = 1'($urandom);
        if (i % 2 == 0) begin
          e.x = AW'(N - 3 + $urandom % 6);
          e.y = AW'($urandom % G);
        end else begin
          e.x = AW'($urandom % G);
          e.y = AW'($urandom % G);
        end
        if (i % 5 == 0) e.y = AW'(N - 3 + $urandom % 6);
        send_event(e);
      end
      repeat (5) @(posedge clk);
      wait (busy == '0);
      repeat (300) @(posedge clk);
    end
    repeat (1000) @(posedge clk);

    for (int sg = 0; sg < 2; sg++) for (int y = 0; y < G; y++) for (int x = 0; x < G; x++) begin
      checks++;
      if (got_cnt[sg][y][x] != exp_cnt[sg][y][x]) begin
        failures++;
        if (failures < 20) $display("FAIL pixel (%0d,%0d) sign %0d: %0d events, expected %0d",
                                    x, y, sg, got_cnt[sg][y][x], exp_cnt[sg][y][x]);
      end
    end
    check(n_multi2 > 0, "kernel straddling two tiles");
    check(n_multi4 > 0, "kernel straddling four tiles");
    check(n_drop > 0, "chip dropping an event outside its window");
    check(n_stall > 0, "queue-full stall on some chip");
    $display("straddling 2/4 tiles %0d/%0d, drops %0d, stall cycles %0d",
             n_multi2, n_multi4, n_drop, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
