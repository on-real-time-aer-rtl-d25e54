// End-to-end testbench for conv_chip at its default size (16 x 16 pixels).
//
// The chip is programmed like a tile of a larger array (window x 100..115,
// y 50..65), its kernel RAM loaded serially with a random signed kernel and
// the I-Pot chain shifted. Signed events are then sent over the four-phase
// input bus, around and across the window, and the output events collected
// by a receiver with random delays. An event-level reference (each pixel
// (x, y) adds w(x - x_o, y - y_o) from the kernel, signed by the event sign,
// once per pulse cycle, firing at +/- threshold) predicts how many positive
// and negative events every pixel must send; the counts are compared
// exactly. Phase 1 paces the events; phase 2 sends bursts that fill the
// input queue. Counted mechanisms, each of which must occur: queue full
// stalls, the four window cases (no row, top rows only, bottom rows only,
// all rows), left and right column shifts, positive and negative input and
// output events, and a receiver holding Ack back.
module tb_conv_chip;
  import conv_pkg::*;
  localparam int N = 16, AWID = 12, W = 2, NCELL = 31;
  localparam int XMIN = 100, YMIN = 50;
  logic clk = 0, rst_n = 0;
  in_event_t in_addr = '0;
  logic in_rqst = 0, in_ack;
  logic cfg_we = 0;
  cfg_addr_e cfg_addr = CFG_X_MIN;
  logic [AW-1:0] cfg_data = '0;
  logic ram_state = 0, ram_data_in = 0, ram_shift = 0, ram_wr = 0;
  logic [PW_W-1:0] pulse_width = PW_W'(W);
  logic [AWID-2:0] fire_threshold = 11'd150;
  logic out_sign, out_rqst, out_ack = 0;
  logic [3:0] out_x, out_y;
  logic ipot_shift = 0, ipot_data_in = 0, ipot_data_out;
  logic [7:0] ipot_range_sel [NCELL];
  logic [7:0] ipot_dac_code [NCELL];
  logic [NCELL-1:0] ipot_to_test;
  logic evt_taken, queue_full, busy;
  win_class_e evt_class;
  wire ipot_sclk = clk;

  int checks = 0, failures = 0;
  int kern [N][N];           // [RAM row][RAM col], signed weight
  int acc [N][N];
  int exp_cnt [2][N][N], got_cnt [2][N][N];
  int s_cfg, r_cfg;
  int n_stall = 0, n_in_pos = 0, n_in_neg = 0, n_out_pos = 0, n_out_neg = 0, n_hold = 0;
  int n_left = 0, n_right = 0;
  int class_cnt [5];

  conv_chip dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- helpers
  task automatic write_cfg(input cfg_addr_e a, input int v);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_data = AW'(v);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic load_kernel(input int s, input int r);
    ram_state = 0;
    for (int row = 0; row < N; row++) begin
      logic [4 + N*6 - 1:0] frame;
      for (int c = 0; c < N; c++) begin
        int w;
        w = (row <= 2*s && c <= 2*r) ? int'($urandom % 63) - 31 : 0;
        kern[row][c] = w;
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
    write_cfg(CFG_S, s);
    write_cfg(CFG_R, r);
    s_cfg = s; r_cfg = r;
  endtask

  // Reference: apply one event to every pixel of the window.
  task automatic model_event(input in_event_t e);
    for (int rr = 0; rr < N; rr++) for (int c = 0; c < N; c++) begin
      int dx, dy, w, step;
      dx = XMIN + c - int'(e.x);
      dy = YMIN + rr - int'(e.y);
      if (dx < -r_cfg || dx > r_cfg || dy < -s_cfg || dy > s_cfg) continue;
      w = kern[dy + s_cfg][dx + r_cfg];
      if (w == 0) continue;
      step = e.sign ? -w : w;
      for (int k = 0; k < W; k++) begin
        acc[rr][c] += step;
        if (acc[rr][c] >= int'(fire_threshold)) begin exp_cnt[0][rr][c]++; acc[rr][c] = 0; end
        else if (acc[rr][c] <= -int'(fire_threshold)) begin exp_cnt[1][rr][c]++; acc[rr][c] = 0; end
      end
    end
  endtask

  task automatic send_event(input in_event_t e);
    in_addr = e;
    in_rqst = 1;
    if (e.sign) n_in_neg++; else n_in_pos++;
    while (!in_ack) begin
      @(posedge clk);
      if (queue_full) n_stall++;
      #1;
    end
    model_event(e);
    in_rqst = 0;
    wait (!in_ack);
    #1;
  endtask

  function automatic in_event_t rand_event(input int spread);
    in_event_t e;
    e.sign = 1'($urandom);
    e.x = AW'(XMIN - spread + int'($urandom % (N + 2 * spread)));
    e.y = AW'(YMIN - spread + int'($urandom % (N + 2 * spread)));
    return e;
  endfunction

  // ------------------------------------------------------------ monitors
  always @(posedge clk) if (rst_n) begin
    if (evt_taken) class_cnt[evt_class]++;
    if (dut.row_load) begin
      if (dut.shift_right && dut.shift_mag != 0) n_right++;
      if (!dut.shift_right) n_left++;
    end
  end

  initial begin
    wait (rst_n);
    forever begin
      wait (out_rqst && !out_ack);
      if ($urandom % 4 == 0) begin
        n_hold++;
        repeat (1 + $urandom % 5) @(posedge clk);
      end
      got_cnt[out_sign][out_y][out_x]++;
      if (out_sign) n_out_neg++; else n_out_pos++;
      #1 out_ack = 1;
      wait (!out_rqst);
      #1 out_ack = 0;
    end
  end

  task automatic compare_counts(input string phase);
    for (int sg = 0; sg < 2; sg++) for (int rr = 0; rr < N; rr++) for (int c = 0; c < N; c++) begin
      checks++;
      if (got_cnt[sg][rr][c] != exp_cnt[sg][rr][c]) begin
        failures++;
        if (failures < 20) $display("FAIL %s pixel (%0d,%0d) sign %0d: %0d events, expected %0d",
                                    phase, c, rr, sg, got_cnt[sg][rr][c], exp_cnt[sg][rr][c]);
      end
    end
  endtask

  task automatic drain();
    repeat (20) @(posedge clk);
    wait (!busy);
    repeat (1500) @(posedge clk);
  endtask

  // ----------------------------------------------------------------- main
  initial begin
    for (int rr = 0; rr < N; rr++) for (int c = 0; c < N; c++) begin
      acc[rr][c] = 0;
      for (int sg = 0; sg < 2; sg++) begin exp_cnt[sg][rr][c] = 0; got_cnt[sg][rr][c] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // I-Pot chain: shift one programming word per cell.
    for (int b = 0; b < NCELL * 12; b++) begin
      @(negedge clk);
      ipot_data_in = 1'($urandom); ipot_shift = 1;
    end
    @(negedge clk);
    ipot_shift = 0;
    write_cfg(CFG_X_MIN, XMIN);
    write_cfg(CFG_X_MAX, XMIN + N - 1);
    write_cfg(CFG_Y_MIN, YMIN);
    write_cfg(CFG_Y_MAX, YMIN + N - 1);

    // Phase 1: 5 x 7 kernel, events one at a time.
    load_kernel(2, 3);
    for (int i = 0; i < 150; i++) begin
      send_event(rand_event(6));
      drain();
    end
    compare_counts("paced");

    // Phase 2: 3 x 3 kernel, bursts of back-to-back events.
    load_kernel(1, 1);
    for (int k = 0; k < 12; k++) begin
      for (int i = 0; i < 25; i++) send_event(rand_event(3));
      drain();
    end
    compare_counts("burst");

    check(n_stall > 0, "input queue full at least once");
    check(class_cnt[WIN_NONE] > 0, "events outside the window");
    check(class_cnt[WIN_BOTTOM] > 0, "top kernel rows on bottom array rows");
    check(class_cnt[WIN_TOP] > 0, "bottom kernel rows on top array rows");
    check(class_cnt[WIN_FULL] > 0, "whole kernel inside");
    check(n_left > 0 && n_right > 0, "left and right column shifts");
    check(n_in_pos > 0 && n_in_neg > 0, "both input signs");
    check(n_out_pos > 0 && n_out_neg > 0, "both output signs");
    check(n_hold > 0, "receiver held Ack back");
    $display("stalls %0d, classes none/bottom/top/full %0d/%0d/%0d/%0d, shifts L/R %0d/%0d",
             n_stall, class_cnt[0], class_cnt[1], class_cnt[2], class_cnt[3], n_left, n_right);
    $display("in +/- %0d/%0d, out +/- %0d/%0d, Ack holds %0d",
             n_in_pos, n_in_neg, n_out_pos, n_out_neg, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
