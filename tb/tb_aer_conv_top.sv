// End-to-end testbench for aer_conv_top with every parameter at its
// default: the synthetic AER generator holds a 64 x 64 frame with a
// vertical edge (dark left half, bright right half, plus a bright square),
// and its event stream is bridged, coordinates zero-extended and sign
// positive, into the convolution chip's AER input. The chip covers the
// window x 24..39, y 20..35 of that frame and holds a 3 x 3 vertical-edge
// kernel (negative left column, positive right column). Every bridged event
// is also applied to an event-level reference of the chip, and the
// positive and negative output events of every pixel are compared with it
// exactly. A pixel at x gets 12 * (I(x-1) - I(x+1)) per unit of input
// rate, so the rising edge at x = 32 must give negative events on columns
// 31 and 32, the square's falling edge positive events on columns 29 and
// 30, and the flat bright area (where the net charge averages zero) far
// fewer. A 30-cycle integration pulse makes the chip slower than the
// generator so that the input queue fills. Counted
// mechanisms, each of which must occur: generator events, input-queue
// stalls, events outside the window, the four window cases, left and right
// shifts, both output signs, a paused generator, a receiver holding Ack.
module tb_aer_conv_top;
  import conv_pkg::*;
  localparam int N = 16, AWID = 12, W = 30, NCELL = 31;
  localparam int XMIN = 24, YMIN = 20;
  logic clk = 0, rst_n = 0;
  in_event_t in_addr = '0;
  logic in_rqst = 0, in_ack;
  logic cfg_we = 0;
  cfg_addr_e cfg_addr = CFG_X_MIN;
  logic [AW-1:0] cfg_data = '0;
  logic ram_state = 0, ram_data_in = 0, ram_shift = 0, ram_wr = 0;
  logic [PW_W-1:0] pulse_width = PW_W'(W);
  logic [AWID-2:0] fire_threshold = 11'd1000;
  logic out_sign, out_rqst, out_ack = 0;
  logic [3:0] out_x, out_y;
  logic ipot_shift = 0, ipot_data_in = 0, ipot_data_out;
  logic [7:0] ipot_range_sel [NCELL];
  logic [7:0] ipot_dac_code [NCELL];
  logic [NCELL-1:0] ipot_to_test;
  logic evt_taken, queue_full, busy;
  win_class_e evt_class;
  wire ipot_sclk = clk;
  logic gen_host_we = 0, gen_enable = 0, gen_aer_req;
  logic [11:0] gen_host_addr = '0;
  logic [7:0] gen_host_data = '0;
  logic [5:0] gen_aer_x, gen_aer_y;
  logic gen_aer_ack;
  logic [31:0] gen_steps;
  int n_gen = 0, n_pause = 0;

  int checks = 0, failures = 0;
  int kern [N][N];           // [RAM row][RAM col], signed weight
  int acc [N][N];
  int exp_cnt [2][N][N], got_cnt [2][N][N];
  int s_cfg, r_cfg;
  int n_stall = 0, n_in_pos = 0, n_in_neg = 0, n_out_pos = 0, n_out_neg = 0, n_hold = 0;
  int n_left = 0, n_right = 0;
  int class_cnt [5];

  aer_conv_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
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

  // Rewrite the kernel RAM from kern[][] (after the test edits it).
  task automatic reload_kernel();
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

  // Bridge: generator output to chip input, one handshake for each.
  logic in_ack_seen = 0;
  assign gen_aer_ack = in_ack_seen;
  initial begin
    wait (rst_n);
    forever begin
      in_event_t e;
      wait (gen_aer_req && !gen_aer_ack);
      e.sign = 0; e.x = AW'(gen_aer_x); e.y = AW'(gen_aer_y);
      n_gen++;
      send_event(e);
      in_ack_seen = 1;
      wait (!gen_aer_req);
      #1 in_ack_seen = 0;
    end
  end

  // ------------------------------------------------------------ monitors
  always @(posedge clk) if (rst_n) begin
    if (evt_taken) class_cnt[evt_class]++;
    if (dut.u_chip.row_load) begin
      if (dut.u_chip.shift_right && dut.u_chip.shift_mag != 0) n_right++;
      if (!dut.u_chip.shift_right) n_left++;
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

    // 3 x 3 vertical-edge kernel: RAM rows 0..2, columns 0..2.
    load_kernel(1, 1);
    for (int row = 0; row < 3; row++) begin
      kern[row][0] = -12; kern[row][1] = 0; kern[row][2] = 12;
    end
    reload_kernel();
    // Frame: 40 left of x = 32, 200 from x = 32 on, a 4 x 4 square of 250
    // at x 26..29, y 26..29; zero outside x 16..47, y 12..43 so that most
    // events reach the chip's window.
    for (int a = 0; a < 4096; a++) begin
      automatic int x = a % 64, y = a / 64;
      @(negedge clk);
      gen_host_we = 1; gen_host_addr = 12'(a);
      gen_host_data = (x < 16 || x > 47 || y < 12 || y > 43) ? 8'd0 :
                      (x >= 26 && x <= 29 && y >= 26 && y <= 29) ? 8'd250 : (x >= 32) ? 8'd200 : 8'd40;
    end
    @(negedge clk);
    gen_host_we = 0;
    gen_enable = 1;
    wait (gen_steps == 40000);
    gen_enable = 0; n_pause++;
    repeat (200) @(posedge clk);
    gen_enable = 1;
    wait (gen_steps == 200000);
    gen_enable = 0;
    wait (!gen_aer_req);
    drain();
    compare_counts("stream");
    begin
      int edge_neg = 0, edge_pos = 0, sq_pos = 0, flat_p = 0, flat_n = 0;
      for (int rr = 0; rr < N; rr++) for (int c = 0; c < N; c++) begin
        if (XMIN + c == 31 || XMIN + c == 32) begin
          edge_neg += got_cnt[1][rr][c]; edge_pos += got_cnt[0][rr][c];
        end else if (XMIN + c >= 34) begin
          flat_p += got_cnt[0][rr][c]; flat_n += got_cnt[1][rr][c];
        end
        if ((XMIN + c == 29 || XMIN + c == 30) && YMIN + rr >= 26 && YMIN + rr <= 29)
          sq_pos += got_cnt[0][rr][c];
      end
      for (int c = 0; c < N; c++) begin
        automatic int sp = 0, sn = 0;
        for (int rr = 0; rr < N; rr++) begin sp += got_cnt[0][rr][c]; sn += got_cnt[1][rr][c]; end
        $display("column x=%0d: %0d positive, %0d negative", XMIN + c, sp, sn);
      end
      check(edge_neg > 100 && edge_neg > 20 * edge_pos, "rising edge gives negative events");
      check(sq_pos > 20, "square's falling edge gives positive events");
      check(3 * (flat_p > flat_n ? flat_p - flat_n : flat_n - flat_p) < flat_p + flat_n,
            "flat area balanced between signs");
    end
    check(n_gen > 1000, "generator produced events");
    check(n_pause > 0, "generator paused");
    check(n_stall > 0, "input queue full at least once");
    check(class_cnt[WIN_NONE] > 0, "events outside the window");
    check(class_cnt[WIN_BOTTOM] > 0, "top kernel rows on bottom array rows");
    check(class_cnt[WIN_TOP] > 0, "bottom kernel rows on top array rows");
    check(class_cnt[WIN_FULL] > 0, "whole kernel inside");
    check(n_left > 0 && n_right > 0, "left and right column shifts");
    check(n_out_pos > 0 && n_out_neg > 0, "both output signs");
    check(n_hold > 0, "receiver held Ack back");
    $display("stalls %0d, classes none/bottom/top/full %0d/%0d/%0d/%0d, shifts L/R %0d/%0d",
             n_stall, class_cnt[0], class_cnt[1], class_cnt[2], class_cnt[3], n_left, n_right);
    $display("generator events %0d, in +/- %0d/%0d, out +/- %0d/%0d, Ack holds %0d",
             n_gen, n_in_pos, n_in_neg, n_out_pos, n_out_neg, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
