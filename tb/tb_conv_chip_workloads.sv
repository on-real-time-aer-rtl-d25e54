// Workload testbench for conv_chip at its default size: the measurements
// the chip's behaviour is usually judged by.
//
// 1. Event processing delay. A kernel of n_k rows (n_k = 1, 3, 5, 9, 15) is
//    loaded and events aimed at the middle of the array, so that all n_k
//    rows land on it, are sent back to back by a sender that answers each
//    edge of Ack at once. Once the input queue is full, the controller
//    takes one event every 4 + 2 n_k cycles, (40 + 20 n_k) ns at 100 MHz;
//    the spacing of the controller's evt_taken strobes is checked exactly.
//    The first events, while the queue still has room, must be accepted
//    one every 2 cycles (50 Meps peak input rate); the spacing of in_ack
//    rises is checked too.
// 2. Single-pixel weight sweep. A 1 x 1 kernel of weight w, for every w
//    from -31 to +31, receives a train of positive events at one pixel,
//    then a train of negative ones. The number of output events of each
//    sign from that pixel is compared with an integrate-and-fire reference
//    (it grows as |w|, with the sign of w times the event sign), and no
//    other pixel may fire.
// 3. Large kernel. A 15 x 15 Gabor-like kernel (cosine along x under a
//    Gaussian envelope, scaled to +/-31) is loaded and random signed events
//    are sent over the array and a margin around it; the per-pixel output
//    counts of each sign are compared exactly with the reference.
//
// The chip window is the reset window (x, y in 0..15). The receiver
// acknowledges every output event at once. Sizes, rates and the kernel
// shape are chosen here; the delay formula and the peak input rate are the
// prototype's measured figures.
module tb_conv_chip_workloads;
  import conv_pkg::*;
  localparam int N = 16, AWID = 12, W = 2, NCELL = 31;
  localparam int NK [5] = '{1, 3, 5, 9, 15};
  logic clk = 0, rst_n = 0;
  in_event_t in_addr = '0;
  logic in_rqst = 0, in_ack;
  logic cfg_we = 0;
  cfg_addr_e cfg_addr = CFG_X_MIN;
  logic [AW-1:0] cfg_data = '0;
  logic ram_state = 0, ram_data_in = 0, ram_shift = 0, ram_wr = 0;
  logic [PW_W-1:0] pulse_width = PW_W'(W);
  logic [AWID-2:0] fire_threshold = 11'd100;
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
  int kern [N][N];
  int acc [N][N];
  int exp_cnt [2][N][N], got_cnt [2][N][N];
  int s_cfg, r_cfg;
  longint cyc = 0;
  longint taken_at [$], ack_at [$];
  bit ack_d = 0;

  conv_chip dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (900000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycle counter and time stamps of controller starts and Ack rises.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    ack_d <= in_ack;
    if (rst_n && evt_taken) taken_at.push_back(cyc);
    if (rst_n && in_ack && !ack_d) ack_at.push_back(cyc);
  end

  // Eager receiver.
  initial begin
    wait (rst_n);
    forever begin
      wait (out_rqst && !out_ack);
      got_cnt[out_sign][out_y][out_x]++;
      #1 out_ack = 1;
      wait (!out_rqst);
      #1 out_ack = 0;
    end
  end

  // ------------------------------------------------------------- helpers
  task automatic write_cfg(input cfg_addr_e a, input int v);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_data = AW'(v);
    @(negedge clk);
    cfg_we = 0;
  endtask

  // Loads kern[][] into the RAM (all N rows) and sets s and r.
  task automatic load_kernel(input int s, input int r);
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
    write_cfg(CFG_S, s);
    write_cfg(CFG_R, r);
    s_cfg = s; r_cfg = r;
  endtask

  task automatic clear_kernel();
    for (int rr = 0; rr < N; rr++) for (int c = 0; c < N; c++) kern[rr][c] = 0;
  endtask

  // Reference: one event applied to every pixel (window 0..N-1).
  task automatic model_event(input in_event_t e);
    for (int rr = 0; rr < N; rr++) for (int c = 0; c < N; c++) begin
      automatic int dx = c - int'(e.x);
      automatic int dy = rr - int'(e.y);
      automatic int w, step;
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

  // Four-phase send that reacts to each Ack edge within the same cycle.
  task automatic send_event(input in_event_t e);
    in_addr = e;
    in_rqst = 1;
    wait (in_ack);
    #1;
    model_event(e);
    in_rqst = 0;
    wait (!in_ack);
    #1;
  endtask

  task automatic drain();
    repeat (5) @(posedge clk);
    wait (!busy);
    repeat (400) @(posedge clk);
  endtask

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

  // ----------------------------------------------------------------- main
  initial begin
    for (int rr = 0; rr < N; rr++) for (int c = 0; c < N; c++) begin
      acc[rr][c] = 0;
      for (int sg = 0; sg < 2; sg++) begin exp_cnt[sg][rr][c] = 0; got_cnt[sg][rr][c] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. Event processing delay and peak input rate.
    foreach (NK[i]) begin
      automatic int nk = NK[i];
      automatic int s = (nk - 1) / 2;
      automatic int period = 4 + 2 * nk;
      clear_kernel();
      for (int rr = 0; rr < nk; rr++) kern[rr][0] = ((rr + i) % 3) - 1;
      load_kernel(s, 0);
      taken_at.delete();
      ack_at.delete();
      for (int k = 0; k < 24; k++) begin
        in_event_t e;
        e.sign = 1'(k);
        e.x = AW'(2 + k % 12);
        e.y = AW'(8);
        send_event(e);
      end
      drain();
      check(taken_at.size() == 24, $sformatf("n_k=%0d: all events started", nk));
      for (int k = 8; k < taken_at.size(); k++)
        check(taken_at[k] - taken_at[k-1] == period,
              $sformatf("n_k=%0d: %0d cycles between events, expected %0d",
                        nk, taken_at[k] - taken_at[k-1], period));
      for (int k = 1; k < 4; k++)
        check(ack_at[k] - ack_at[k-1] == 2,
              $sformatf("n_k=%0d: peak input spacing %0d cycles", nk, ack_at[k] - ack_at[k-1]));
      $display("n_k=%0d: steady spacing %0d cycles = %0d ns at 100 MHz", nk,
               taken_at[23] - taken_at[22], 10 * (taken_at[23] - taken_at[22]));
    end
    compare_counts("delay runs");

    // 2. Weight sweep on pixel (5, 9) with a 1 x 1 kernel.
    for (int w = -31; w <= 31; w++) begin
      automatic int prev_got [2];
      automatic int prev_exp [2];
      prev_got[0] = got_cnt[0][9][5];
      prev_got[1] = got_cnt[1][9][5];
      prev_exp[0] = exp_cnt[0][9][5];
      prev_exp[1] = exp_cnt[1][9][5];
      clear_kernel();
      kern[0][0] = w;
      load_kernel(0, 0);
      for (int sg = 0; sg < 2; sg++) begin
        for (int k = 0; k < 25; k++) begin
          in_event_t e;
          e.sign = 1'(sg);
          e.x = AW'(5);
          e.y = AW'(9);
          send_event(e);
        end
      end
      drain();
      // Over 25 events of each sign the net charge is zero, and each train
      // alone moves the pixel by 25 * 2 * |w| = 50 |w|: about |w| / 2 events
      // of each sign for a threshold of 100.
      check(got_cnt[0][9][5] - prev_got[0] == exp_cnt[0][9][5] - prev_exp[0] &&
            got_cnt[1][9][5] - prev_got[1] == exp_cnt[1][9][5] - prev_exp[1],
            $sformatf("weight %0d: pixel event counts", w));
      if (w >= 4 || w <= -4)
        check(exp_cnt[0][9][5] - prev_exp[0] > 0 && exp_cnt[1][9][5] - prev_exp[1] > 0,
              $sformatf("weight %0d: both signs fire", w));
    end
    compare_counts("weight sweep");

    // 3. 15 x 15 Gabor-like kernel, random events over and around the array.
    for (int rr = 0; rr < N; rr++) for (int c = 0; c < N; c++) begin
      real dx, dy, g;
      dx = real'(c - 7);
      dy = real'(rr - 7);
      g = 31.0 * $exp(-(dx * dx + dy * dy) / 18.0) * $cos(2.0 * 3.14159265 * dx / 6.0);
      kern[rr][c] = (rr < 15 && c < 15) ? int'(g) : 0;
    end
    load_kernel(7, 7);
    for (int k = 0; k < 300; k++) begin
      in_event_t e;
      e.sign = 1'($urandom);
      e.x = AW'($urandom % 24);
      e.y = AW'($urandom % 24);
      send_event(e);
    end
    drain();
    compare_counts("gabor");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
