// Testbench for conv_controller. A queue model feeds events; a monostable
// model answers triggers with a W-cycle busy. For every event the rows
// copied (RAM row, array row), the column shift and the pulse sign are
// compared with a reference that walks the kernel rows y_o-s..y_o+s one by
// one and keeps those inside [y_min, y_max]. Checks an erase after every
// pulse, counts every window class, and in a phase of events that all fit
// inside the window checks the steady event period of 4 + 2(2s+1) cycles
// (W = 2), the prototype's (40 + 20 n_k) ns at 100 MHz.
module tb_conv_controller;
  import conv_pkg::*;
  localparam int N = 16, W = 2;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  in_event_t evt;
  logic evt_valid, evt_pop;
  logic [3:0] ram_row, arr_row;
  logic [4:0] shift_mag;
  logic shift_right, row_load, erase, mono_trigger, mono_sign, mono_busy;
  logic evt_taken, busy;
  win_class_e evt_class;
  int checks = 0, failures = 0;
  in_event_t src[$];
  in_event_t pending[$];   // events taken that should produce a pulse
  int rows_ram[$], rows_arr[$];
  int dxs[$];
  int class_cnt[5];
  int mono_cnt = 0, last_trig = -1, cyc = 0, period_ok = 0, period_bad = 0;
  bit check_period = 0, pulse_since_erase = 0;
  int n_erase = 0, n_trig = 0;

  conv_controller #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  assign evt_valid = src.size() > 0;
  assign evt       = evt_valid ? src[0] : '0;
  assign mono_busy = mono_cnt > 0;

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

  function automatic bit hits(in_event_t e, cfg_t c, output int q);
    int yo = e.y, xo = e.x;
    q = 0;
    for (int dy = -int'(c.s); dy <= int'(c.s); dy++)
      if (yo + dy >= int'(c.y_min) && yo + dy <= int'(c.y_max)) q++;
    return q > 0 && xo + int'(c.r) >= int'(c.x_min) && xo - int'(c.r) <= int'(c.x_max);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (mono_trigger) begin
      check(mono_cnt == 0, "trigger while busy");
      mono_cnt <= W;
      n_trig++;
      if (check_period && last_trig >= 0) begin
        if (cyc - last_trig == 4 + 2 * (2 * int'(cfg.s) + 1)) period_ok++;
        else begin period_bad++; $display("period %0d", cyc - last_trig); end
      end
      last_trig <= cyc;
      // compare the whole event
      begin
        in_event_t e;
        int q, yo, xo;
        check(pending.size() > 0, "pulse without a pending event");
        e = pending.pop_front();
        yo = e.y; xo = e.x;
        check(mono_sign == e.sign, "pulse sign");
        q = 0;
        for (int dy = -int'(cfg.s); dy <= int'(cfg.s); dy++) begin
          automatic int y = yo + dy;
          if (y >= int'(cfg.y_min) && y <= int'(cfg.y_max)) begin
            check(rows_ram.size() > q && rows_ram[q] == dy + int'(cfg.s), "RAM row");
            check(rows_arr.size() > q && rows_arr[q] == y - int'(cfg.y_min), "array row");
            q++;
          end
        end
        check(rows_ram.size() == q, $sformatf("number of rows copied %0d exp %0d", rows_ram.size(), q));
        foreach (dxs[i]) check(dxs[i] == xo - int'(cfg.x_min) - int'(cfg.r), "column shift");
        rows_ram.delete(); rows_arr.delete(); dxs.delete();
      end
      pulse_since_erase = 1;
    end else if (mono_cnt > 0) mono_cnt <= mono_cnt - 1;
    if (erase) begin
      check(pulse_since_erase && mono_cnt == 0, "erase after pulse");
      pulse_since_erase = 0;
      n_erase++;
    end
    if (row_load) begin
      rows_ram.push_back(ram_row);
      rows_arr.push_back(arr_row);
      dxs.push_back(shift_right ? int'(shift_mag) : -int'(shift_mag));
    end
    if (evt_pop) begin
      int q;
      class_cnt[evt_class]++;
      if (hits(src[0], cfg, q)) pending.push_back(src[0]);
      else check(evt_class == WIN_NONE, "dropped event classed NONE");
      void'(src.pop_front());
    end
  end

  task automatic run_events(input int n, input bit all_in);
    for (int i = 0; i < n; i++) begin
      in_event_t e;
      automatic int lo_x = int'(cfg.x_min) - 12, lo_y = int'(cfg.y_min) - 12;
      e.sign = 1'($urandom);
      if (all_in) begin
        e.x = AW'(int'(cfg.x_min) + int'(cfg.r) + $urandom % (N - 2 * cfg.r));
        e.y = AW'(int'(cfg.y_min) + int'(cfg.s) + $urandom % (N - 2 * cfg.s));
      end else begin
        e.x = AW'(lo_x + $urandom % (N + 24));
        e.y = AW'(lo_y + $urandom % (N + 24));
      end
      src.push_back(e);
    end
    wait (src.size() == 0 && !busy);
    repeat (5) @(posedge clk);
  endtask

  initial begin
    cfg = '{x_min: 40, x_max: 55, y_min: 60, y_max: 75, s: 2, r: 3};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // steady-rate phase: every event fits inside
    for (int s = 0; s < 8; s++) begin
      cfg.s = KW'(s); cfg.r = KW'(7 - s);
      check_period = 1; last_trig = -1;
      run_events(20, 1);
      check_period = 0;
    end
    check(period_ok > 100 && period_bad == 0, "steady event period 4 + 2(2s+1)");
    // random phase: windows, kernel sizes and positions, events partly outside
    for (int k = 0; k < 60; k++) begin
      cfg.x_min = AW'(20 + $urandom % 200); cfg.x_max = cfg.x_min + 15;
      cfg.y_min = AW'(20 + $urandom % 200); cfg.y_max = cfg.y_min + 15;
      cfg.s = KW'($urandom % 8); cfg.r = KW'($urandom % 8);
      run_events(40, 0);
    end
    // a window smaller than the array with a kernel taller than it (rows
    // clipped at both ends)
    cfg.y_max = cfg.y_min + 9; cfg.s = 7; cfg.r = 2;
    run_events(20, 0);
    check(pending.size() == 0, "every pending event pulsed");
    check(n_erase == n_trig, "one erase per pulse");
    for (int c = 0; c < 5; c++) check(class_cnt[c] > 0, $sformatf("window class %0d seen", c));
    $display("classes none/bottom/top/full/both: %0d %0d %0d %0d %0d; periods ok %0d",
             class_cnt[0], class_cnt[1], class_cnt[2], class_cnt[3], class_cnt[4], period_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
