// Testbench for monostable: pulses of every width on both signs; checks
// the exact pulse length in cycles, the sign steering, that a width of 0
// gives one cycle, and that a trigger during a pulse is ignored.
module tb_monostable;
  logic clk = 0, rst_n = 0, trigger = 0, sign = 0;
  logic [5:0] width_cycles = '0;
  logic pulse_pos, pulse_neg, busy;
  int checks = 0, failures = 0;

  monostable dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 64; w += (w < 8 ? 1 : 7)) begin
      for (int sg = 0; sg < 2; sg++) begin
        automatic int len = 0, wrong = 0;
        @(negedge clk);
        check(!pulse_pos && !pulse_neg && !busy, "idle before trigger");
        width_cycles = 6'(w);
        sign = sg[0];
        trigger = 1;
        @(negedge clk);
        trigger = 0;
        // retrigger in the middle must not stretch the pulse
        while (pulse_pos || pulse_neg) begin
          len++;
          if (sg == 1 ? pulse_pos : pulse_neg) wrong++;
          if (len == 1) begin sign = ~sign; trigger = 1; end
          @(negedge clk);
          trigger = 0;
        end
        check(len == (w == 0 ? 1 : w), $sformatf("width %0d got %0d", w, len));
        check(wrong == 0, "sign steering");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
