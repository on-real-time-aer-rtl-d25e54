// Testbench for aer_rand_gen on an 8 x 8 frame: random grey levels are
// written, the generator runs for exactly one LFSR period (2**20 - 1
// steps), and every pixel's event count is compared with the exact value
// that period gives: each 20-bit state but zero occurs once, so a pixel of
// level I, whose address fixes 6 of the 20 bits, fires for 2**6 * I states
// (one fewer for pixel 0, which would own the zero state). The receiver
// acknowledges with random delays; a pause of enable is exercised too.
module tb_aer_rand_gen;
  localparam int XB = 3, YB = 3, LW = 20, NP = 2**(XB+YB);
  localparam int PERIOD = 2**LW - 1;
  logic clk = 0, rst_n = 0, host_we = 0, enable = 0, aer_ack = 0;
  logic [XB+YB-1:0] host_addr = '0;
  logic [7:0] host_data = '0;
  logic [XB-1:0] aer_x;
  logic [YB-1:0] aer_y;
  logic aer_req;
  logic [31:0] steps;
  int checks = 0, failures = 0;
  int level [NP];
  int count [NP];

  aer_rand_gen #(.XB(XB), .YB(YB), .LW(LW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    forever begin
      wait (aer_req && !aer_ack);
      repeat ($urandom % 3) @(posedge clk);
      if (steps <= PERIOD) count[{aer_y, aer_x}]++;
      #1 aer_ack = 1;
      wait (!aer_req);
      #1 aer_ack = 0;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NP; i++) begin
      level[i] = (i == 5) ? 0 : (i == 6) ? 255 : $urandom % 256;
      count[i] = 0;
      @(negedge clk);
      host_we = 1; host_addr = (XB+YB)'(i); host_data = 8'(level[i]);
    end
    @(negedge clk);
    host_we = 0;
    enable = 1;
    wait (steps == 1000);
    enable = 0;
    repeat (50) @(negedge clk);
    enable = 1;
    wait (steps > PERIOD);
    enable = 0;
    repeat (20) @(negedge clk);
    for (int i = 0; i < NP; i++) begin
      automatic int exp = (2**(LW - 8 - XB - YB)) * level[i] - ((i == 0 && level[i] > 0) ? 1 : 0);
      checks++;
      if (count[i] != exp) begin
        failures++;
        if (failures < 10) $display("FAIL pixel %0d level %0d: %0d events, expected %0d", i, level[i], count[i], exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
