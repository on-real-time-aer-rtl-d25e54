// Testbench for kernel_sram: loads every row through the serial port in
// random order with random data (frames sent least significant bit first),
// then reads all rows back in the read state and checks that the load state
// reads zero.
module tb_kernel_sram;
  import conv_pkg::*;
  localparam int N = 16, NR = 4, WB = 6, TOT = NR + N * WB;
  logic clk = 0, state = 0, data_in = 0, shift = 0, wr = 0;
  logic [3:0] rd_row = '0;
  weight_t [N-1:0] rd_data;
  weight_t [N-1:0] model [N];
  int checks = 0, failures = 0;

  kernel_sram #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_row(input int row, input weight_t [N-1:0] words);
    logic [TOT-1:0] frame;
    frame[TOT-1 -: NR] = NR'(row);
    for (int c = 0; c < N; c++) frame[(N-1-c)*WB +: WB] = words[c];
    for (int b = 0; b < TOT; b++) begin
      @(negedge clk);
      data_in = frame[b];
      shift   = 1;
    end
    @(negedge clk);
    shift = 0;
    wr    = 1;
    @(negedge clk);
    wr = 0;
  endtask

  initial begin
    int order[N];
    for (int i = 0; i < N; i++) order[i] = i;
    order.shuffle();
    for (int k = 0; k < 2; k++)
      foreach (order[i]) begin
        weight_t [N-1:0] w;
        for (int c = 0; c < N; c++) w[c] = weight_t'($urandom);
        model[order[i]] = w;
        load_row(order[i], w);
      end
    rd_row = 4'd3;
    #1;
    checks++;
    if (rd_data !== '0) begin failures++; $display("FAIL load state reads nonzero"); end
    @(negedge clk);
    state = 1;
    for (int i = 0; i < N; i++) begin
      rd_row = 4'(i);
      #1;
      checks++;
      if (rd_data !== model[i]) begin failures++; $display("FAIL row %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
