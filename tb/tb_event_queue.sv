// Testbench for event_queue: random pushes and pops against a reference
// queue; checks order, full/empty flags, count, and that a push into a full
// queue is refused.
module tb_event_queue;
  localparam int DW = 17, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [DW-1:0] push_data = '0, pop_data;
  logic full, empty;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [DW-1:0] model[$];
  int n_full = 0;

  event_queue #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(count == 3'(model.size()), "count");
      if (model.size() > 0) check(pop_data == model[0], "head data");
      if (full) n_full++;
      push      = ($urandom % 100) < 55;
      pop       = (model.size() > 0) && (($urandom % 100) < 45);
      push_data = DW'($urandom);
      @(posedge clk);
      #1;
      begin
        automatic bit did_pop  = pop;
        automatic bit did_push = push && (model.size() < DEPTH);
        if (did_pop) void'(model.pop_front());
        if (did_push) model.push_back(push_data);
      end
    end
    check(n_full > 20, "queue reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
