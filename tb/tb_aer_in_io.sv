// Testbench for aer_in_io: an eager four-phase sender (answers Ack in the
// same cycle) pushes a burst of events while the consumer is stalled. Checks
// the peak rate of one event per two clock cycles until the queue is full,
// that Ack is then withheld, and that every event comes out in order once the
// consumer pops.
module tb_aer_in_io;
  import conv_pkg::*;
  logic clk = 0, rst_n = 0;
  in_event_t in_addr = '0, evt;
  logic in_rqst = 0, in_ack, evt_valid, evt_pop = 0, q_full;
  int checks = 0, failures = 0;
  in_event_t sent[$], got[$];
  int accept_cycle[$];
  int cyc = 0;
  bit consumer_on = 0;
  int n_stall = 0;

  aer_in_io dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sender: raise Rqst with a new address, wait for Ack, drop Rqst, wait
  // for Ack low. Reacts combinationally, like a fast self-timed sender.
  initial begin
    @(posedge rst_n);
    for (int i = 0; i < 40; i++) begin
      in_addr = in_event_t'($urandom);
      in_rqst = 1;
      sent.push_back(in_addr);
      @(posedge in_ack);
      accept_cycle.push_back(cyc);
      #1 in_rqst = 0;
      @(negedge in_ack);
      #1;
    end
  end

  // Consumer: off for the first burst, then pops at random.
  always @(negedge clk) begin
    evt_pop <= consumer_on && evt_valid && ($urandom % 3 != 0);
    if (in_rqst && q_full) n_stall++;
  end
  always @(posedge clk) if (evt_pop && evt_valid) got.push_back(evt);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40) @(posedge clk);
    check(q_full, "queue full after burst");
    check(accept_cycle.size() == 4, "four events accepted while stalled");
    for (int i = 1; i < 4; i++)
      check(accept_cycle[i] - accept_cycle[i-1] == 2, "peak rate 2 cycles/event");
    check(!in_ack && in_rqst, "Ack withheld while full");
    consumer_on = 1;
    wait (got.size() == 40);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 40; i++) check(got[i] == sent[i], "order and data");
    check(n_stall > 10, "sender was held off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
