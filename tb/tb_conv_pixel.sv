// Testbench for conv_pixel: random weight loads, erases, signed pulses and
// row acknowledgements against a cycle-level reference of a signed
// integrate-and-fire cell (charge |w| per pulse cycle, sign = event sign
// times weight sign, fire and return to zero at +/- threshold, request held
// until acknowledged). Also counts that both event signs occurred.
module tb_conv_pixel;
  import conv_pkg::*;
  localparam int AWID = 12;
  logic clk = 0, rst_n = 0;
  logic load = 0, erase = 0, pulse_pos = 0, pulse_neg = 0, row_ack = 0;
  weight_t w_in = '0;
  logic [AWID-2:0] threshold = 11'd40;
  logic ev_pos, ev_neg;
  int checks = 0, failures = 0;
  int m_acc = 0, n_pos = 0, n_neg = 0;
  bit m_pos = 0, m_neg = 0;
  weight_t m_w = '0;

  conv_pixel #(.AWID(AWID)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference, updated at every rising edge from the inputs of that cycle.
  always @(posedge clk) if (rst_n) begin
    int sum;
    bit fp, fn, act;
    sum = m_acc;
    act = (pulse_pos || pulse_neg) && (m_w.mag != 0);
    if (act) sum += ((pulse_pos != m_w.sign) ? 1 : -1) * int'(m_w.mag);
    fp = act && sum >= int'(threshold);
    fn = act && sum <= -int'(threshold);
    if (fp) n_pos++;
    if (fn) n_neg++;
    m_acc = (fp || fn) ? 0 : sum;
    m_pos = (m_pos && !row_ack) || fp;
    m_neg = (m_neg && !row_ack) || fn;
    if (erase) m_w = '0; else if (load) m_w = w_in;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      checks++;
      if (ev_pos !== m_pos || ev_neg !== m_neg) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: ev %b%b exp %b%b", i, ev_pos, ev_neg, m_pos, m_neg);
      end
      load      = ($urandom % 8) == 0;
      w_in      = weight_t'($urandom);
      erase     = ($urandom % 16) == 0;
      pulse_pos = ($urandom % 3) == 0;
      pulse_neg = !pulse_pos && (($urandom % 3) == 0);
      row_ack   = ($urandom % 6) == 0;
    end
    checks++;
    if (n_pos < 10 || n_neg < 10) begin failures++; $display("FAIL too few events %0d %0d", n_pos, n_neg); end
    $display("events: %0d positive, %0d negative", n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
