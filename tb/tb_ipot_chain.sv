// Testbench for ipot_chain: shifts a random programming word for every cell
// through the chain and checks each cell's decoded range select, DAC code
// and test bit, then checks that the bits come out of data_out in order
// after the full chain length.
module tb_ipot_chain;
  localparam int NCELL = 31, A_W = 3, B_W = 8, CW = A_W + B_W + 1;
  logic sclk = 0, rst_n = 0, shift = 0, data_in = 0, data_out;
  logic [2**A_W-1:0] range_sel [NCELL];
  logic [B_W-1:0]    dac_code  [NCELL];
  logic [NCELL-1:0]  to_test;
  logic [A_W-1:0] a[NCELL];
  logic [B_W-1:0] b[NCELL];
  logic           c[NCELL];
  logic stream[$];
  int checks = 0, failures = 0;

  ipot_chain #(.NCELL(NCELL), .A_W(A_W), .B_W(B_W)) dut (.*);
  always #5 sclk = ~sclk;

  initial begin
    repeat (5000) @(posedge sclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NCELL; i++) begin
      a[i] = A_W'($urandom); b[i] = B_W'($urandom); c[i] = 1'($urandom);
    end
    // The last cell's word goes in first; within a cell A first, C last.
    for (int i = NCELL - 1; i >= 0; i--) begin
      for (int k = A_W - 1; k >= 0; k--) stream.push_back(a[i][k]);
      for (int k = B_W - 1; k >= 0; k--) stream.push_back(b[i][k]);
      stream.push_back(c[i]);
    end
    repeat (2) @(negedge sclk);
    rst_n = 1;
    foreach (stream[k]) begin
      @(negedge sclk);
      data_in = stream[k];
      shift   = 1;
    end
    @(negedge sclk);
    shift = 0;
    for (int i = 0; i < NCELL; i++) begin
      checks += 3;
      if (range_sel[i] !== (2**A_W)'(1) << a[i]) begin failures++; $display("FAIL range %0d", i); end
      if (dac_code[i] !== b[i]) begin failures++; $display("FAIL dac %0d", i); end
      if (to_test[i] !== c[i]) begin failures++; $display("FAIL test bit %0d", i); end
    end
    // Shift zeros: the programmed bits leave data_out first-in first-out.
    data_in = 0;
    shift   = 1;
    foreach (stream[k]) begin
      checks++;
      if (data_out !== stream[k]) begin failures++; if (failures < 5) $display("FAIL dout %0d", k); end
      @(negedge sclk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
