// Testbench for config_regs: reset values, then random writes to every
// register (and to unused addresses) checked against a model.
module tb_config_regs;
  import conv_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  cfg_addr_e cfg_addr = CFG_X_MIN;
  logic [AW-1:0] cfg_data = '0;
  cfg_t cfg, model;
  int checks = 0, failures = 0;

  config_regs dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    model = '{x_min: 0, x_max: 15, y_min: 0, y_max: 15, s: 0, r: 0};
    @(negedge clk);
    checks++;
    if (cfg !== model) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      cfg_we   = ($urandom % 4) != 0;
      cfg_addr = cfg_addr_e'($urandom % 8);
      cfg_data = AW'($urandom);
      @(posedge clk);
      if (cfg_we) case (cfg_addr)
        CFG_X_MIN: model.x_min = cfg_data;
        CFG_X_MAX: model.x_max = cfg_data;
        CFG_Y_MIN: model.y_min = cfg_data;
        CFG_Y_MAX: model.y_max = cfg_data;
        CFG_S:     model.s     = cfg_data[KW-1:0];
        CFG_R:     model.r     = cfg_data[KW-1:0];
        default: ;
      endcase
      #1;
      checks++;
      if (cfg !== model) begin failures++; $display("FAIL after write %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
