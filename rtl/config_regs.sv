// Configuration registers of the convolution chip.
//
// Six registers, written once at start-up together with the kernel: the
// limits x_min, x_max, y_min, y_max of the input address window this chip
// covers (a chip in a tiled array sees the whole address space but only
// acts on its own window), and the kernel half sizes s (rows) and r
// (columns) of a (2s+1) x (2r+1) kernel. Their contents follow the document;
// the write port (one register per clock edge, selected by cfg_addr) and the
// reset values (a stand-alone chip covering coordinates 0..N-1 with a 1 x 1
// kernel) are this design's choices. Writes to unused addresses are ignored.
module config_regs
  import conv_pkg::*;
#(
  parameter int unsigned N = N_PIX
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  cfg_addr_e     cfg_addr,
  input  logic [AW-1:0] cfg_data,
  output cfg_t          cfg
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.x_min <= '0;
      cfg.x_max <= AW'(N - 1);
      cfg.y_min <= '0;
      cfg.y_max <= AW'(N - 1);
      cfg.s     <= '0;
      cfg.r     <= '0;
    end else if (cfg_we) begin
      case (cfg_addr)
        CFG_X_MIN: cfg.x_min <= cfg_data;
        CFG_X_MAX: cfg.x_max <= cfg_data;
        CFG_Y_MIN: cfg.y_min <= cfg_data;
        CFG_Y_MAX: cfg.y_max <= cfg_data;
        CFG_S:     cfg.s     <= cfg_data[KW-1:0];
        CFG_R:     cfg.r     <= cfg_data[KW-1:0];
        default: ;
      endcase
    end
  end

endmodule
