// Programming chain of the I-Pot bias cells.
//
// Each of the NCELL bias generators (31 on the prototype) is programmed by
// a small shift register in three parts: A selects one branch of a current
// range selector (a ladder whose branches divide by a fixed ratio), B is
// the code of a linear current DAC fed by that branch, and the single bit C
// steers the resulting current either to its bias point (0) or to the
// shared external test pin (1). The registers of all cells form one chain
// with a data input, a data output and a clock, so three pins program every
// bias. The chain shifts on the rising edge of sclk while shift is high; a
// bit entering at data_in passes C, B, A of cell 0, then cell 1, and so on,
// and leaves at data_out after NCELL*(A_W+B_W+1) shifts.
//
// The outputs are the digital controls of the analog part: a one-hot range
// branch select per cell (2**A_W branches), the DAC code and the test-pin
// switch. The current ladders themselves are analog and not modelled. The
// register widths A_W and B_W, the bit order inside a cell and the one-hot
// decoding are this design's choices; the three-part register, the chain and
// the test-pin bit follow the document.
module ipot_chain
  import conv_pkg::*;
#(
  parameter int unsigned NCELL = N_IPOT,
  parameter int unsigned A_W   = IPOT_A_W,
  parameter int unsigned B_W   = IPOT_B_W
) (
  input  logic                  sclk,
  input  logic                  rst_n,
  input  logic                  shift,
  input  logic                  data_in,
  output logic                  data_out,
  output logic [2**A_W-1:0]     range_sel [NCELL],
  output logic [B_W-1:0]        dac_code  [NCELL],
  output logic [NCELL-1:0]      to_test
);

  localparam int unsigned CW = A_W + B_W + 1;  // {A, B, C}, C nearest the input

  logic [CW-1:0] creg [NCELL];

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCELL; i++) creg[i] <= '0;
    end else if (shift) begin
      creg[0] <= {creg[0][CW-2:0], data_in};
      for (int i = 1; i < NCELL; i++) creg[i] <= {creg[i][CW-2:0], creg[i-1][CW-1]};
    end
  end

  assign data_out = creg[NCELL-1][CW-1];

  for (genvar i = 0; i < NCELL; i++) begin : g_cell
    logic [A_W-1:0] a_code;
    assign a_code      = creg[i][CW-1 -: A_W];
    assign dac_code[i] = creg[i][B_W:1];
    assign to_test[i]  = creg[i][0];
    always_comb begin
      range_sel[i]         = '0;
      range_sel[i][a_code] = 1'b1;
    end
  end

endmodule
