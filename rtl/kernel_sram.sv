// Kernel RAM: N rows of N signed kernel words, serially loaded, read one
// full row at a time.
//
// Loading (state = 0): a frame of NR + N*(W_MAG+1) bits is shifted in on
// data_in, one bit per clock edge with shift high. After a whole frame the
// top NR bits of the shift register (the row register, nearest the input)
// hold the RAM row to write and the remaining bits hold the N column words,
// column 0 next to the row register. A one-cycle wr pulse then writes the
// row. A frame is therefore sent least significant bit first: column N-1
// first, the row number last.
//
// Reading (state = 1): rd_row selects a row and rd_data shows all N words of
// it in the same cycle (combinational read, as the prototype's dedicated
// read-side inverters give a fast read without sense amplifiers). In the
// load state rd_data reads as zero, so nothing can be copied to the pixels
// while the kernel is being written. The row-register + data shift chain and
// the state switch follow the prototype's floor plan; the bit order inside a
// frame is this design's choice. Row i holds kernel row dy = i - s, column c
// holds column dx = c - r; columns past 2r+1 are expected to be loaded with
// zero.
module kernel_sram
  import conv_pkg::*;
#(
  parameter int unsigned N = N_PIX
) (
  input  logic                 clk,
  input  logic                 state,     // 0 = load, 1 = controller reads
  input  logic                 data_in,
  input  logic                 shift,
  input  logic                 wr,
  input  logic [$clog2(N)-1:0] rd_row,
  output weight_t [N-1:0]      rd_data
);

  localparam int unsigned NR  = $clog2(N);
  localparam int unsigned WB  = $bits(weight_t);
  localparam int unsigned TOT = NR + N * WB;

  logic [TOT-1:0]    sr;
  weight_t [N-1:0]   mem [N];
  logic [NR-1:0]     wr_row;
  weight_t [N-1:0]   wr_words;

  assign wr_row = sr[TOT-1 -: NR];

  // Column c sits just below the row register for c = 0, at the bottom for
  // c = N-1.
  always_comb begin
    for (int c = 0; c < N; c++)
      wr_words[c] = sr[(N-1-c)*WB +: WB];
  end

  always_ff @(posedge clk) begin
    if (!state && shift) sr <= {data_in, sr[TOT-1:1]};
  end

  always_ff @(posedge clk) begin
    if (!state && wr) mem[wr_row] <= wr_words;
  end

  assign rd_data = state ? mem[rd_row] : '0;

endmodule
