// Round-robin arbiter.
//
// Grants one of the active requests, searching upward from the position
// after the last grant, so every requester is served within N grants.
// grant is one-hot (zero when nothing requests) and combinational; the
// search start moves past the granted position at the clock edge where
// accept is high.
module rr_arbiter #(
  parameter int unsigned N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 accept,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx
);

  logic [$clog2(N)-1:0] start;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    for (int i = N - 1; i >= 0; i--) begin
      int unsigned j;
      j = (int'(start) + i) % N;
      if (req[j]) begin
        grant     = '0;
        grant[j]  = 1'b1;
        grant_idx = j[$clog2(N)-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 start <= '0;
    else if (accept && |req)    start <= (grant_idx == ($clog2(N))'(N - 1)) ? '0 : grant_idx + 1'b1;
  end

endmodule
