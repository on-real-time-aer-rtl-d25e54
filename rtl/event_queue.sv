// Input address queue of the AER-in block.
//
// Holds up to DEPTH event addresses so that the input bus can be freed
// before the controller has processed a burst of events. It is a circular
// register: a write pointer marks the newest entry and a read pointer the
// oldest, so reading an address moves a pointer instead of shifting every
// entry one place. The prototype uses four positions.
//
// Interface: push with push_data writes when not full; pop removes the
// oldest entry, visible on pop_data while not empty. A push and a pop in the
// same cycle are both accepted when the queue holds at least one entry.
// Both take effect at the rising clock edge; count is the number of entries.
module event_queue #(
  parameter int unsigned DW    = 17,
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [DW-1:0]              push_data,
  input  logic                       pop,
  output logic [DW-1:0]              pop_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] slots [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;

  assign full     = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty    = (count == '0);
  assign pop_data = slots[rd_ptr];

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) slots[wr_ptr] <= push_data;
  end

  // A pop is only issued against a non-empty queue by the controller.
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("event_queue: pop while empty");

endmodule
