// Controller of the convolution chip: turns each incoming event into a
// sequence of kernel row copies, one integration pulse and an erase.
//
// Decode stage. It takes the oldest event (sign, x_o, y_o) from the input
// queue and works out which kernel rows fall inside this chip's window
// [y_min, y_max]. The kernel has rows y_o - s .. y_o + s; the rows that land
// in the array are lo = max(y_o - s, y_min) .. hi = min(y_o + s, y_max),
// q = hi - lo + 1 of them. They are copied in order j = 0 .. q-1 from RAM row
// lo - y_o + s + j to array row lo - y_min + j. This single rule covers the
// document's four cases: no row inside (the event is dropped), the top
// kernel rows on the bottom array rows, the bottom kernel rows on the top
// array rows, and the whole kernel inside; it also covers a kernel taller
// than the window. An event whose columns x_o - r .. x_o + r miss
// [x_min, x_max] is dropped too. The column offset for the x-neighbourhood
// block is dx = x_o - x_min - r.
//
// Execute stage, for one decoded event: two clock cycles per copied row
// (select the RAM row, then strobe the array row), one cycle to trigger the
// monostable, the pulse itself, and one cycle that erases every pixel
// weight register. Decoding the next event overlaps the execute stage, so
// in a steady stream an event with q rows occupies 2q + 2 + W cycles, W
// being the pulse width: 4 + 2q with the default 2-cycle pulse, i.e.
// (40 + 20 q) ns at 100 MHz as measured on the prototype.
//
// The window arithmetic and the order copy, pulse, erase follow the
// document; the cycle split, the decode/execute overlap and the clipping of
// both ends are this design's choices. Coordinates are unsigned AW-bit
// values; array and RAM indices start at 0.
module conv_controller
  import conv_pkg::*;
#(
  parameter int unsigned N = N_PIX
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cfg_t                 cfg,
  // input queue
  input  in_event_t            evt,
  input  logic                 evt_valid,
  output logic                 evt_pop,
  // kernel RAM and x-neighbourhood
  output logic [$clog2(N)-1:0] ram_row,
  output logic [$clog2(N):0]   shift_mag,
  output logic                 shift_right,
  // y-decoder and pixel array
  output logic [$clog2(N)-1:0] arr_row,
  output logic                 row_load,
  output logic                 erase,
  // monostable
  output logic                 mono_trigger,
  output logic                 mono_sign,
  input  logic                 mono_busy,
  // status: one strobe per event taken from the queue, with its window class
  output logic                 evt_taken,
  output win_class_e           evt_class,
  output logic                 busy
);

  localparam int unsigned NB = $clog2(N);
  localparam int unsigned SW = AW + 3;
  typedef logic signed [SW-1:0] coord_t;

  // ---------------------------------------------------------------- decode
  typedef struct packed {
    logic          sign;
    logic [NB:0]   q;          // rows to copy, 1 .. N
    logic [NB-1:0] ram_first;
    logic [NB-1:0] arr_first;
    logic [NB:0]   dx_mag;
    logic          dx_right;
  } job_t;

  coord_t     xo, yo, s, r, xmin, xmax, ymin, ymax;
  coord_t     lo, hi, dx, dx_abs;
  logic       hit;
  job_t       job_c, job;
  logic       job_valid;
  win_class_e cls;
  logic       take_job;

  always_comb begin
    xo   = coord_t'(evt.x);
    yo   = coord_t'(evt.y);
    s    = coord_t'(cfg.s);
    r    = coord_t'(cfg.r);
    xmin = coord_t'(cfg.x_min);
    xmax = coord_t'(cfg.x_max);
    ymin = coord_t'(cfg.y_min);
    ymax = coord_t'(cfg.y_max);
    // Window never taller than the array, kernel never taller than the RAM.
    if (ymax > ymin + coord_t'(N - 1)) ymax = ymin + coord_t'(N - 1);

    lo = yo - s;
    if (lo < ymin) lo = ymin;
    hi = yo + s;
    if (hi > ymax) hi = ymax;
    if (hi > yo - s + coord_t'(N - 1)) hi = yo - s + coord_t'(N - 1);

    hit = (lo <= hi) && (xo + r >= xmin) && (xo - r <= xmax);

    dx     = xo - xmin - r;
    dx_abs = (dx < 0) ? -dx : dx;

    if (!hit)                               cls = WIN_NONE;
    else if (yo - s < ymin && yo + s > ymax) cls = WIN_BOTH;
    else if (yo - s < ymin)                 cls = WIN_BOTTOM;
    else if (yo + s > ymax)                 cls = WIN_TOP;
    else                                    cls = WIN_FULL;

    job_c.sign      = evt.sign;
    job_c.q         = (NB+1)'(hi - lo + coord_t'(1));
    job_c.ram_first = NB'(lo - yo + s);
    job_c.arr_first = NB'(lo - ymin);
    job_c.dx_mag    = (dx_abs >= coord_t'(N)) ? (NB+1)'(N) : (NB+1)'(dx_abs);
    job_c.dx_right  = (dx >= 0);
  end

  // The decode register is free when empty or handed over this cycle.
  assign evt_pop   = evt_valid && (!job_valid || take_job);
  assign evt_taken = evt_pop;
  assign evt_class = cls;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      job_valid <= 1'b0;
      job       <= '0;
    end else if (evt_pop) begin
      job_valid <= hit;
      job       <= job_c;
    end else if (take_job) begin
      job_valid <= 1'b0;
    end
  end

  // --------------------------------------------------------------- execute
  typedef enum logic [2:0] {EX_IDLE, EX_SEL, EX_LOAD, EX_FIRE, EX_PULSE} ex_state_e;
  ex_state_e     ex;
  job_t          cur;
  logic [NB:0]   j;
  logic          ex_free;

  // The execute stage can accept a job when idle, or in the erase cycle
  // that ends the previous pulse.
  assign ex_free  = (ex == EX_IDLE) || (ex == EX_PULSE && !mono_busy);
  assign take_job = ex_free && job_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex  <= EX_IDLE;
      cur <= '0;
      j   <= '0;
    end else begin
      unique case (ex)
        EX_IDLE, EX_PULSE: begin
          if (ex == EX_IDLE || !mono_busy) begin
            if (take_job) begin
              cur <= job;
              j   <= '0;
              ex  <= EX_SEL;
            end else begin
              ex <= EX_IDLE;
            end
          end
        end
        EX_SEL:  ex <= EX_LOAD;
        EX_LOAD: begin
          if (j + 1'b1 == cur.q) ex <= EX_FIRE;
          else begin
            j  <= j + 1'b1;
            ex <= EX_SEL;
          end
        end
        EX_FIRE: ex <= EX_PULSE;
        default: ex <= EX_IDLE;
      endcase
    end
  end

  assign ram_row      = cur.ram_first + NB'(j);
  assign arr_row      = cur.arr_first + NB'(j);
  assign shift_mag    = cur.dx_mag;
  assign shift_right  = cur.dx_right;
  assign row_load     = (ex == EX_LOAD);
  assign mono_trigger = (ex == EX_FIRE);
  assign mono_sign    = cur.sign;
  assign erase        = (ex == EX_PULSE) && !mono_busy;
  assign busy         = (ex != EX_IDLE) || job_valid;

  // A pulse is only requested once the monostable has finished the last one.
  assert property (@(posedge clk) disable iff (!rst_n) mono_trigger |-> !mono_busy)
    else $error("conv_controller: trigger while the monostable is busy");

endmodule
