// Shared constants and types of the AER convolution chip.
//
// The chip receives signed address events (sign, x, y), copies a signed
// kernel held in an on-chip RAM around the event coordinate into an N x N
// array of integrate-and-fire pixels, fires one global integration pulse and
// sends the signed events its pixels produce out on a second AER port.
//
// Numbers that follow the prototype: a 16 x 16 pixel array, a 16 x 16 kernel
// RAM, 6-bit kernel words (sign bit plus five magnitude bits), a 4-entry
// input queue. The coordinate width of the input address space (8 bits, room
// for the 256 x 256 tiled example) and the pixel accumulator width are this
// design's own choices.
package conv_pkg;

  localparam int unsigned N_PIX      = 16;  // pixel array and kernel RAM side
  localparam int unsigned W_MAG      = 5;   // weight magnitude bits
  localparam int unsigned AW         = 8;   // input coordinate width
  localparam int unsigned Q_DEPTH    = 4;   // input event queue positions
  localparam int unsigned ACC_W      = 12;  // pixel accumulator width
  localparam int unsigned PW_W       = 6;   // monostable width code
  localparam int unsigned N_IPOT     = 31;  // global bias currents
  localparam int unsigned IPOT_A_W   = 3;   // range selector code bits
  localparam int unsigned IPOT_B_W   = 8;   // linear DAC code bits

  // Kernel word: sign and magnitude, as stored in the RAM and in each pixel.
  typedef struct packed {
    logic             sign;  // 1 = negative weight
    logic [W_MAG-1:0] mag;
  } weight_t;

  // Incoming event address: sign bit and coordinates of the sender.
  typedef struct packed {
    logic          sign;  // 1 = negative event
    logic [AW-1:0] x;
    logic [AW-1:0] y;
  } in_event_t;

  localparam int unsigned KW = $clog2(N_PIX);  // width of s and r

  // Configuration registers: the address window this chip covers and the
  // kernel half sizes. The kernel is (2s+1) rows by (2r+1) columns.
  typedef struct packed {
    logic [AW-1:0] x_min;
    logic [AW-1:0] x_max;
    logic [AW-1:0] y_min;
    logic [AW-1:0] y_max;
    logic [KW-1:0] s;
    logic [KW-1:0] r;
  } cfg_t;

  // Configuration register addresses.
  typedef enum logic [2:0] {
    CFG_X_MIN = 3'd0,
    CFG_X_MAX = 3'd1,
    CFG_Y_MIN = 3'd2,
    CFG_Y_MAX = 3'd3,
    CFG_S     = 3'd4,
    CFG_R     = 3'd5
  } cfg_addr_e;

  // Window position classes of Sec. "control block": which kernel rows land
  // in this chip.
  typedef enum logic [2:0] {
    WIN_NONE   = 3'd0,  // no kernel row inside the array
    WIN_BOTTOM = 3'd1,  // top kernel rows on the bottom array rows
    WIN_TOP    = 3'd2,  // bottom kernel rows on the top array rows
    WIN_FULL   = 3'd3,  // all 2s+1 rows inside
    WIN_BOTH   = 3'd4   // kernel taller than the array, clipped twice
  } win_class_e;

endpackage
