// AER convolution chip: programmable-kernel 2-D convolution on address
// events.
//
// An incoming event (sign, x_o, y_o) is taken by the AER-in block into a
// 4-entry queue. The controller pops it, works out which rows of the
// (2s+1) x (2r+1) kernel fall inside this chip's window [x_min..x_max] x
// [y_min..y_max], and copies those kernel RAM rows, two clock cycles per row,
// through the x-neighbourhood shifter (which moves the row by
// dx = x_o - x_min - r columns) into the weight registers of the pixel rows
// picked by the y-decoder. It then fires the monostable: for the pulse's
// duration every pixel adds its weight, signed by the event and weight
// signs, to its integrator; then all weight registers are erased. A pixel
// whose integrator reaches +threshold or -threshold requests an output
// event; the AER-out block arbitrates rows, latches one row's events and
// sends them, each with its sign and local (column, row) address, over a
// four-phase Rqst/Ack bus. The net effect is that the output event rates
// approximate the input event rates convolved with the kernel.
//
// Start-up programming: configuration registers (cfg_*), the kernel RAM
// through its serial load port (ram_*; ram_state = 1 hands the RAM to the
// controller) and the I-Pot bias chain (ipot_*, its own clock). The pulse
// width and firing threshold, analog biases on the prototype, are digital
// inputs here. Timing: with the default 2-cycle pulse a steady stream of
// events that each copy q rows is processed at one per 4 + 2q cycles.
//
// The block structure follows the prototype; the on-chip ring oscillator is
// analog and not included, so the clock is an input.
module conv_chip
  import conv_pkg::*;
#(
  parameter int unsigned N     = N_PIX,
  parameter int unsigned DEPTH = Q_DEPTH,
  parameter int unsigned AWID  = ACC_W,
  parameter int unsigned NCELL = N_IPOT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // AER input
  input  in_event_t               in_addr,
  input  logic                    in_rqst,
  output logic                    in_ack,
  // configuration registers
  input  logic                    cfg_we,
  input  cfg_addr_e               cfg_addr,
  input  logic [AW-1:0]           cfg_data,
  // kernel RAM load port
  input  logic                    ram_state,
  input  logic                    ram_data_in,
  input  logic                    ram_shift,
  input  logic                    ram_wr,
  // integration pulse width and firing threshold
  input  logic [PW_W-1:0]         pulse_width,
  input  logic [AWID-2:0]         fire_threshold,
  // AER output
  output logic                    out_sign,
  output logic [$clog2(N)-1:0]    out_x,
  output logic [$clog2(N)-1:0]    out_y,
  output logic                    out_rqst,
  input  logic                    out_ack,
  // I-Pot programming chain
  input  logic                    ipot_sclk,
  input  logic                    ipot_shift,
  input  logic                    ipot_data_in,
  output logic                    ipot_data_out,
  output logic [2**IPOT_A_W-1:0]  ipot_range_sel [NCELL],
  output logic [IPOT_B_W-1:0]     ipot_dac_code  [NCELL],
  output logic [NCELL-1:0]        ipot_to_test,
  // status
  output logic                    evt_taken,
  output win_class_e              evt_class,
  output logic                    queue_full,
  output logic                    busy
);

  localparam int unsigned NB = $clog2(N);

  cfg_t            cfg;
  in_event_t       evt;
  logic            evt_valid, evt_pop;
  logic [NB-1:0]   ram_row, arr_row;
  logic [NB:0]     shift_mag;
  logic            shift_right, row_load, erase;
  logic            mono_trigger, mono_sign, mono_busy;
  logic            pulse_pos, pulse_neg;
  weight_t [N-1:0] ram_cols, pix_cols;
  logic [N-1:0]    row_sel, row_req, row_ack, col_pos, col_neg;

  aer_in_io #(.DEPTH(DEPTH)) u_aer_in (
    .clk, .rst_n,
    .in_addr, .in_rqst, .in_ack,
    .evt, .evt_valid, .evt_pop,
    .q_full(queue_full)
  );

  config_regs #(.N(N)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .cfg
  );

  conv_controller #(.N(N)) u_ctrl (
    .clk, .rst_n, .cfg,
    .evt, .evt_valid, .evt_pop,
    .ram_row, .shift_mag, .shift_right,
    .arr_row, .row_load, .erase,
    .mono_trigger, .mono_sign, .mono_busy,
    .evt_taken, .evt_class, .busy
  );

  kernel_sram #(.N(N)) u_ram (
    .clk,
    .state  (ram_state),
    .data_in(ram_data_in),
    .shift  (ram_shift),
    .wr     (ram_wr),
    .rd_row (ram_row),
    .rd_data(ram_cols)
  );

  x_neighbourhood #(.N(N)) u_xnb (
    .ram_cols, .shift_mag, .shift_right, .pix_cols
  );

  y_decoder #(.N(N)) u_ydec (
    .row_idx(arr_row), .load(row_load), .row_load(row_sel)
  );

  monostable u_mono (
    .clk, .rst_n,
    .trigger     (mono_trigger),
    .sign        (mono_sign),
    .width_cycles(pulse_width),
    .pulse_pos, .pulse_neg,
    .busy        (mono_busy)
  );

  pixel_array #(.N(N), .AWID(AWID)) u_array (
    .clk, .rst_n,
    .row_load (row_sel),
    .col_words(pix_cols),
    .erase,
    .pulse_pos, .pulse_neg,
    .threshold(fire_threshold),
    .row_ack, .row_req, .col_pos, .col_neg
  );

  aer_out #(.N(N)) u_aer_out (
    .clk, .rst_n,
    .row_req, .row_ack, .col_pos, .col_neg,
    .out_sign, .out_x, .out_y, .out_rqst, .out_ack
  );

  ipot_chain #(.NCELL(NCELL)) u_ipot (
    .sclk     (ipot_sclk),
    .rst_n,
    .shift    (ipot_shift),
    .data_in  (ipot_data_in),
    .data_out (ipot_data_out),
    .range_sel(ipot_range_sel),
    .dac_code (ipot_dac_code),
    .to_test  (ipot_to_test)
  );

endmodule
