// Top level: the AER convolution chip and the synthetic AER generator used
// to drive it, side by side.
//
// The two are separate pieces of hardware, each with all of its own ports
// brought out: the convolution chip (prefix none), and the frame-to-event
// generator (prefix gen_), which in a test set-up sits on a host's bus and
// feeds its event stream to the chip's AER input. Connecting gen_aer_* to
// in_* (coordinates zero-extended, sign 0) reproduces that set-up. The
// generator's 64 x 64 frame covers a tiled chip window as well as a single
// 16 x 16 chip.
module aer_conv_top
  import conv_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // convolution chip: AER input
  input  in_event_t               in_addr,
  input  logic                    in_rqst,
  output logic                    in_ack,
  // convolution chip: configuration and kernel RAM
  input  logic                    cfg_we,
  input  cfg_addr_e               cfg_addr,
  input  logic [AW-1:0]           cfg_data,
  input  logic                    ram_state,
  input  logic                    ram_data_in,
  input  logic                    ram_shift,
  input  logic                    ram_wr,
  input  logic [PW_W-1:0]         pulse_width,
  input  logic [ACC_W-2:0]        fire_threshold,
  // convolution chip: AER output
  output logic                    out_sign,
  output logic [$clog2(N_PIX)-1:0] out_x,
  output logic [$clog2(N_PIX)-1:0] out_y,
  output logic                    out_rqst,
  input  logic                    out_ack,
  // convolution chip: I-Pot chain
  input  logic                    ipot_sclk,
  input  logic                    ipot_shift,
  input  logic                    ipot_data_in,
  output logic                    ipot_data_out,
  output logic [2**IPOT_A_W-1:0]  ipot_range_sel [N_IPOT],
  output logic [IPOT_B_W-1:0]     ipot_dac_code  [N_IPOT],
  output logic [N_IPOT-1:0]       ipot_to_test,
  // convolution chip: status
  output logic                    evt_taken,
  output win_class_e              evt_class,
  output logic                    queue_full,
  output logic                    busy,
  // synthetic AER generator
  input  logic                    gen_host_we,
  input  logic [11:0]             gen_host_addr,
  input  logic [7:0]              gen_host_data,
  input  logic                    gen_enable,
  output logic [5:0]              gen_aer_x,
  output logic [5:0]              gen_aer_y,
  output logic                    gen_aer_req,
  input  logic                    gen_aer_ack,
  output logic [31:0]             gen_steps
);

  conv_chip u_chip (
    .clk, .rst_n,
    .in_addr, .in_rqst, .in_ack,
    .cfg_we, .cfg_addr, .cfg_data,
    .ram_state, .ram_data_in, .ram_shift, .ram_wr,
    .pulse_width, .fire_threshold,
    .out_sign, .out_x, .out_y, .out_rqst, .out_ack,
    .ipot_sclk, .ipot_shift, .ipot_data_in, .ipot_data_out,
    .ipot_range_sel, .ipot_dac_code, .ipot_to_test,
    .evt_taken, .evt_class, .queue_full, .busy
  );

  aer_rand_gen u_gen (
    .clk, .rst_n,
    .host_we  (gen_host_we),
    .host_addr(gen_host_addr),
    .host_data(gen_host_data),
    .enable   (gen_enable),
    .aer_x    (gen_aer_x),
    .aer_y    (gen_aer_y),
    .aer_req  (gen_aer_req),
    .aer_ack  (gen_aer_ack),
    .steps    (gen_steps)
  );

endmodule
