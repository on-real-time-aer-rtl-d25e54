// Programmable-width monostable: the global integration pulse.
//
// A one-cycle trigger starts a pulse of width_cycles clock periods (a width
// of 0 is taken as 1). The pulse comes out on pulse_pos for a positive
// incoming event and on pulse_neg for a negative one; the sign is captured
// with the trigger and held for the whole pulse. Triggers that arrive while
// a pulse is running are ignored; busy is high while the pulse runs.
//
// In the prototype the width is set by an analog timing capacitor charged
// by a programmable current (width = C_T * V_th / I_m). Here the capacitor
// and comparator are replaced by a down-counter loaded with a width code,
// which is this design's digital stand-in; the trigger-to-pulse behaviour and
// the sign steering onto two lines follow the document.
module monostable
  import conv_pkg::*;
#(
  parameter int unsigned WW = PW_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          trigger,
  input  logic          sign,          // 1 = negative event
  input  logic [WW-1:0] width_cycles,
  output logic          pulse_pos,
  output logic          pulse_neg,
  output logic          busy
);

  logic [WW-1:0] remaining;
  logic          neg;

  assign busy      = (remaining != '0);
  assign pulse_pos = busy && !neg;
  assign pulse_neg = busy && neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
      neg       <= 1'b0;
    end else if (!busy && trigger) begin
      remaining <= (width_cycles == '0) ? WW'(1) : width_cycles;
      neg       <= sign;
    end else if (busy) begin
      remaining <= remaining - 1'b1;
    end
  end

endmodule
