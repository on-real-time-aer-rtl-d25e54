// Synthetic AER generator: turns a stored grey-level frame into a
// rate-coded stream of address events.
//
// A host writes a frame of up to 64 x 64 pixels, 8 bits each (4 KiB), into
// the frame RAM. While enable is high, the control unit repeatedly steps a
// 20-bit linear feedback shift register and splits its state into a pixel
// address (low 12 bits: x = bits 5..0, y = bits 11..6) and an 8-bit random
// level (bits 19..12). It reads that pixel and, if the pixel's value is
// greater than the random level, sends the pixel's address as an event on
// the AER bus with a four-phase Req/Ack handshake. Over a full LFSR period
// (2**20 - 1 steps) every state occurs once, so a pixel of value I produces
// exactly I events (pixel 0 one fewer, the all-zero state being excluded),
// spread pseudo-randomly in time: each pixel's event rate is proportional
// to its grey level. The LFSR advances only when the control unit asks for
// a new number, after the previous event has been handed over.
//
// One step without an event takes 3 clock cycles (advance, read, compare);
// an event adds the handshake. The frame RAM, the 20-bit LFSR and the
// control unit follow the document; the comparison rule, the bit split, the
// LFSR polynomial (x^20 + x^17 + 1, maximal length) and the host write port
// that stands in for the PCI core are this design's choices.
module aer_rand_gen #(
  parameter int unsigned XB = 6,   // 64 columns
  parameter int unsigned YB = 6,   // 64 rows
  parameter int unsigned LW = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  // host side
  input  logic             host_we,
  input  logic [XB+YB-1:0] host_addr,
  input  logic [7:0]       host_data,
  input  logic             enable,
  // AER output bus
  output logic [XB-1:0]    aer_x,
  output logic [YB-1:0]    aer_y,
  output logic             aer_req,
  input  logic             aer_ack,
  output logic [31:0]      steps
);

  localparam int unsigned AB = XB + YB;

  logic [7:0]    frame [2**AB];
  logic [7:0]    pix;
  logic [LW-1:0] lfsr;
  logic          lfsr_step;

  typedef enum logic [2:0] {CU_IDLE, CU_STEP, CU_READ, CU_CMP, CU_REQ, CU_WAIT} cu_state_e;
  cu_state_e cu;

  // Fibonacci LFSR, taps 20 and 17.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         lfsr <= LW'(1);
    else if (lfsr_step) lfsr <= {lfsr[LW-2:0], lfsr[LW-1] ^ lfsr[16]};
  end

  always_ff @(posedge clk) begin
    if (host_we) frame[host_addr] <= host_data;
    pix <= frame[lfsr[AB-1:0]];
  end

  assign lfsr_step = (cu == CU_STEP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cu      <= CU_IDLE;
      aer_req <= 1'b0;
      aer_x   <= '0;
      aer_y   <= '0;
      steps   <= '0;
    end else begin
      unique case (cu)
        CU_IDLE: if (enable && !aer_ack) cu <= CU_STEP;
        CU_STEP: begin
          cu    <= CU_READ;
          steps <= steps + 1'b1;
        end
        CU_READ: cu <= CU_CMP;
        CU_CMP: begin
          if (pix > lfsr[LW-1 -: 8]) begin
            aer_x   <= lfsr[XB-1:0];
            aer_y   <= lfsr[AB-1:XB];
            aer_req <= 1'b1;
            cu      <= CU_REQ;
          end else begin
            cu <= enable ? CU_STEP : CU_IDLE;
          end
        end
        CU_REQ: if (aer_ack) begin
          aer_req <= 1'b0;
          cu      <= CU_WAIT;
        end
        CU_WAIT: if (!aer_ack) cu <= enable ? CU_STEP : CU_IDLE;
        default: cu <= CU_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   aer_req && !aer_ack |=> aer_req && $stable({aer_x, aer_y}))
    else $error("aer_rand_gen: request withdrawn or address changed before Ack");

endmodule
