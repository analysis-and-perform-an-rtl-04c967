// Top level: the two constraint-length-3 convolutional encoder systems placed
// side by side on one clock, each with its own ports.
//
// Rate 1/2 system: conv_enc_r12 (four-state FSM, G1 = 1 + x^2,
// G2 = 1 + x + x^2) feeds sel_ab_serializer, which sends the two code bits of
// every symbol in turn on r12_serial. clk is the serial (symbol) clock, so one
// input bit is taken every second clock: r12_take is high in the cycle whose
// closing edge samples r12_x, and r12_x must be valid then. r12_symbol shows
// the parallel 2-bit symbol, r12_sel the serial phase (0 = bit 0, 1 = bit 1).
//
// Rate 1/3 system: conv_enc_r13 (two-stage shift register, G1 = G2 =
// 1 + x + x^2, G3 = 1 + x^2) takes one bit of r13_inp on every clock and
// gives the three code bits combinationally on r13_outpp.
//
// Both resets are synchronous and active high. The two encoders and the SEL
// A/B multiplexer follow the published design; sharing one clock and bringing
// out the states are this design's choices.
module conv_encoder_top
  import conv_enc_pkg::*;
(
  input  logic       clk,
  // rate 1/2 system
  input  logic       r12_rst,
  input  logic       r12_x,
  output logic       r12_take,
  output logic [1:0] r12_symbol,
  output logic       r12_serial,
  output logic       r12_sel,
  output enc_state_t r12_state,
  // rate 1/3 system
  input  logic       r13_res,
  input  logic       r13_inp,
  output logic [2:0] r13_outpp,
  output enc_state_t r13_state
);

  logic advance;

  conv_enc_r12 u_r12 (
    .clock      (clk),
    .rst        (r12_rst),
    .en         (advance),
    .x          (r12_x),
    .out_symbol (r12_symbol),
    .state_o    (r12_state)
  );

  sel_ab_serializer u_sel (
    .clk       (clk),
    .rst       (r12_rst),
    .sym_i     (r12_symbol),
    .serial_o  (r12_serial),
    .sel_o     (r12_sel),
    .advance_o (advance)
  );

  assign r12_take = advance;

  conv_enc_r13 u_r13 (
    .clk     (clk),
    .res     (r13_res),
    .inp     (r13_inp),
    .outpp   (r13_outpp),
    .state_o (r13_state)
  );

endmodule
