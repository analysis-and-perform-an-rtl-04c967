// Rate 1/2, constraint length 3 convolutional encoder, written as a
// four-state Mealy finite state machine.
//
// Each accepted input bit x moves the machine along one trellis branch:
// the next state is {x, s1} and the two code bits are
//   out_symbol[0] = G1(x, state) with G1 = 1 + x^2
//   out_symbol[1] = G2(x, state) with G2 = 1 + x + x^2
// Both the state and the output symbol are registered on the rising clock
// edge, so a symbol appears one clock after its input bit is sampled and there
// is no combinational path from x to out_symbol.
//
// Interface: clock, x and out_symbol follow the published design. rst (a
// synchronous, active-high return to state 00 that also clears out_symbol)
// and en (clock enable: x is taken only on cycles with en = 1) are this
// design's additions; tie en high for one input bit per clock. state_o shows
// the current FSM state, for trellis termination checks.
// The generators, the four-state FSM form and the registered 2-bit output are
// from the published design; the order of the bits inside out_symbol was
// read from its behavioural waveform (input 0,1,0,1 gives 00,11,10,00).
module conv_enc_r12
  import conv_enc_pkg::*;
#(
  parameter logic [K-1:0] G1 = POLY_1_X2,    // code bit 0
  parameter logic [K-1:0] G2 = POLY_1_X_X2   // code bit 1
) (
  input  logic       clock,
  input  logic       rst,
  input  logic       en,
  input  logic       x,
  output logic [1:0] out_symbol,
  output enc_state_t state_o
);

  enc_state_t state_q, state_d;
  logic [1:0] symbol_d;

  // Next-state logic: the trellis of the encoder.
  always_comb begin
    unique case (state_q)
      S00:     state_d = x ? S10 : S00;
      S01:     state_d = x ? S10 : S00;
      S10:     state_d = x ? S11 : S01;
      S11:     state_d = x ? S11 : S01;
      default: state_d = S00;
    endcase
  end

  // Mealy output: depends on the present state and the present input.
  always_comb begin
    symbol_d[0] = code_bit(G1, x, state_q);
    symbol_d[1] = code_bit(G2, x, state_q);
  end

  always_ff @(posedge clock) begin
    if (rst) begin
      state_q    <= S00;
      out_symbol <= '0;
    end else if (en) begin
      state_q    <= state_d;
      out_symbol <= symbol_d;
    end
  end

  assign state_o = state_q;

endmodule
