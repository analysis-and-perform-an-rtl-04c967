// SEL A/B output multiplexer of the rate 1/2 encoder: sends the two code bits
// of each symbol one after the other on a single line, so the serial output
// runs at twice the input bit rate (n = 2k symbols/s for k bits/s).
//
// A one-bit phase register alternates between phase A and phase B on every
// clock of the serial-rate clock. In phase A serial_o carries sym_i[0], in
// phase B sym_i[1]. advance_o is high in phase B: it is the clock enable for
// the encoder, which then loads its next symbol at the end of phase B, so each
// symbol is held for exactly one A and one B cycle. sel_o shows the phase
// (0 = A, 1 = B) so a receiver can find symbol boundaries.
//
// An assertion checks that advance_o is never high on two clocks in a row.
// Timing: serial_o is combinational from sym_i and the phase register; rst is
// synchronous and active high and restarts in phase A. The multiplexing and
// the doubled output rate follow the published block diagram; the single
// clock with an enable (instead of two clocks), the A-first order and the
// choice of sym_i[0] as A are this design's own.
module sel_ab_serializer (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] sym_i,
  output logic       serial_o,
  output logic       sel_o,
  output logic       advance_o
);

  typedef enum logic {PHASE_A = 1'b0, PHASE_B = 1'b1} phase_t;

  phase_t phase_q;

  always_ff @(posedge clk) begin
    if (rst) phase_q <= PHASE_A;
    else     phase_q <= (phase_q == PHASE_A) ? PHASE_B : PHASE_A;
  end

  assign serial_o  = (phase_q == PHASE_A) ? sym_i[0] : sym_i[1];
  assign sel_o     = (phase_q == PHASE_B);
  assign advance_o = (phase_q == PHASE_B);

  // The encoder may be advanced at most once every two clocks.
  a_one_symbol_per_two_clocks: assert property (
    @(posedge clk) disable iff (rst) advance_o |=> !advance_o
  );

endmodule
