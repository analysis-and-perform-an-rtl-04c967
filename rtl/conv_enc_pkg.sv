// Shared definitions for the constraint-length-3 convolutional encoders.
//
// Both encoders keep the last two input bits. The encoder state is written
// {s1, s2}: s1 is the bit that entered one clock ago (first delay stage), s2
// the bit that entered two clocks ago (second delay stage). With this order a
// '1' entering state 00 leads to state 10, as in the four-state trellis
// (states 00, 01, 10, 11).
//
// A generator polynomial is held as a K-bit vector whose bit i is the
// coefficient of x^i: bit 0 taps the current input, bit 1 the first delay
// stage, bit 2 the second. So 1 + x^2 is 3'b101 and 1 + x + x^2 is 3'b111.
// Constraint length 3 and the generators are the design's published values;
// the bit-vector encoding is this design's own convention.
package conv_enc_pkg;

  // Constraint length: current input plus two memory stages.
  localparam int unsigned K   = 3;
  localparam int unsigned MEM = K - 1;

  // Generator polynomials, bit i = coefficient of x^i.
  localparam logic [K-1:0] POLY_1_X2     = 3'b101;  // 1 + x^2
  localparam logic [K-1:0] POLY_1_X_X2   = 3'b111;  // 1 + x + x^2

  // Encoder state {s1, s2}; the enum value equals the shift register contents.
  typedef enum logic [MEM-1:0] {
    S00 = 2'b00,
    S01 = 2'b01,
    S10 = 2'b10,
    S11 = 2'b11
  } enc_state_t;

  // One code bit: XOR of the taps that polynomial g selects from the current
  // input x and the two stored bits of state s.
  function automatic logic code_bit(logic [K-1:0] g, logic x, logic [MEM-1:0] s);
    logic [K-1:0] taps;
    taps = {s[0], s[1], x};  // {x^2 tap, x^1 tap, x^0 tap}
    return ^(g & taps);
  endfunction

endpackage
