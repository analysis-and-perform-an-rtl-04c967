// Rate 1/3, constraint length 3 convolutional encoder built from a two-stage
// shift register and three XOR networks.
//
// On every rising clock edge the input bit inp shifts into the first delay
// stage and the first stage moves into the second. The three code bits are
// formed combinationally from inp and the two stored bits:
//   outpp[0] = G1 = 1 + x + x^2   (inp ^ s1 ^ s2)
//   outpp[1] = G2 = 1 + x + x^2   (inp ^ s1 ^ s2)
//   outpp[2] = G3 = 1 + x^2       (inp ^ s2)
// so outpp belongs to the input bit present in the current clock cycle and
// changes as soon as inp does (a Mealy machine with a combinational path).
//
// Interface: clk, res, inp and outpp[2:0] follow the published design; res is
// a synchronous, active-high clear of both delay stages, as the published
// schematic builds the stages from flip-flops with synchronous reset.
// state_o ({s1, s2}) is this design's addition, for trellis termination
// checks. The generators and the bit order of outpp follow the published
// generator list and block diagram (Y(0), Y(1), Y(2)).
module conv_enc_r13
  import conv_enc_pkg::*;
#(
  parameter logic [K-1:0] G1 = POLY_1_X_X2,  // outpp[0]
  parameter logic [K-1:0] G2 = POLY_1_X_X2,  // outpp[1]
  parameter logic [K-1:0] G3 = POLY_1_X2     // outpp[2]
) (
  input  logic       clk,
  input  logic       res,
  input  logic       inp,
  output logic [2:0] outpp,
  output enc_state_t state_o
);

  logic [MEM-1:0] sr_q;  // {s1, s2}

  always_ff @(posedge clk) begin
    if (res) sr_q <= '0;
    else     sr_q <= {inp, sr_q[1]};
  end

  always_comb begin
    outpp[0] = code_bit(G1, inp, sr_q);
    outpp[1] = code_bit(G2, inp, sr_q);
    outpp[2] = code_bit(G3, inp, sr_q);
  end

  assign state_o = enc_state_t'(sr_q);

endmodule
