# Constraint-length-3 convolutional encoders, rate 1/2 and rate 1/3

A convolutional encoder protects a bit stream for a noisy channel by sending,
for every information bit, several code bits that each mix the current bit
with the bits before it. A Viterbi decoder at the receiver can then find the
most likely transmitted sequence. This RTL holds two small encoders of this
kind, both with constraint length 3 (the current bit plus two stored bits):

| system | code rate | generators (x^i = bit delayed by i clocks) | output |
|--------|-----------|--------------------------------------------|--------|
| `conv_enc_r12` + `sel_ab_serializer` | 1/2 | G1 = 1 + x^2, G2 = 1 + x + x^2 | registered 2-bit symbol, plus a serial stream at twice the bit rate |
| `conv_enc_r13` | 1/3 | G1 = G2 = 1 + x + x^2, G3 = 1 + x^2 | 3 bits, combinational from input and state |

`conv_encoder_top` places the two systems side by side on one clock. Each
has its own ports. They are two alternatives of one design idea: the rate 1/2
encoder spends less bandwidth, and the rate 1/3 encoder adds more redundancy.

## The state and the trellis

Both encoders have the same four states. A state is written `{s1, s2}`: `s1`
is the bit taken one clock ago and `s2` the bit taken two clocks ago
(`conv_enc_pkg::enc_state_t`, values `S00`…`S11`). Each input bit `x` moves
the encoder from `{s1, s2}` to `{x, s1}`, so a `1` entering state `00` leads
to `10`. This gives the four-state trellis: from every state there are two
branches, one per input value.

A generator is stored as a 3-bit vector whose bit *i* is the coefficient of
x^i. Bit 0 taps the current input, bit 1 taps `s1` and bit 2 taps `s2`. So
1 + x^2 is `3'b101` and 1 + x + x^2 is `3'b111`. The package function
`code_bit(g, x, s)` returns the XOR of the selected taps. Both encoders take
their generators as parameters with these defaults, so other constraint-3
codes can be tried without editing the logic.

**Trellis termination.** After a frame, two zero bits return either encoder
to state `00`, so the decoder knows the final state. No hardware inserts
these tail bits: the data source appends them. The testbenches do this after
every frame and check for state `00`. Both encoders bring their state out
(`state_o`) so the check can be made.

## Rate 1/2 encoder (`conv_enc_r12`)

This encoder is a four-state Mealy machine. The `case` statement on the
state is the trellis written out. The output depends on the present state
and the present input:

    out_symbol[0] = x ^ s2        (G1 = 1 + x^2)
    out_symbol[1] = x ^ s1 ^ s2   (G2 = 1 + x + x^2)

The symbol is **registered**. It is loaded on the same edge that moves the
state, so the symbol for the bit sampled at edge *n* is visible after edge
*n*, until the next enabled edge. No combinational path runs from `x` to
the outputs. From reset, the input 0, 1, 0, 1 gives the symbols 00, 11, 10,
00.

Ports: `clock`, `x`, `out_symbol[1:0]` form the basic interface. Three
signals were added:

- `rst`: synchronous and active high. It sets the state to `00` and clears
  the symbol.
- `en`: a clock enable. `x` is taken only on edges where `en` is high. Tie it
  high to take one bit per clock.
- `state_o`: the current state.

Four flip-flops hold the state and the symbol.

## Serial output (`sel_ab_serializer`) and its timing

A rate 1/2 code sends n = 2k code bits per second for k information bits
per second. The SEL A/B multiplexer sends the two bits of each symbol one
after the other on one wire. Here it runs on a single clock at the serial
rate:

- A one-bit phase register alternates A, B, A, B, … Reset starts it in A.
- In phase A, `serial_o = sym_i[0]` (G1). In phase B, `serial_o = sym_i[1]`
  (G2).
- `advance_o` is high in phase B. It drives the encoder's `en`, so the
  encoder loads its next symbol at the edge that ends phase B. Each symbol
  is therefore on the wire for exactly one A cycle and one B cycle.

In the top, this means the following:

    cycle     :  B(n-1)          A(n)            B(n)
    r12_take  :  1               0               1
    r12_x     :  bit n valid     -               bit n+1 valid
    r12_serial:  G2(bit n-1)     G1(bit n)       G2(bit n)

`r12_x` is sampled at the rising edge that ends a cycle with `r12_take`
high. The first code bit of an input bit appears in the very next cycle.
`r12_sel` marks the phase, so a receiver can find symbol boundaries.
`r12_symbol` carries the same symbols in parallel.

The multiplexer and the doubled rate are part of the design. These details
are this design's own choices:

- a single clock with an enable, rather than separate bit and symbol clocks;
- G1 being sent first.

## Rate 1/3 encoder (`conv_enc_r13`)

This encoder is a two-stage shift register (`{s1, s2}`) and three XOR
networks:

    outpp[0] = inp ^ s1 ^ s2   (G1)
    outpp[1] = inp ^ s1 ^ s2   (G2)
    outpp[2] = inp ^ s2        (G3)

Unlike the rate 1/2 encoder, its outputs are **combinational**. `outpp`
follows `inp` within the same cycle, and the register shifts at the rising
edge. A user that needs registered code bits must register `outpp` outside.

Reset: `res` is synchronous and active high, and clears both stages. Port
names follow the reference schematic: `clk`, `res`, `inp`, `outpp`. The two
stages are the only flip-flops. G1 and G2 are identical, so `outpp[0]` and
`outpp[1]` always carry the same bit. That is the published code, and it is
kept as published.

## Top level (`conv_encoder_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | common clock; for the rate 1/2 system this is the serial clock |
| `r12_rst` | in | 1 | synchronous reset, rate 1/2 encoder and serialiser |
| `r12_x` | in | 1 | information bit, sampled when `r12_take` is high |
| `r12_take` | out | 1 | this cycle's closing edge samples `r12_x` |
| `r12_symbol` | out | 2 | parallel symbol {G2, G1} |
| `r12_serial` | out | 1 | serial code stream |
| `r12_sel` | out | 1 | serial phase, 0 = G1 bit, 1 = G2 bit |
| `r12_state` | out | 2 | rate 1/2 state |
| `r13_res` | in | 1 | synchronous reset, rate 1/3 encoder |
| `r13_inp` | in | 1 | information bit, one per clock |
| `r13_outpp` | out | 3 | code bits {G3, G2, G1}, combinational |
| `r13_state` | out | 2 | rate 1/3 state |

## Departures from the reference design and open points

These are this design's additions:

- the rate 1/2 reset and clock enable;
- the `state_o` ports;
- the single-clock serialiser.

Where the reference design could not be matched:

- The reference reports three flip-flops for the rate 1/3 encoder. This RTL
  has two, one per delay stage, because nothing describes a third.
- The bit order inside `out_symbol` (G1 in bit 0) comes from the reference
  simulation of the input 0, 1, 0, 1. The order of `outpp` follows the
  numbering of the generators.

The results reported for the FPGA implementation are not reproduced here.
They include clock rates of about 540 MHz (rate 1/2) and 650 MHz (rate 1/3)
on a Spartan-3E, plus resource and power figures. Both encoders have one
XOR level between the registers and the output.

A Viterbi decoder belongs with such an encoder, but it is not part of this
RTL.

## Files

- `rtl/conv_enc_pkg.sv`: constraint length, generator constants, state
  type, `code_bit`.
- `rtl/conv_enc_r12.sv`, `rtl/sel_ab_serializer.sv`, `rtl/conv_enc_r13.sv`:
  the blocks.
- `rtl/conv_encoder_top.sv`: both systems side by side.
- `tb/tb_*.sv`: one self-checking testbench per module. Each predicts
  outputs from a separate shift-register model with the XORs written out,
  and ends with a line `TB_RESULT checks=N failures=M`.

`tb_conv_encoder_top` runs both systems at once with the top's only
configuration:

- Rate 1/2: 60 frames of 6 to 40 random bits plus tails. The serial stream
  is compared bit by bit with a reference, along with its length (twice the
  frame) and the latency of the first code bit.
- Rate 1/3: 3000 cycles with random resets and tails.

It also counts how often each of these happened and fails if one never did:

- resets and tails;
- A and B serial bits;
- all eight trellis branches of each encoder.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl --top-module tb_conv_encoder_top \
        rtl/conv_enc_pkg.sv rtl/conv_enc_r12.sv rtl/conv_enc_r13.sv \
        rtl/sel_ab_serializer.sv rtl/conv_encoder_top.sv tb/tb_conv_encoder_top.sv
    ./obj_dir/Vtb_conv_encoder_top

Substitute `tb_conv_enc_r12`, `tb_conv_enc_r13` or `tb_sel_ab_serializer`
to run one block's test. Each module needs only the package and its own
file. Every test ends in well under a second.
