// Self-checking testbench for conv_enc_r12, the rate 1/2 FSM encoder.
//
// A reference shift register (d1 = previous bit, d2 = the one before) and the
// generator equations written out as XORs (G1 = x ^ d2, G2 = x ^ d1 ^ d2)
// predict every symbol. The test first plays the input 0,1,0,1 after reset and
// expects the symbols 00, 11, 10, 00 one clock after each bit; then it runs
// random bits with a random clock enable (a held enable must freeze symbol
// and state), a mid-stream reset, and a two-zero tail that must bring the
// FSM back to state 00. Inputs change on the falling edge and outputs are
// checked just after the rising edge, so the one-clock latency is checked too.
module tb_conv_enc_r12;
  import conv_enc_pkg::*;

  logic       clock = 1'b0;
  logic       rst, en, x;
  logic [1:0] out_symbol;
  enc_state_t state_o;

  int checks = 0, failures = 0;
  logic d1 = 1'b0, d2 = 1'b0;
  logic [1:0] exp_sym = 2'b00;

  conv_enc_r12 dut (.clock, .rst, .en, .x, .out_symbol, .state_o);

  always #5 clock = ~clock;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [1:0] got, logic [1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b at %0t", what, got, want, $time);
    end
  endtask

  // Apply one input with the given enable over one clock, update the model
  // and check the outputs after the edge.
  task automatic step(logic bit_in, logic en_in);
    @(negedge clock);
    x  = bit_in;
    en = en_in;
    @(posedge clock);
    if (en_in) begin
      exp_sym = {bit_in ^ d1 ^ d2, bit_in ^ d2};
      d2 = d1;
      d1 = bit_in;
    end
    #1;
    check("out_symbol", out_symbol, exp_sym);
    check("state", 2'(state_o), {d1, d2});
  endtask

  task automatic do_reset();
    @(negedge clock);
    rst = 1'b1; en = 1'b1; x = 1'b1;
    @(posedge clock);
    #1;
    d1 = 1'b0; d2 = 1'b0; exp_sym = 2'b00;
    check("reset symbol", out_symbol, 2'b00);
    check("reset state", 2'(state_o), 2'b00);
    @(negedge clock);
    rst = 1'b0;
    en  = 1'b0;
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; x = 1'b0;
    do_reset();

    // Published behaviour: 0,1,0,1 -> 00,11,10,00.
    begin
      automatic logic [1:0] want[4] = '{2'b00, 2'b11, 2'b10, 2'b00};
      automatic logic       bits[4] = '{1'b0, 1'b1, 1'b0, 1'b1};
      for (int i = 0; i < 4; i++) begin
        step(bits[i], 1'b1);
        check("waveform sequence", out_symbol, want[i]);
      end
    end

    // Random stream with random enable.
    for (int i = 0; i < 400; i++) begin
      step(1'($urandom), ($urandom % 4) != 0);
      if (i == 200) do_reset();
    end

    // Tail: two zero bits force the trellis back to state 00.
    step(1'b1, 1'b1);
    step(1'b1, 1'b1);
    step(1'b0, 1'b1);
    step(1'b0, 1'b1);
    checks++;
    if (state_o != S00) begin
      failures++;
      $display("FAIL tail did not return to S00");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
