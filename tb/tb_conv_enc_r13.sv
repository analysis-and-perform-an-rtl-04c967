// Self-checking testbench for conv_enc_r13, the rate 1/3 shift-register
// encoder.
//
// A reference model keeps the last two input bits (d1, d2) and computes the
// expected code bits with the generator equations written out as XORs:
// outpp[0] = outpp[1] = inp ^ d1 ^ d2 and outpp[2] = inp ^ d2. Because the
// encoder's outputs are combinational, every input value is checked in the
// same cycle it is applied, before the clock edge; the stored bits are checked
// after the edge. Random input bits, synchronous resets asserted mid-stream
// and a two-zero tail (which must return the register to 00) are covered.
module tb_conv_enc_r13;
  import conv_enc_pkg::*;

  logic       clk = 1'b0;
  logic       res, inp;
  logic [2:0] outpp;
  enc_state_t state_o;

  int checks = 0, failures = 0;
  logic d1 = 1'b0, d2 = 1'b0;

  conv_enc_r13 dut (.clk, .res, .inp, .outpp, .state_o);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [2:0] got, logic [2:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b at %0t", what, got, want, $time);
    end
  endtask

  task automatic step(logic bit_in, logic res_in);
    @(negedge clk);
    inp = bit_in;
    res = res_in;
    #1;
    check("outpp", outpp, {bit_in ^ d2, bit_in ^ d1 ^ d2, bit_in ^ d1 ^ d2});
    @(posedge clk);
    if (res_in) begin
      d1 = 1'b0; d2 = 1'b0;
    end else begin
      d2 = d1; d1 = bit_in;
    end
    #1;
    check("state", {1'b0, 2'(state_o)}, {1'b0, d1, d2});
  endtask

  initial begin
    res = 1'b1; inp = 1'b0;
    @(posedge clk);
    #1;
    step(1'b0, 1'b1);

    // Impulse response: a single 1 gives 111, 011, 111 (bit 2 first).
    step(1'b1, 1'b0);
    step(1'b0, 1'b0);
    step(1'b0, 1'b0);

    for (int i = 0; i < 500; i++)
      step(1'($urandom), ($urandom % 50) == 0);

    step(1'b1, 1'b0);
    step(1'b0, 1'b0);
    step(1'b0, 1'b0);
    checks++;
    if (state_o != S00) begin
      failures++;
      $display("FAIL tail did not return to S00");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
