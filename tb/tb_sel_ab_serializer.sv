// Self-checking testbench for sel_ab_serializer, the SEL A/B output
// multiplexer.
//
// A small symbol source in the testbench loads a new random 2-bit symbol
// whenever advance_o is high, as the encoder does. The test checks that the
// phase alternates A, B, A, B after reset, that serial_o carries bit 0 of the
// held symbol in phase A and bit 1 in phase B, that advance_o is high exactly
// in phase B (one request per two clocks, the doubled output rate), and that
// a reset in phase B restarts in phase A.
module tb_sel_ab_serializer;

  logic       clk = 1'b0;
  logic       rst;
  logic [1:0] sym_i;
  logic       serial_o, sel_o, advance_o;

  int checks = 0, failures = 0;
  logic exp_phase;
  int   advances = 0, cycles = 0;

  sel_ab_serializer dut (.clk, .rst, .sym_i, .serial_o, .sel_o, .advance_o);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b at %0t", what, got, want, $time);
    end
  endtask

  // Symbol source: a new symbol at every edge where advance_o is high.
  always_ff @(posedge clk) begin
    if (rst)            sym_i <= 2'($urandom);
    else if (advance_o) sym_i <= 2'($urandom);
  end

  initial begin
    rst = 1'b1;
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    exp_phase = 1'b0;
    for (int i = 0; i < 300; i++) begin
      #1;
      check("phase", sel_o, exp_phase);
      check("advance", advance_o, exp_phase);
      check("serial bit", serial_o, exp_phase ? sym_i[1] : sym_i[0]);
      if (advance_o) advances++;
      cycles++;
      @(negedge clk);
      if (i == 150) begin
        // reset while in phase B
        checks++;
        if (sel_o !== 1'b1) begin failures++; $display("FAIL expected phase B"); end
        rst = 1'b1;
        @(negedge clk);
        rst = 1'b0;
        exp_phase = 1'b0;
        advances = 0;
        cycles = 0;
      end else begin
        exp_phase = ~exp_phase;
      end
    end
    checks++;
    if (advances != cycles / 2) begin
      failures++;
      $display("FAIL rate: %0d requests in %0d cycles", advances, cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
