// End-to-end testbench for conv_encoder_top: both encoder systems run at the
// same time on one clock, with the top's default (and only) configuration.
//
// Rate 1/2 path: frames of 6 to 40 random bits, each closed by the two-zero
// tail that returns the trellis to state 00, are fed one bit per r12_take
// request. The serial output is collected in phase order (bit 0 of a symbol,
// then bit 1) and compared, frame by frame, with a stream computed
// independently from the generator equations (G1 = x ^ d2, G2 = x ^ d1 ^ d2).
// The collected length must be exactly twice the frame length (the serial
// output runs at twice the bit rate), the first code bit of a frame must
// appear in the clock after its input bit is taken, and the state must be 00
// after every tail. Every third frame is followed by a reset.
//
// Rate 1/3 path: random bits every clock with occasional synchronous resets
// and periodic two-zero tails; outpp is checked combinationally against
// inp ^ d1 ^ d2 (bits 0 and 1) and inp ^ d2 (bit 2).
//
// The test counts how often each mechanism happened (symbols, A and B serial
// bits, resets, tails, and all eight trellis branches of each encoder) and
// counts a failure for any that never did.
module tb_conv_encoder_top;
  import conv_enc_pkg::*;

  localparam int R12_FRAMES  = 60;
  localparam int R13_CYCLES  = 3000;

  logic       clk = 1'b0;
  logic       r12_rst, r12_x, r12_take, r12_serial, r12_sel;
  logic [1:0] r12_symbol;
  enc_state_t r12_state, r13_state;
  logic       r13_res, r13_inp;
  logic [2:0] r13_outpp;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_r12_symbols = 0, n_sel_a = 0, n_sel_b = 0, n_r12_tails = 0, n_r12_resets = 0;
  int n_r13_words = 0, n_r13_resets = 0, n_r13_tails = 0;
  int r12_branch[8];
  int r13_branch[8];

  conv_encoder_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  // Reference: serial stream of a frame starting in state 00.
  function automatic void ref_stream(input logic bits[$], output logic out[$]);
    logic d1 = 1'b0, d2 = 1'b0;
    out = {};
    foreach (bits[i]) begin
      out.push_back(bits[i] ^ d2);          // G1 = 1 + x^2
      out.push_back(bits[i] ^ d1 ^ d2);     // G2 = 1 + x + x^2
      d2 = d1;
      d1 = bits[i];
    end
  endfunction

  // ---------------------------------------------------------------- rate 1/2
  task automatic run_r12();
    logic bits[$], want[$], got[$];
    int   len, idx, loaded, take_cycle;
    logic was_take;
    r12_rst = 1'b1; r12_x = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    r12_rst = 1'b0;
    for (int f = 0; f < R12_FRAMES; f++) begin
      bits = {};
      len  = 6 + ($urandom % 35);
      for (int i = 0; i < len; i++) bits.push_back(1'($urandom));
      bits.push_back(1'b0);
      bits.push_back(1'b0);
      ref_stream(bits, want);
      got = {}; idx = 0; loaded = 0; take_cycle = -1;
      // Feed bits on take requests; collect two serial bits per symbol.
      for (int cyc = 0; got.size() < want.size(); cyc++) begin
        if (cyc > 4 * want.size() + 8) begin
          fail("r12 frame did not complete");
          break;
        end
        // falling edge: present the next bit if it will be taken
        if (r12_take && idx < bits.size()) begin
          r12_x = bits[idx];
          r12_branch[{2'(r12_state), bits[idx]}]++;
          idx++;
          if (take_cycle < 0) take_cycle = cyc;
        end else begin
          r12_x = 1'($urandom);  // not sampled
        end
        was_take = r12_take && (idx <= bits.size()) && (loaded < idx);
        @(posedge clk);
        #1;
        if (was_take) begin
          loaded++;
          n_r12_symbols++;
        end
        if (loaded > 0) begin
          if (!r12_sel) begin
            if (got.size() == 0) begin
              checks++;
              if (cyc != take_cycle) fail("r12 first code bit latency");
            end
            got.push_back(r12_serial);
            n_sel_a++;
          end else if (got.size() % 2 == 1) begin
            got.push_back(r12_serial);
            n_sel_b++;
          end
        end
        @(negedge clk);
      end
      checks++;
      if (got.size() != 2 * bits.size()) fail("r12 serial length");
      foreach (want[i]) begin
        checks++;
        if (i < got.size() && got[i] !== want[i]) begin
          failures++;
          $display("FAIL r12 frame %0d bit %0d: got %b want %b", f, i, got[i], want[i]);
        end
      end
      checks++;
      if (r12_state != S00) fail("r12 tail did not return to 00");
      else n_r12_tails++;
      if (f % 3 == 2) begin
        r12_rst = 1'b1;
        @(posedge clk);
        #1;
        checks++;
        if (r12_state != S00 || r12_symbol != 2'b00 || r12_sel != 1'b0) fail("r12 reset");
        n_r12_resets++;
        @(negedge clk);
        r12_rst = 1'b0;
      end
    end
  endtask

  // ---------------------------------------------------------------- rate 1/3
  task automatic run_r13();
    logic d1 = 1'b0, d2 = 1'b0;
    logic b, r;
    r13_res = 1'b1; r13_inp = 1'b0;
    @(posedge clk);
    @(negedge clk);
    for (int c = 0; c < R13_CYCLES; c++) begin
      // every 25th cycle ends a frame with a two-zero tail
      if (c % 25 == 23 || c % 25 == 24) b = 1'b0;
      else b = 1'($urandom);
      r = (c % 25 == 10) && ($urandom % 3 == 0);
      r13_inp = b;
      r13_res = r;
      #1;
      checks++;
      if (r13_outpp !== {b ^ d2, b ^ d1 ^ d2, b ^ d1 ^ d2}) begin
        failures++;
        $display("FAIL r13 outpp got %b at %0t", r13_outpp, $time);
      end
      n_r13_words++;
      if (!r) r13_branch[{d1, d2, b}]++;
      @(posedge clk);
      #1;
      if (r) begin
        d1 = 1'b0; d2 = 1'b0;
        n_r13_resets++;
      end else begin
        d2 = d1; d1 = b;
      end
      checks++;
      if (2'(r13_state) != {d1, d2}) fail("r13 state");
      if (c % 25 == 24) begin
        checks++;
        if (r13_state != S00) fail("r13 tail did not return to 00");
        else n_r13_tails++;
      end
      @(negedge clk);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-26s %0d", what, n);
    if (n == 0) fail({"mechanism never exercised: ", what});
  endtask

  initial begin
    r12_rst = 1'b1; r13_res = 1'b1; r12_x = 1'b0; r13_inp = 1'b0;
    foreach (r12_branch[i]) begin r12_branch[i] = 0; r13_branch[i] = 0; end
    @(negedge clk);
    fork
      run_r12();
      run_r13();
    join
    $display("mechanism counts:");
    need("r12 symbols", n_r12_symbols);
    need("r12 serial phase A bits", n_sel_a);
    need("r12 serial phase B bits", n_sel_b);
    need("r12 tails to state 00", n_r12_tails);
    need("r12 resets", n_r12_resets);
    need("r13 code words", n_r13_words);
    need("r13 resets", n_r13_resets);
    need("r13 tails to state 00", n_r13_tails);
    for (int i = 0; i < 8; i++) begin
      need($sformatf("r12 branch s=%b x=%b", i[2:1], i[0]), r12_branch[i]);
      need($sformatf("r13 branch s=%b x=%b", i[2:1], i[0]), r13_branch[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
