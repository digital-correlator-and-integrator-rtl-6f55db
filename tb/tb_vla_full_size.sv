// tb_vla_full_size: the correlator socket at its default size (one VLA-1,
// one 12-bit VLA-2 per channel) through complete integrations of 8192
// correlation products, the integration length the integrator is specified
// for, at the 100 MHz sample rate.
//
// Three integrations are run, each followed by a load/clear and a 24-bit
// serial readout (channel 2's word first, MSB first):
//   1. 8192 products of random, partly correlated samples;
//   2. 8191 products of fully correlated samples (+2 each): the largest sum
//      that still fits, 16382 = 4 * 4095 + 2, read back as 4095 with the
//      VLA-1 output high;
//   3. 8192 fully correlated products: the sum reaches 16384 = 2**14 and the
//      integrator wraps to 0, which marks the one input for which 8192
//      products do not fit in 2 + 12 counter stages.
// The expected words are computed here from the signed sample values. Each
// integration must take exactly 8192 (8191) clocks, 81.92 us at 100 MHz.
`timescale 1ns/1ps
module tb_vla_full_size;
  import vla_pkg::*;

  localparam int unsigned W = VLA2_BITS;

  logic        clk = 1'b0;
  logic        reset = 1'b0;
  tri_sample_t a, b, c;
  logic        mode = 1'b0, shift_clk = 1'b0, serial_in = 1'b0;
  logic        serial_out;
  logic [1:0]  corr_out, counter_out;
  int          checks = 0, failures = 0;

  vla_correlator_top dut (
    .clk(clk), .reset(reset), .a(a), .b(b), .c(c), .mode(mode), .shift_clk(shift_clk),
    .serial_in(serial_in), .serial_out(serial_out), .corr_out(corr_out),
    .counter_out(counter_out));

  always #5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int level(tri_sample_t s);
    if (s == SAMPLE_POS) return 1;
    if (s == SAMPLE_NEG) return -1;
    return 0;
  endfunction

  function automatic tri_sample_t rand_sample();
    case ($urandom_range(2))
      0:       return SAMPLE_NEG;
      1:       return SAMPLE_ZERO;
      default: return SAMPLE_POS;
    endcase
  endfunction

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Clear the VLA-1 stages and the integrators, with idle samples.
  task automatic clear_all();
    a = SAMPLE_POS; b = SAMPLE_NEG; c = SAMPLE_POS;
    @(negedge clk);
    reset = 1'b1;
    mode = 1'b1;
    #100;
    reset = 1'b0;
    mode = 1'b0;
    @(negedge clk);
  endtask

  // Apply n products, then idle samples; return the two sums.
  task automatic integrate(int n, bit full_corr, output int s1, output int s2);
    realtime t0;
    s1 = 0; s2 = 0;
    t0 = $realtime;
    for (int i = 0; i < n; i++) begin
      if (full_corr) begin
        a = SAMPLE_POS; b = SAMPLE_POS; c = SAMPLE_NEG;   // A x B = +1, B x C = -1
        if (i % 2 == 1) begin a = SAMPLE_NEG; b = SAMPLE_NEG; c = SAMPLE_POS; end
      end else begin
        a = rand_sample();
        b = ($urandom_range(3) == 0) ? rand_sample() : a;
        c = ($urandom_range(3) == 0) ? rand_sample() : b;
      end
      s1 += level(a) * level(b) + 1;
      s2 += level(b) * level(c) + 1;
      @(negedge clk);
    end
    a = SAMPLE_POS; b = SAMPLE_NEG; c = SAMPLE_POS;
    checks++;
    if ($realtime - t0 != n * 10.0) begin
      failures++;
      $display("FAIL %0d products took %0t ns", n, $realtime - t0);
    end
  endtask

  task automatic read_words(output logic [W-1:0] w2, output logic [W-1:0] w1);
    logic [2*W-1:0] bits;
    #20 shift_clk = 1'b1;
    #50 mode = 1'b1;
    #100 shift_clk = 1'b0;
    #100 mode = 1'b0;
    bits[2*W-1] = serial_out;
    for (int j = 1; j < 2 * W; j++) begin
      #125 shift_clk = 1'b1;
      #125 shift_clk = 1'b0;
      bits[2*W-1-j] = serial_out;
    end
    w2 = bits[2*W-1:W];
    w1 = bits[W-1:0];
  endtask

  initial begin
    int s1, s2;
    logic [W-1:0] w1, w2;
    // 1: 8192 random products.
    clear_all();
    integrate(8192, 1'b0, s1, s2);
    #20;
    check("ch1 output bit", W'(corr_out[0]), W'(s1 / 2 % 2));
    check("ch2 output bit", W'(corr_out[1]), W'(s2 / 2 % 2));
    read_words(w2, w1);
    check("ch1 word, 8192 random products", w1, W'(s1 / 4));
    check("ch2 word, 8192 random products", w2, W'(s2 / 4));
    $display("8192 random products: sums %0d %0d, words %0d %0d", s1, s2, w1, w2);
    // 2: 8191 fully correlated products, the largest sum that fits.
    clear_all();
    integrate(8191, 1'b1, s1, s2);
    #20;
    check("ch1 output bit at 16382", W'(corr_out[0]), W'(1));
    read_words(w2, w1);
    check("ch1 word, 8191 x (+2)", w1, W'(4095));
    check("ch2 word, 8191 x (0)", w2, W'(0));
    // 3: 8192 fully correlated products wrap the 14-bit count.
    clear_all();
    integrate(8192, 1'b1, s1, s2);
    #20;
    read_words(w2, w1);
    check("ch1 word, 8192 x (+2) wraps", w1, W'(0));
    check("ch1 sum", W'(s1 == 16384), W'(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
