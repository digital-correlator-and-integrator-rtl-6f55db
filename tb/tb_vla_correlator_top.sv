// tb_vla_correlator_top: end-to-end test of one correlator socket, a VLA-1
// dual correlator feeding VLA-2 integrators.
//
// Two copies of the top run side by side on the same stimulus: dut with one
// VLA-2 per channel (the default) and dut2 with two cascaded VLA-2s per
// channel. 3-level samples A, B, C enter at 100 MHz, some periods random and
// some strongly correlated (B copied from A, C from B) so that the counters
// overflow. Integration periods end with a readout as the integrator spec
// prescribes: the samples are held at an anti-correlated pair (no count) while
// the registers are loaded and the counters cleared, within 600 ns; then the
// words are shifted out at 4 MHz while integration of the next period goes on.
//
// The reference is computed here from the signed sample values: running sums
// of offset products per section, bit 1 of each sum as the expected VLA-1
// output, and every 1 -> 0 step of that bit as one expected integrator count.
// Each readout is compared bit by bit with the count since the last clear
// (modulo 2**12 for dut, 2**24 for dut2), and the serial input is checked to
// come out after the words. A VLA-1 reset is applied in the middle of some
// periods. Each mechanism (increment 0, 1, 2, reset, integrator overflow,
// carry between cascaded integrators, load, clear, shifting during
// integration, serial pass-through) is counted and must occur at least once.
`timescale 1ns/1ps
module tb_vla_correlator_top;
  import vla_pkg::*;

  localparam int unsigned W = VLA2_BITS;

  logic        clk = 1'b0;
  logic        reset = 1'b0;
  tri_sample_t a, b, c;
  logic        mode = 1'b0, shift_clk = 1'b0, serial_in = 1'b0;
  logic        serial_out, serial_out2;
  logic [1:0]  corr_out, corr_out2, counter_out, counter_out2;

  int checks = 0, failures = 0;

  vla_correlator_top dut (
    .clk(clk), .reset(reset), .a(a), .b(b), .c(c), .mode(mode), .shift_clk(shift_clk),
    .serial_in(serial_in), .serial_out(serial_out), .corr_out(corr_out),
    .counter_out(counter_out));

  vla_correlator_top #(.CASCADE(2)) dut2 (
    .clk(clk), .reset(reset), .a(a), .b(b), .c(c), .mode(mode), .shift_clk(shift_clk),
    .serial_in(serial_in), .serial_out(serial_out2), .corr_out(corr_out2),
    .counter_out(counter_out2));

  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- reference
  longint sum   [2];   // running sum of offset products since VLA-1 reset
  longint falls [2];   // 1 -> 0 steps of bit 1 of the sum
  longint base  [2];   // falls at the last clear
  int n_inc [3] = '{0, 0, 0};
  int n_reset = 0, n_overflow = 0, n_carry = 0, n_load = 0, n_clear = 0;
  int n_shift_counting = 0, n_passthrough = 0;
  bit quiet = 1'b0, correlated = 1'b0, shifting = 1'b0;

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

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic add(int ch, int p);
    longint prev = sum[ch];
    sum[ch] += longint'(p);
    n_inc[p]++;
    if (prev[1] && !sum[ch][1]) begin
      falls[ch]++;
      if (((falls[ch] - base[ch]) % (1 << W)) == 0) n_overflow++;
      if (shifting) n_shift_counting++;
    end
  endtask

  // New samples on the falling clock edge, consumed on the rising edge.
  always @(negedge clk) begin
    if (quiet) begin
      a <= SAMPLE_POS; b <= SAMPLE_NEG; c <= SAMPLE_POS;
    end else if (correlated) begin
      tri_sample_t s;
      s = rand_sample();
      a <= s;
      b <= ($urandom_range(9) == 0) ? rand_sample() : s;
      c <= s;
    end else begin
      a <= rand_sample(); b <= rand_sample(); c <= rand_sample();
    end
  end

  always @(posedge clk) begin
    if (!reset) begin
      add(0, level(a) * level(b) + 1);
      add(1, level(b) * level(c) + 1);
    end
    #1;
    check("VLA-1 output 1", corr_out[0], sum[0][1]);
    check("VLA-1 output 2", corr_out[1], sum[1][1]);
    check("VLA-1 output 1 (cascaded copy)", corr_out2[0], sum[0][1]);
  end

  // ---------------------------------------------------------------- actions
  task automatic vla1_reset();
    @(negedge clk);
    #2 reset = 1'b1;
    for (int ch = 0; ch < 2; ch++) begin
      if (sum[ch][1]) falls[ch]++;   // the output falls, the integrator counts it
      sum[ch] = 0;
    end
    @(negedge clk);
    #2 reset = 1'b0;
    n_reset++;
  endtask

  // Load and clear with the correlator held idle, then shift everything out
  // (and the serial-input pattern after it) while integration continues.
  task automatic readout();
    logic [2*W-1:0]   exp1;
    logic [4*W-1:0]   exp2;
    logic [6*W-1:0]   fill;
    realtime t0;
    quiet = 1'b1;
    @(posedge clk);          // last possibly counting edge
    t0 = $realtime;
    #3;
    exp1 = {W'(falls[1] - base[1]), W'(falls[0] - base[0])};
    exp2 = {(2*W)'(falls[1] - base[1]), (2*W)'(falls[0] - base[0])};
    shift_clk = 1'b1;
    #40 mode = 1'b1;         // parallel load
    n_load++;
    #100 shift_clk = 1'b0;   // counter clear
    base[0] = falls[0];
    base[1] = falls[1];
    #100 mode = 1'b0;
    n_clear++;
    checks++;
    if ($realtime - t0 >= 600.0) begin
      failures++;
      $display("FAIL load and clear took %0t", $realtime - t0);
    end
    quiet = 1'b0;
    for (int i = 0; i < 6 * W; i++) fill[i] = 1'($urandom);
    check("first bit", serial_out, exp1[2*W-1]);
    check("first bit (cascaded)", serial_out2, exp2[4*W-1]);
    shifting = 1'b1;
    for (int j = 1; j <= 6 * W; j++) begin
      serial_in = fill[6*W-j];
      #125 shift_clk = 1'b1;
      #125 shift_clk = 1'b0;
      if (j < 2 * W) check("word bit", serial_out, exp1[2*W-1-j]);
      else begin
        check("pass-through bit", serial_out, fill[6*W-1-(j-2*W)]);
        n_passthrough++;
      end
      if (j < 4 * W) check("word bit (cascaded)", serial_out2, exp2[4*W-1-j]);
      else           check("pass-through bit (cascaded)", serial_out2, fill[6*W-1-(j-4*W)]);
    end
    shifting = 1'b0;
  endtask

  // Carries from the first to the second cascaded integrator of channel 1
  // (falls of the first chip's counter output outside a clear).
  always @(negedge dut2.g_chan[0].g_stage[0].u_vla2.counter_out) if (!mode) n_carry++;

  initial begin
    a = SAMPLE_POS; b = SAMPLE_NEG; c = SAMPLE_POS;
    sum = '{0, 0}; falls = '{0, 0}; base = '{0, 0};
    #2 reset = 1'b1;
    #10 reset = 1'b0;
    // Start every integrator from zero.
    quiet = 1'b1;
    @(posedge clk);
    #3 mode = 1'b1;
    #100 mode = 1'b0;
    base[0] = falls[0];
    base[1] = falls[1];
    quiet = 1'b0;
    for (int t = 0; t < 8; t++) begin
      correlated = (t % 3 == 1);
      repeat ($urandom_range(2000, 6000)) @(posedge clk);
      if (t % 4 == 2) vla1_reset();
      repeat ($urandom_range(2000, 12000)) @(posedge clk);
      readout();
    end
    // Mechanism coverage.
    begin
      static string names [10] = '{"increment 0", "increment 1", "increment 2", "VLA-1 reset",
                            "integrator overflow", "cascade carry", "load", "clear",
                            "counting while shifting", "serial pass-through"};
      int    counts [10];
      counts = '{n_inc[0], n_inc[1], n_inc[2], n_reset, n_overflow, n_carry,
                 n_load, n_clear, n_shift_counting, n_passthrough};
      for (int k = 0; k < 10; k++) begin
        $display("  %-24s %0d", names[k], counts[k]);
        checks++;
        if (counts[k] == 0) begin
          failures++;
          $display("FAIL mechanism never exercised: %s", names[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
