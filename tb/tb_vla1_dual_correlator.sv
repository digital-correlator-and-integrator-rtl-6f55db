// tb_vla1_dual_correlator: self-checking test of the VLA-1 dual correlator.
//
// Random 3-level samples on A, B and C are clocked in at 100 MHz. The bench
// keeps two running sums of offset products, A x B and B x C, computed from
// the signed sample values, and checks after every clock that output 1 is
// bit 1 of the first sum and output 2 bit 1 of the second. A second phase
// holds A = B = C = +1 (increment 2 every clock): each output must then
// toggle on every clock, i.e. run as a 50 MHz square wave, which is the rate
// the following integrator chip is specified for; its falling edges are
// counted over 200 clocks.
`timescale 1ns/1ps
module tb_vla1_dual_correlator;
  import vla_pkg::*;

  logic        clk = 1'b0;
  logic        reset;
  tri_sample_t a, b, c;
  logic        out1, out2;
  int          checks = 0, failures = 0;
  int          s1, s2, falls1, falls2;

  vla1_dual_correlator dut (.clk(clk), .reset(reset), .a(a), .b(b), .c(c),
                            .out1(out1), .out2(out2));

  always #5 clk = ~clk;

  initial begin
    #100000;
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

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  always @(negedge out1) falls1++;
  always @(negedge out2) falls2++;

  initial begin
    a = SAMPLE_POS; b = SAMPLE_NEG; c = SAMPLE_POS;   // products 0, 0
    reset = 1'b1;
    #12 reset = 1'b0;
    s1 = 0; s2 = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      a = rand_sample();
      b = rand_sample();
      c = rand_sample();
      @(posedge clk);
      s1 += level(a) * level(b) + 1;
      s2 += level(b) * level(c) + 1;
      #1;
      check("out1", out1, s1[1]);
      check("out2", out2, s2[1]);
    end
    // Maximum rate: +2 every clock on both sections.
    @(negedge clk);
    a = SAMPLE_POS; b = SAMPLE_POS; c = SAMPLE_POS;
    @(posedge clk);
    #1;
    falls1 = 0; falls2 = 0;
    for (int i = 0; i < 200; i++) begin
      logic p1, p2;
      p1 = out1; p2 = out2;
      @(posedge clk);
      #1;
      check("out1 toggles each clock", out1, ~p1);
      check("out2 toggles each clock", out2, ~p2);
    end
    checks++;
    if (falls1 != 100 || falls2 != 100) begin
      failures++;
      $display("FAIL falling edges in 200 clocks: %0d %0d, expected 100", falls1, falls2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
