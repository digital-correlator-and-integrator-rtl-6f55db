// tb_vla1_corr_section: self-checking test of one VLA-1 correlator section.
//
// Random valid 3-level samples are applied every 10 ns clock (100 MHz). The
// bench keeps its own running sum of offset products, worked out from the
// signed sample values (product + 1), and checks after every clock that
// {qb,qa} equals that sum modulo 4. It also checks the asynchronous reset:
// outputs go low while the clock is idle, and counting resumes from zero.
// Each of the three increment cases (0, 1, 2) is counted and must occur.
`timescale 1ns/1ps
module tb_vla1_corr_section;
  import vla_pkg::*;

  logic        clk = 1'b0;
  logic        reset;
  tri_sample_t x, y;
  logic        qa, qb;
  int          checks = 0, failures = 0;
  int          sum;
  int          n_inc [3] = '{0, 0, 0};

  vla1_corr_section dut (.clk(clk), .reset(reset), .x(x), .y(y), .qa(qa), .qb(qb));

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

  task automatic check(string what, logic [1:0] got, int exp);
    checks++;
    if (got !== 2'(exp)) begin
      failures++;
      $display("FAIL %s: {qb,qa}=%0d expected %0d at %0t", what, got, exp % 4, $time);
    end
  endtask

  initial begin
    x = SAMPLE_POS; y = SAMPLE_NEG;
    reset = 1'b1;
    #12 reset = 1'b0;
    sum = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        x = rand_sample();
        y = rand_sample();
        @(posedge clk);
        sum += level(x) * level(y) + 1;
        n_inc[level(x) * level(y) + 1]++;
        #1 check("count", {qb, qa}, sum % 4);
      end
      // Asynchronous reset between clock edges.
      @(negedge clk);
      #1 reset = 1'b1;
      #1 check("reset", {qb, qa}, 0);
      @(posedge clk);
      #1 check("held in reset", {qb, qa}, 0);
      // Hold an anti-correlated pair (offset product 0) across the idle
      // clock edge between release and the next random sample.
      @(negedge clk);
      x = SAMPLE_POS;
      y = SAMPLE_NEG;
      reset = 1'b0;
      sum = 0;
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_inc[k] == 0) begin
        failures++;
        $display("FAIL increment %0d never exercised", k);
      end
    end
    $display("increments seen: +0=%0d +1=%0d +2=%0d", n_inc[0], n_inc[1], n_inc[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
