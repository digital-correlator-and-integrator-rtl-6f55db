// tb_vla2_counter: self-checking test of the VLA-2 12-stage binary counter.
//
// The counter clock is pulsed at 50 MHz (20 ns period). After each rising
// edge the count must not have moved; after each falling edge it must be one
// more, modulo 4096. The bench runs past the 4096 overflow and checks that
// the MSB falls there, and pulses the asynchronous clear at random points,
// including while the clock is idle, checking that the count is zero at once
// and that counting restarts from zero.
`timescale 1ns/1ps
module tb_vla2_counter;

  localparam int unsigned W = 12;

  logic         clk_n = 1'b0;
  logic         clear = 1'b0;
  logic [W-1:0] count;
  int           checks = 0, failures = 0;
  int           expected, overflows, msb_falls;

  vla2_counter dut (.clk_n(clk_n), .clear(clear), .count(count));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, int exp);
    checks++;
    if (got !== W'(exp)) begin
      failures++;
      $display("FAIL %s: count=%0d expected %0d at %0t", what, got, exp % (1 << W), $time);
    end
  endtask

  always @(negedge count[W-1]) msb_falls++;

  task automatic pulse();
    #10 clk_n = 1'b1;
    #1 check("no count on rising edge", count, expected);
    #9 clk_n = 1'b0;
    expected = (expected + 1) % (1 << W);
    if (expected == 0) overflows++;
    #1 check("count on falling edge", count, expected);
  endtask

  initial begin
    #1 clear = 1'b1;
    #4 clear = 1'b0;
    expected = 0; overflows = 0; msb_falls = 0;
    check("after clear", count, 0);
    // Run through one overflow and a bit beyond.
    repeat ((1 << W) + 100) pulse();
    checks++;
    if (overflows != 1 || msb_falls != 1) begin
      failures++;
      $display("FAIL overflow: %0d overflows, %0d MSB falls", overflows, msb_falls);
    end
    // Random clears between short bursts.
    for (int k = 0; k < 20; k++) begin
      repeat ($urandom_range(1, 300)) pulse();
      #3 clear = 1'b1;
      #1 check("async clear", count, 0);
      #4 clear = 1'b0;
      expected = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
