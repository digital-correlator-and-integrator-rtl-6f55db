// tb_vla2_integrator: self-checking test of the VLA-2 integrator chip.
//
// Integration periods of random length (0 to 6000 counter-clock pulses at
// 50 MHz, so some periods overflow the 12-bit counter) alternate with
// readouts that follow the chip's timing diagram: shift clock high, mode high
// (parallel load), shift clock low (counter clear), mode low, all within
// 600 ns of the last counter edge. The loaded word must appear on the
// register output MSB first, one bit per rising shift-clock edge at 4 MHz,
// while the counter keeps counting new pulses; the bits fed to the serial
// input must follow the word. The counter output pin must fall once per
// overflow and whenever a count of 2048 or more is cleared. The bench's reference is simply the number of pulses it sent.
`timescale 1ns/1ps
module tb_vla2_integrator;

  localparam int unsigned W = 12;

  logic counter_clk = 1'b0;
  logic shift_clk   = 1'b0;
  logic mode        = 1'b0;
  logic serial_in   = 1'b0;
  logic register_out, counter_out;
  int   checks = 0, failures = 0;
  int   pulses;          // pulses sent since the last clear
  int   overflows_exp, clear_falls, msb_falls, readouts, shifted_while_counting;
  realtime t_last_edge;

  vla2_integrator dut (.counter_clk(counter_clk), .shift_clk(shift_clk), .mode(mode),
                       .serial_in(serial_in), .register_out(register_out),
                       .counter_out(counter_out));

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  always @(negedge counter_out) msb_falls++;

  // One 50 MHz counter-clock pulse; the count advances on the falling edge.
  task automatic count_pulse();
    #10 counter_clk = 1'b1;
    #10 counter_clk = 1'b0;
    pulses++;
    if (pulses % (1 << W) == 0) overflows_exp++;
    t_last_edge = $realtime;
  endtask

  task automatic load_and_clear(output logic [W-1:0] word);
    word = W'(pulses);
    #20 shift_clk = 1'b1;
    #50 mode = 1'b1;           // load: mode = 1, shift clock = 1
    #100 shift_clk = 1'b0;     // clear: mode = 1, shift clock = 0
    pulses = 0;
    if (word[W-1]) clear_falls++;   // clearing from >= 2048 also drops the MSB
    #100 mode = 1'b0;
    checks++;
    if ($realtime - t_last_edge >= 600.0) begin
      failures++;
      $display("FAIL load and clear took %0t ns", $realtime - t_last_edge);
    end
    readouts++;
  endtask

  initial begin
    logic [W-1:0] word, fill;
    int n;
    pulses = 0; overflows_exp = 0; clear_falls = 0; msb_falls = 0; readouts = 0;
    shifted_while_counting = 0;
    t_last_edge = 0;
    // Start from a cleared counter.
    #5 mode = 1'b1;
    #50 mode = 1'b0;
    pulses = 0;
    for (int t = 0; t < 30; t++) begin
      n = (t % 5 == 4) ? 4096 + $urandom_range(0, 2000) : $urandom_range(0, 3000);
      repeat (n) count_pulse();
      load_and_clear(word);
      fill = W'($urandom);
      check("MSB after load", register_out, word[W-1]);
      // Shift out at 4 MHz while the counter integrates the next period.
      fork
        begin
          for (int i = W - 1; i >= 0; i--) begin
            serial_in = fill[i];
            #125 shift_clk = 1'b1;
            #125 shift_clk = 1'b0;
            if (i > 0) check("word bit", register_out, word[i - 1]);
            else       check("first chained bit", register_out, fill[W - 1]);
          end
          for (int i = W - 2; i >= 0; i--) begin
            #125 shift_clk = 1'b1;
            #125 shift_clk = 1'b0;
            check("chained bits", register_out, fill[i]);
          end
        end
        begin
          repeat ($urandom_range(1, 200)) count_pulse();
          shifted_while_counting++;
        end
      join
    end
    checks++;
    if (msb_falls != overflows_exp + clear_falls || overflows_exp == 0) begin
      failures++;
      $display("FAIL counter output falls %0d, overflows %0d, clears from >= 2048 %0d",
               msb_falls, overflows_exp, clear_falls);
    end
    $display("readouts=%0d overflows=%0d counted during shift=%0d", readouts,
             overflows_exp, shifted_while_counting);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
