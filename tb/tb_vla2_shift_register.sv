// tb_vla2_shift_register: self-checking test of the VLA-2 parallel-in
// serial-out register.
//
// Random 12-bit words are loaded with an asynchronous load pulse, from an
// all-zeros or an all-ones register (the two "known states"), and from an
// arbitrary one. The MSB must be on serial_out as soon as the load is high;
// each of the next 11 rising shift-clock edges must bring the next lower bit,
// and further edges must bring the bits fed into serial_in, in order. The
// shift clock runs at 4 MHz (250 ns period) as in the chip's timing spec.
`timescale 1ns/1ps
module tb_vla2_shift_register;

  localparam int unsigned W = 12;

  logic         shift_clk = 1'b0;
  logic         load = 1'b0;
  logic [W-1:0] d;
  logic         serial_in = 1'b0;
  logic         serial_out;
  int           checks = 0, failures = 0;

  vla2_shift_register dut (.shift_clk(shift_clk), .load(load), .d(d),
                           .serial_in(serial_in), .serial_out(serial_out));

  initial begin
    #10000000;
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

  // One shift clock period: serial_in is set up on the low phase, the
  // register shifts on the rising edge.
  task automatic shift(logic din);
    serial_in = din;
    #125 shift_clk = 1'b1;
    #125 shift_clk = 1'b0;
  endtask

  task automatic load_word(logic [W-1:0] w);
    d = w;
    #10 load = 1'b1;
    #20 load = 1'b0;
    #10;
  endtask

  initial begin
    logic [W-1:0] word, fill;
    for (int t = 0; t < 60; t++) begin
      // Bring the register to a known state (all zeros / all ones) or leave
      // it as the last test left it.
      case (t % 3)
        0: repeat (W) shift(1'b0);
        1: repeat (W) shift(1'b1);
        default: ;
      endcase
      word = W'($urandom);
      fill = W'($urandom);
      load_word(word);
      check("MSB after load", serial_out, word[W-1]);
      for (int i = W - 2; i >= 0; i--) begin
        shift(fill[i + 1]);
        check("bit of loaded word", serial_out, word[i]);
      end
      shift(fill[0]);
      // The bits entered during the readout now follow, first in first out.
      for (int i = W - 1; i >= 0; i--) begin
        check("chained serial data", serial_out, fill[i]);
        shift(1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
