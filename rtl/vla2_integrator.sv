// vla2_integrator: the VLA-2 chip, a 12-stage integrator with 12 bits of
// secondary storage.
//
// A 12-bit binary counter counts falling edges of counter_clk (in the
// correlator system, the output of one VLA-1 section). A 12-bit shift
// register can take a copy of the counter and send it out serially, most
// significant bit first, while the counter goes on integrating. Two AND gates
// decode the mode pin against the shift clock:
//   mode = 1, shift_clk = 1  -> parallel load of the register from the counter
//   mode = 1, shift_clk = 0  -> clear of the counter
//   mode = 0                 -> count, and shift on rising shift_clk edges
// A readout is therefore: raise shift_clk, raise mode (load), drop shift_clk
// (clear), drop mode; then WIDTH rising shift_clk edges bring the remaining
// bits to register_out. The whole load-and-clear sequence must fit in 600 ns
// after the last counter edge; the shift clock runs at up to 5 MHz and the
// counter clock at 50 MHz on the real part.
//
// Interface: all pins are TTL-level single bits. counter_out is the counter
// MSB, which falls at each overflow (every 4096 counts) and can clock a
// following VLA-2. serial_in enters the register LSB so that chips can share
// one serial line. The decode and the pin set follow the chip specification;
// the asynchronous, level-sensitive clear and load are this model's reading of
// it.
module vla2_integrator
  import vla_pkg::*;
#(
  parameter int unsigned WIDTH = VLA2_BITS
) (
  input  logic counter_clk,
  input  logic shift_clk,
  input  logic mode,
  input  logic serial_in,
  output logic register_out,
  output logic counter_out
);

  logic             load, clear;
  logic [WIDTH-1:0] count;

  always_comb begin
    load  = mode &  shift_clk;
    clear = mode & ~shift_clk;
  end

  vla2_counter #(.WIDTH(WIDTH)) u_counter (
    .clk_n(counter_clk),
    .clear(clear),
    .count(count)
  );

  vla2_shift_register #(.WIDTH(WIDTH)) u_sreg (
    .shift_clk (shift_clk),
    .load      (load),
    .d         (count),
    .serial_in (serial_in),
    .serial_out(register_out)
  );

  assign counter_out = count[WIDTH-1];

endmodule
