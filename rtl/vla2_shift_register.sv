// vla2_shift_register: the 12-stage parallel-in serial-out register of the
// VLA-2 integrator ("secondary storage").
//
// While load is high the register takes the parallel word d (the counter
// state); load is level-sensitive and asynchronous. With load low, each rising
// edge of shift_clk shifts the register one place toward the MSB, taking
// serial_in into bit 0. serial_out is the MSB, so after a load the word
// appears most significant bit first: bit WIDTH-1 at once, then one lower bit
// after each rising edge, and after WIDTH edges the data that entered at
// serial_in, so several registers can be chained into one serial line.
//
// The specification loads the register "from a known state (all ones or all
// zeros)", which hints at a set-only or clear-only load in the silicon. This
// model writes every bit, which gives the same result from either known state.
//
// Timing note: written as a flip-flop with an asynchronous load, the register
// takes d when load rises. Synthesis maps this to a load that is transparent
// while load is high; the two agree as long as d is steady while load is
// high, which the chip's timing already asks for (the load follows the last
// counter edge and the counter is cleared before it counts again).
module vla2_shift_register #(
  parameter int unsigned WIDTH = vla_pkg::VLA2_BITS
) (
  input  logic             shift_clk,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  input  logic             serial_in,
  output logic             serial_out
);

  logic [WIDTH-1:0] sr;

  always_ff @(posedge shift_clk or posedge load) begin
    if (load) sr <= d;
    else      sr <= {sr[WIDTH-2:0], serial_in};
  end

  assign serial_out = sr[WIDTH-1];

endmodule
