// vla2_counter: the 12-stage binary counter of the VLA-2 integrator.
//
// The count is the number of falling (negative) edges seen on clk_n since the
// last clear, modulo 2**WIDTH: with WIDTH = 12 it overflows at 4096. clear is
// level-sensitive and asynchronous: while it is high the counter is held at
// zero. The chip builds this as a ripple counter; this model is a synchronous
// counter on the falling edge, which holds the same value once the ripple
// has settled (the ripple delay itself is not modelled). count[WIDTH-1] is
// the counter output pin and falls at each overflow, which lets a further
// counter be cascaded behind it.
module vla2_counter #(
  parameter int unsigned WIDTH = vla_pkg::VLA2_BITS
) (
  input  logic             clk_n,
  input  logic             clear,
  output logic [WIDTH-1:0] count
);

  always_ff @(negedge clk_n or posedge clear) begin
    if (clear) count <= '0;
    else       count <= count + 1'b1;
  end

endmodule
