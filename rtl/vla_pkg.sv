// vla_pkg: types and constants shared by the VLA-1 correlator and VLA-2
// integrator models.
//
// A 3-level sample is carried on two wires, +X and -X:
//   {+X,-X} = 2'b10  sample above +v0     (+1)
//   {+X,-X} = 2'b01  sample below -v0     (-1)
//   {+X,-X} = 2'b00  sample inside +-v0   ( 0)
//   {+X,-X} = 2'b11  not a valid code
// The correlator adds the "offset product" (product + 1, so 0, 1 or 2) of two
// samples to an up-only counter. The encoding and the 12-bit integrator width
// follow the chip specifications; the struct form is this design's choice.
package vla_pkg;

  // One 3-level sample: pos is the +X wire, neg the -X wire.
  typedef struct packed {
    logic pos;
    logic neg;
  } tri_sample_t;

  localparam tri_sample_t SAMPLE_POS  = '{pos: 1'b1, neg: 1'b0};
  localparam tri_sample_t SAMPLE_NEG  = '{pos: 1'b0, neg: 1'b1};
  localparam tri_sample_t SAMPLE_ZERO = '{pos: 1'b0, neg: 1'b0};

  // Stages of the VLA-2 binary counter and of its shift register.
  localparam int unsigned VLA2_BITS = 12;


endpackage
