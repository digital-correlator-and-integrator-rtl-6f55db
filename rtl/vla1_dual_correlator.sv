// vla1_dual_correlator: the VLA-1 chip, a dual 3-level x 3-level correlator.
//
// Two vla1_corr_section instances share the B input pair, the clock and the
// reset. Section 1 correlates A with B and its second counter stage QB is
// output 1; section 2 correlates B with C and its second stage QD is output 2.
// The first counter stages (QA, QC) stay inside the chip, so each output is
// bit 1 of the running sum of offset products: it completes one full cycle
// (one falling edge) every four counts.
//
// Interface: a, b, c are {+,-} sample pairs captured on the rising edge of
// clk (100 MHz in the target system); reset is active high and asynchronous.
// out1/out2 change one clock after the samples. On the real part the inputs
// are ECL and the outputs pass through ECL-to-TTL converters; those level
// translators carry no logic and are not modelled. The sharing of B and the
// B-with-C pairing of section 2 follow the chip specification.
module vla1_dual_correlator
  import vla_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  tri_sample_t a,
  input  tri_sample_t b,
  input  tri_sample_t c,
  output logic        out1,
  output logic        out2
);

  // QA and QC are internal counter stages with no pin of their own.
  logic unused_qa, unused_qc;

  vla1_corr_section u_sec1 (
    .clk  (clk),
    .reset(reset),
    .x    (a),
    .y    (b),
    .qa   (unused_qa),
    .qb   (out1)
  );

  vla1_corr_section u_sec2 (
    .clk  (clk),
    .reset(reset),
    .x    (b),
    .y    (c),
    .qa   (unused_qc),
    .qb   (out2)
  );

endmodule
