// vla1_corr_section: one section of the VLA-1 dual 3-level x 3-level
// digital correlator.
//
// Each rising clock edge the section adds the offset product of two 3-level
// samples x and y to a 2-stage binary counter made of two T flip-flops, QA
// (LSB) and QB (MSB):
//
//              y = 01   00   10
//     x = 01        2    1    0
//     x = 00        1    1    1
//     x = 10        0    1    2
//
// An increment of 1 toggles QA and, when QA was 1, carries into QB; an
// increment of 2 toggles QB alone. The toggle inputs are therefore
//   T_QA = NOR(+x,-x) | NOR(+y,-y)
//   T_QB = QA & T_QA | (+x & +y) | (-x & -y)
// which is the gate network of the chip specification. QB is the chip output:
// it falls once every four counts and so clocks the external integrating
// counter (the VLA-2) at a quarter of the accumulated sum.
//
// Interface: x, y are {+,-} wire pairs sampled on the rising edge of clk.
// reset is active high and asynchronous (it clears the outputs whatever the
// clock does). qa and qb change one clock after the samples are presented.
// Code 11 on an input is "don't care" in the specification; this RTL
// applies the same equations to it, and an assertion flags it in simulation.
module vla1_corr_section
  import vla_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  tri_sample_t x,
  input  tri_sample_t y,
  output logic        qa,
  output logic        qb
);

  logic t_qa, t_qb;

  always_comb begin
    t_qa = ~(x.pos | x.neg) | ~(y.pos | y.neg);
    t_qb = (qa & t_qa) | (x.pos & y.pos) | (x.neg & y.neg);
  end

  // The samplers never produce code 11; the chip leaves it undefined.
  a_valid_codes: assert property (@(posedge clk) disable iff (reset)
                                  !(x.pos && x.neg) && !(y.pos && y.neg))
    else $error("3-level input code 11 is not defined");

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      qa <= 1'b0;
      qb <= 1'b0;
    end else begin
      qa <= qa ^ t_qa;
      qb <= qb ^ t_qb;
    end
  end

endmodule
