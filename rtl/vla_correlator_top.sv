// vla_correlator_top: one correlator socket of the VLA combined
// continuum/spectral-line correlator: a VLA-1 dual correlator chip feeding
// VLA-2 integrator chips.
//
// Three 3-level sample streams a, b, c enter the VLA-1 on the rising edge of
// clk. Section 1 forms A x B and section 2 forms B x C; each adds the offset
// product (0, 1 or 2) into its own 2-stage counter and puts the counter's MSB
// out as corr_out[0] / corr_out[1]. Each of those outputs clocks the 12-bit
// counter of a VLA-2 (falling edge, so the VLA-2 counts the sum divided by
// four). For integrations longer than one VLA-2 holds, CASCADE chips can be
// chained per channel, each counter MSB clocking the next counter.
//
// The accumulated sum of channel k is
//   S = 4 * (VLA-2 chain count) + 2 * corr_out[k] + QA
// where QA, the first stage, stays inside the VLA-1. One 12-bit VLA-2 with the
// two VLA-1 stages in front therefore holds sums below 2**14 = 16384, i.e. up
// to 8191 products of the maximum value 2 (8192 products average 8192 counts
// for uncorrelated signals).
//
// Readout: all VLA-2 registers form one serial chain. Chip i of the flat list
// (channel 1 stages 0..CASCADE-1, then channel 2 stages 0..CASCADE-1) takes
// its serial input from chip i-1, the first from serial_in; serial_out is the
// register of the last chip. After a load (mode=1, shift_clk=1) the first bit
// is on serial_out at once and every rising shift_clk edge brings the next:
// channel 2's most significant chip first, MSB first, then down the chain.
// Lowering shift_clk while mode is high clears all the counters; integration
// continues while the words are shifted out.
//
// The VLA-1/VLA-2 pairing and the chips' behaviour follow the chip
// specifications; the exact chaining of counters and of the serial line is
// this design's choice. reset clears only the VLA-1 stages, as on the chips.
module vla_correlator_top
  import vla_pkg::*;
#(
  parameter int unsigned CASCADE = 1
) (
  input  logic        clk,
  input  logic        reset,
  input  tri_sample_t a,
  input  tri_sample_t b,
  input  tri_sample_t c,
  input  logic        mode,
  input  logic        shift_clk,
  input  logic        serial_in,
  output logic        serial_out,
  output logic [1:0]  corr_out,
  output logic [1:0]  counter_out
);

  localparam int unsigned NCHIP = 2 * CASCADE;

  logic [NCHIP-1:0] cnt_clk;   // counter clock of each VLA-2
  logic [NCHIP-1:0] cnt_out;   // counter MSB of each VLA-2
  logic [NCHIP:0]   ser;       // serial chain: ser[i] into chip i

  vla1_dual_correlator u_vla1 (
    .clk  (clk),
    .reset(reset),
    .a    (a),
    .b    (b),
    .c    (c),
    .out1 (corr_out[0]),
    .out2 (corr_out[1])
  );

  assign ser[0] = serial_in;

  for (genvar ch = 0; ch < 2; ch++) begin : g_chan
    for (genvar st = 0; st < CASCADE; st++) begin : g_stage
      localparam int unsigned I = ch * CASCADE + st;

      if (st == 0) begin : g_first
        assign cnt_clk[I] = corr_out[ch];
      end else begin : g_next
        assign cnt_clk[I] = cnt_out[I-1];
      end

      vla2_integrator u_vla2 (
        .counter_clk (cnt_clk[I]),
        .shift_clk   (shift_clk),
        .mode        (mode),
        .serial_in   (ser[I]),
        .register_out(ser[I+1]),
        .counter_out (cnt_out[I])
      );
    end
    assign counter_out[ch] = cnt_out[ch*CASCADE + CASCADE - 1];
  end

  assign serial_out = ser[NCHIP];

endmodule
