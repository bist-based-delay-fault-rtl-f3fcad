// One programmable logic block (PLB) as configured on a path under test.
//
// The PLB model has the parts of a typical PLB: a K-input look-up table
// (contents lut_init, address in[K-1:0] with in[K-1] the most significant
// bit), a storage element configured as a level-sensitive latch, and an
// output multiplexer. For delay testing the whole PLB is made an identity
// function: the same transition is applied to every LUT input and the LUT
// holds AND (0/1 test) or OR (1/0 test), so its output switches after the
// slowest input; the latch gate is held at its active value so the latch is
// transparent and acts as a buffer. bypass_lut feeds the latch straight from
// in[0] and use_latch = 0 takes the LUT output past the latch; these select
// the other PLB paths, which the source tests with similar configurations.
//
// The latch is intended: it is the PLB element under test, always transparent
// while latch_g is 1. Combinational from in to out when latch_g is 1.
`timescale 1ps/1ps
module plb_put_stage #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0]      in,
  input  logic [2**K-1:0]   lut_init,   // LUT contents (configuration)
  input  logic              latch_g,    // latch gate, held at 1 on a PUT
  input  logic              bypass_lut, // latch D from in[0] instead of the LUT
  input  logic              use_latch,  // output from the latch (1) or the LUT (0)
  output logic              out
);

  logic lut_out;
  logic d;
  logic q;

  assign lut_out = lut_init[in];
  assign d       = bypass_lut ? in[0] : lut_out;

  always_latch begin
    if (latch_g) q = d;
  end

  assign out = use_latch ? q : lut_out;

endmodule
