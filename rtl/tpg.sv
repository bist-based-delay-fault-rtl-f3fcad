// Test-pattern generator (TPG) of the delay-fault BIST.
//
// A STAGES-long shift register, cleared by the global reset and clocked by the
// slow on-chip oscillator, shifts in a constant 1. Its last stage drives the
// common input of all paths under test, so exactly one transition is launched,
// STAGES clock cycles after the reset is released; the delay lets the device
// settle after configuration. The two flip-flops, the tied-high input and the
// clear on global reset follow the published Spartan implementation.
//
// For the 1/0 test the launched value is inverted by 'falling' (a static
// configuration input, held while gsr is high), so the paths rest at 1 and
// fall. This inversion is this design's choice: the source only states that
// the TPG must produce both transitions.
//
// An assertion checks that a launched transition is never taken back before
// the next reset.
//
// Timing: launch = falling while gsr is high and for STAGES-1 rising clk edges
// after its release; it changes on the STAGES-th edge and then holds.
`timescale 1ps/1ps
module tpg #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,      // slow internal oscillator (8 MHz in the Spartan example)
  input  logic gsr,      // global reset, active high, asynchronous
  input  logic falling,  // 0: launch a 0/1 transition, 1: launch a 1/0 transition
  output logic launch    // common input of the paths under test
);

  logic [STAGES-1:0] sr;

  always_ff @(posedge clk or posedge gsr) begin
    if (gsr) sr <= '0;
    else     sr <= (sr << 1) | STAGES'(1);
  end

  assign launch = sr[STAGES-1] ^ falling;

  // One transition per BIST sequence: once launched, the output holds until
  // the next global reset.
  a_single_launch: assert property (
    @(posedge clk) disable iff (gsr) (launch != falling) |=> (launch != falling)
  ) else $error("tpg: launch returned to its rest value without a reset");

endmodule
