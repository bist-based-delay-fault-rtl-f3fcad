// Comparison gates of the output response analyzer (ORA).
//
// FIRST is the OR of all PUT outputs and LAST_N the NAND of all PUT outputs.
// For a 0/1 launch FIRST rises with the fastest path and LAST_N falls with the
// slowest one; for a 1/0 launch LAST_N rises with the fastest and FIRST falls
// with the slowest. In both cases FIRST & LAST_N is high exactly between the
// first and the last arrival, which is the window in which the oscillator
// runs. The OR and NAND follow the source (one LUT each in the Spartan
// implementation). Purely combinational.
`timescale 1ps/1ps
module ora_gates #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] put,     // outputs of the paths under test
  output logic         first,   // OR of all paths
  output logic         last_n   // NAND of all paths
);

  assign first  = |put;
  assign last_n = ~&put;

endmodule
