// A PLB in adder mode: K-bit sum and carry-out of A, B and carry-in.
//
// Only the function matters for the carry-path tests: with A = all 0 the
// carry-out is the AND of carry-in and all B bits, with A = all 1 it is their
// OR, and with B = all 1 (or all 0) and a fixed carry-in it is the OR (or AND)
// of the A bits. The dedicated carry logic of a real device is modelled here
// by a plain adder. Combinational.
`timescale 1ps/1ps
module adder_plb #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic         cin,
  output logic [K-1:0] s,
  output logic         cout
);

  assign {cout, s} = (K+1)'(a) + (K+1)'(b) + (K+1)'(cin);

endmodule
