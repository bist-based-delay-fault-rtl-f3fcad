// ORA counter: SLICES two-bit counter slices chained by carry.
//
// With the default three slices this is the 6-bit counter of the source,
// least significant slice first. All slices share the oscillator clock; the
// lowest slice always counts. The count wraps modulo 2^(2*SLICES); the source
// says nothing about overflow. Cleared asynchronously by rst, counts every
// rising edge of clk.
`timescale 1ps/1ps
module ora_counter #(
  parameter int unsigned SLICES = 3
) (
  input  logic                  clk,
  input  logic                  rst,
  output logic [2*SLICES-1:0]   count
);

  logic [SLICES:0] carry;
  assign carry[0] = 1'b1;

  for (genvar i = 0; i < SLICES; i++) begin : g_slice
    counter2 u_slice (
      .clk  (clk),
      .rst  (rst),
      .cin  (carry[i]),
      .q    (count[2*i +: 2]),
      .cout (carry[i+1])
    );
  end

endmodule
