// Two-bit counter slice with carry, the contents of one PLB of the ORA counter.
//
// The source builds its 6-bit ORA counter from three PLBs, each a 2-bit
// counter with carry-in and carry-out, all clocked by the oscillator. The
// slice counts up on a rising clk edge when cin is 1; cout = cin & (q == 3)
// enables the next slice, so the slices form one synchronous counter. The
// rising clock edge and the asynchronous clear are this design's choice.
`timescale 1ps/1ps
module counter2 (
  input  logic       clk,
  input  logic       rst,   // asynchronous clear, active high
  input  logic       cin,   // count enable from the slice below
  output logic [1:0] q,
  output logic       cout   // count enable for the slice above
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      q <= 2'd0;
    else if (cin) q <= q + 2'd1;
  end

  assign cout = cin & (&q);

endmodule
