// Toggle flip-flop dividing the ORA oscillator by two.
//
// The source offers it as an option for a counter clock of near 50% duty
// cycle, at the cost of half the resolution; its own implementation found it
// unnecessary, so the ORA leaves it out unless DIV_OSC is set.
// clk_out is cleared by rst and toggles on every rising edge of osc, so it
// rises on the 1st, 3rd, 5th ... rising edge of osc.
`timescale 1ps/1ps
module osc_div2 (
  input  logic osc,
  input  logic rst,      // asynchronous, active high
  output logic clk_out
);

  always_ff @(posedge osc or posedge rst) begin
    if (rst) clk_out <= 1'b0;
    else     clk_out <= ~clk_out;
  end

endmodule
