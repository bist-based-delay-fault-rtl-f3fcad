// Behavioural model of the ORA local oscillator (not synthesizable logic).
//
// In the FPGA this is one LUT programmed as a 3-input NAND of FIRST, LAST_N
// and its own output, a ring oscillator whose frequency is set by the LUT and
// routing delay. A gate delay of HALF_PS picoseconds stands for that loop
// delay: the default gives the 243 MHz measured on an ORCA 2C15A. The delay
// is a transport delay, so a window shorter than one half period still
// produces one (partial) pulse, as the source warns.
//
// Interface: osc rests at 1. While first & last_n is 1 it toggles every
// HALF_PS; after the window closes it returns to 1 within HALF_PS.
`timescale 1ps/1ps
module ora_osc #(
  parameter int unsigned HALF_PS = 2058
) (
  input  logic first,
  input  logic last_n,
  output logic osc
);

  initial osc = 1'b1;

  always @(first or last_n or osc) begin
    osc <= #(HALF_PS) ~(first & last_n & osc);
  end

endmodule
