// Output response analyzer (ORA) of the delay-fault BIST.
//
// The OR and NAND of all PUT outputs (ora_gates) open a window from the first
// to the last arriving transition. A NAND ring oscillator (ora_osc) runs only
// inside that window, and a counter (ora_counter) counts its pulses, so the
// final count is the spread D between the fastest and slowest path measured in
// oscillator periods. Both transition directions use the same circuit.
//
// A count of one can come from a partial pulse when the arrivals are almost
// simultaneous, so a path set is reported faulty only when the count reaches
// THRESHOLD (default 2). The source leaves the threshold to the tester that
// reads the count; this comparator is this design's addition for convenience.
// DIV_OSC = 1 inserts the optional divide-by-two toggle flip-flop in front of
// the counter.
//
// Timing: rst clears the counter; count is valid once the oscillator has
// stopped, one half period after the last arrival.
`timescale 1ps/1ps
module ora #(
  parameter int unsigned N         = 4,
  parameter int unsigned CNT_W     = 6,     // even: built from 2-bit slices
  parameter int unsigned HALF_PS   = 2058,
  parameter bit          DIV_OSC   = 1'b0,
  parameter int unsigned THRESHOLD = 2
) (
  input  logic [N-1:0]     put,
  input  logic             rst,
  output logic             first,
  output logic             last_n,
  output logic             osc,
  output logic [CNT_W-1:0] count,
  output logic             fault
);

  logic cnt_clk;

  ora_gates #(.N(N)) u_gates (.put(put), .first(first), .last_n(last_n));

  ora_osc #(.HALF_PS(HALF_PS)) u_osc (.first(first), .last_n(last_n), .osc(osc));

  if (DIV_OSC) begin : g_div
    osc_div2 u_div (.osc(osc), .rst(rst), .clk_out(cnt_clk));
  end else begin : g_nodiv
    assign cnt_clk = osc;
  end

  ora_counter #(.SLICES(CNT_W / 2)) u_cnt (.clk(cnt_clk), .rst(rst), .count(count));

  assign fault = (32'(count) >= THRESHOLD);

endmodule
