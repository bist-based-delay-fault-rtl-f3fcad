// Behavioural model of a stretch of programmable routing (not synthesizable).
//
// Between two PLBs a path under test runs through wire segments joined by
// configurable interconnect points (CIPs: pass transistors and buffered
// multiplexers set by configuration bits). Their only property that matters
// for delay testing is the propagation delay, so they are modelled as one
// delay of DELAY_PS picoseconds. A larger DELAY_PS on one path emulates a
// delay fault, the same way the source emulates faults by routing one path
// through extra segments. With DELAY_PS = 0 it is a plain wire.
`timescale 1ps/1ps
module route_seg #(
  parameter int unsigned DELAY_PS = 20000
) (
  input  logic a,
  output logic y
);

  if (DELAY_PS == 0) begin : g_wire
    assign y = a;
  end else begin : g_delay
    assign #(DELAY_PS) y = a;
  end

endmodule
