// Testbench for route_seg: a transition must appear at the output exactly
// DELAY_PS later, in both directions; a zero-delay segment is a wire.
`timescale 1ps/1ps
module tb_route_seg;
  logic a = 1'b0, y, y0;
  int checks = 0, failures = 0;

  route_seg #(.DELAY_PS(7000)) dut (.a(a), .y(y));
  route_seg #(.DELAY_PS(0))    dut0 (.a(a), .y(y0));

  task automatic step(input logic v);
    a = v;
    #1;
    checks++;
    if (y0 !== v) begin failures++; $display("FAIL wire"); end
    #(6998);
    checks++;
    if (y !== ~v) begin failures++; $display("FAIL early at 6999"); end
    #2;
    checks++;
    if (y !== v) begin failures++; $display("FAIL late at 7001"); end
    #10000;
  endtask

  initial begin
    #20000;
    step(1'b1);
    step(1'b0);
    step(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
