// Testbench for tpg: checks that the launch output holds its rest value
// during and right after global reset and switches exactly on the second
// rising clock edge after reset release, for both launch polarities, and
// that it then holds. Clock period 125 ns (8 MHz).
`timescale 1ps/1ps
module tb_tpg;
  logic clk = 1'b0, gsr = 1'b1, falling = 1'b0, launch;
  int checks = 0, failures = 0;

  tpg #(.STAGES(2)) dut (.clk(clk), .gsr(gsr), .falling(falling), .launch(launch));

  always #62500 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic run(input logic pol);
    gsr = 1'b1; falling = pol;
    repeat (2) @(posedge clk);
    #1000 check(launch, pol, "rest value in reset");
    @(negedge clk); gsr = 1'b0;
    @(posedge clk); #1000 check(launch, pol, "after 1st edge");
    @(posedge clk); #1000 check(launch, ~pol, "after 2nd edge");
    repeat (5) begin
      @(posedge clk); #1000 check(launch, ~pol, "holds");
    end
  endtask

  initial begin
    run(1'b0);
    run(1'b1);
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
