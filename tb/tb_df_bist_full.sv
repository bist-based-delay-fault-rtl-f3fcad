// Full-size testbench for df_bist_star with every parameter at its default
// (four PLB paths of four PLBs, 6-bit counter, 243 MHz oscillator): one
// complete BIST sequence for a 0/1 launch and one for a 1/0 launch on a
// fault-free path set. Checks the launch on the second 8 MHz clock edge after
// reset release, the arrival of all four paths 100 ns later (five routing
// stretches of 20 ns), a count of at most 1 and no fault flag.
`timescale 1ps/1ps
module tb_df_bist_full;
  logic clk = 1'b0, gsr = 1'b0, fall = 1'b0;
  logic launch, first, last_n, osc, fault;
  logic [3:0] put_end;
  logic [5:0] count;
  int checks = 0, failures = 0;
  longint t_launch, t_end, t_rel;

  always #62500 clk = ~clk;

  df_bist_star dut (.clk_tpg(clk), .gsr(gsr), .falling(fall), .put_launch(launch), .put_end(put_end),
                    .first(first), .last_n(last_n), .osc(osc), .count(count), .fault(fault));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input logic f);
    fall = f; gsr = 1'b1;
    repeat (3) @(posedge clk);
    #1000;
    chk(count == 6'd0 && launch == f && put_end == {4{f}}, "rest state");
    @(negedge clk) gsr = 1'b0;
    t_rel = $time;
    fork
      begin wait (launch == ~f); t_launch = $time; end
      begin wait (put_end == {4{~f}}); t_end = $time; end
    join
    #(50000);
    chk(t_launch - t_rel == 62500 + 125000, $sformatf("launch on the 2nd clock edge (%0d)", t_launch - t_rel));
    chk(t_end - t_launch == 100000, $sformatf("path delay %0d", t_end - t_launch));
    chk(count <= 6'd1, $sformatf("count %0d on equal paths", count));
    chk(!fault, "false fault");
    chk(osc == 1'b1, "oscillator stopped");
  endtask

  initial begin
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
