// Testbench for lut_put_chain.
// K = 2, two groups: the target sequence must be 11, 01, 10, 00; after a 0/1
// launch the four columns of each group must settle to (row 0, row 1) =
// (0,1), (1,0), (0,0), (1,1), each LUT output switching exactly once, and
// the bundle output must arrive exactly 8 segment delays after the launch.
// A late row delays every output of the bundle by the same amount. The 1/0
// launch mirrors all of this. K = 4: one group of 16 columns, every output
// switches once and arrives 16 segment delays after the launch.
`timescale 1ps/1ps
module tb_lut_put_chain;
  localparam int SEG = 1000;
  logic [1:0] in2;
  logic [3:0] in4;
  logic [3:0][1:0]  tgt2;
  logic [15:0][3:0] tgt4;
  logic [1:0] out2;
  logic [3:0] out4;
  logic fall;
  int checks = 0, failures = 0;
  int edges2 [8][2];
  int edges4 [4];
  longint t_out2, t_out4;

  lut_put_chain #(.K(2), .N_GROUPS(2), .SEG_DELAY_PS(SEG)) dut2 (.in(in2), .target(tgt2), .out(out2));
  lut_put_chain #(.K(4), .N_GROUPS(1), .SEG_DELAY_PS(SEG)) dut4 (.in(in4), .target(tgt4), .out(out4));

  for (genvar j = 0; j < 8; j++) begin : g_mon
    for (genvar r = 0; r < 2; r++) begin : g_r
      always @(dut2.y[j][r]) edges2[j][r]++;
    end
  end
  for (genvar r = 0; r < 4; r++) begin : g_mon4
    always @(out4[r]) edges4[r]++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input logic f, input int late);
    longint t0;
    logic [1:0] fin [4];
    fall = f;
    for (int j = 0; j < 4; j++) tgt2[j] = 2'(df_pkg::lut_test_target(4'(j), 2, f));
    for (int j = 0; j < 16; j++) tgt4[j] = df_pkg::lut_test_target(4'(j), 4, f);
    in2 = {2{f}}; in4 = {4{f}};
    #(100*SEG);
    foreach (edges2[j, r]) edges2[j][r] = 0;
    foreach (edges4[r]) edges4[r] = 0;
    // expected settled values of the four columns, row 0 first
    fin = '{2'b01, 2'b10, 2'b00, 2'b11};
    t0 = $time;
    fork
      begin in2 = {f, ~f}; in4 = {4{~f}}; if (late > 0) #(late); in2 = {2{~f}}; end
      begin wait (out2 == {2{~f}}); t_out2 = $time; end
      begin wait (out4 == {4{~f}}); t_out4 = $time; end
    join
    #(100*SEG);
    chk(out2 == {2{~f}}, "K=2 final value");
    chk(out4 == {4{~f}}, "K=4 final value");
    chk(t_out2 - t0 == 8*SEG + late, $sformatf("K=2 arrival %0d", t_out2 - t0));
    chk(t_out4 - t0 == 16*SEG, $sformatf("K=4 arrival %0d", t_out4 - t0));
    for (int j = 0; j < 8; j++) begin
      chk({dut2.y[j][0], dut2.y[j][1]} == (fin[j % 4] ^ {2{f}}), $sformatf("K=2 column %0d value", j));
      for (int r = 0; r < 2; r++) chk(edges2[j][r] == 1, $sformatf("K=2 column %0d row %0d edges %0d", j, r, edges2[j][r]));
    end
    for (int r = 0; r < 4; r++) chk(edges4[r] == 1, "K=4 one edge per row");
  endtask

  initial begin
    chk(df_pkg::lut_test_target(4'd0, 2, 1'b0) == 4'b11, "target 0");
    chk(df_pkg::lut_test_target(4'd1, 2, 1'b0) == 4'b01, "target 1");
    chk(df_pkg::lut_test_target(4'd2, 2, 1'b0) == 4'b10, "target 2");
    chk(df_pkg::lut_test_target(4'd3, 2, 1'b0) == 4'b00, "target 3");
    run(1'b0, 0);
    run(1'b1, 0);
    run(1'b0, 3*SEG);
    run(1'b1, 500);
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
