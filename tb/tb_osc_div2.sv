// Testbench for osc_div2: after reset the output must be 0, rise on the 1st
// rising input edge and toggle on every rising edge after that.
`timescale 1ps/1ps
module tb_osc_div2;
  logic osc = 1'b1, rst = 1'b0, q;
  int checks = 0, failures = 0;
  logic exp_q;

  osc_div2 dut (.osc(osc), .rst(rst), .clk_out(q));

  initial begin
    #100 rst = 1'b1;
    #900;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset value"); end
    rst = 1'b0;
    exp_q = 1'b0;
    for (int i = 0; i < 20; i++) begin
      #500 osc = 1'b0;
      #10;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL changed on falling edge %0d", i); end
      #490 osc = 1'b1;
      exp_q = ~exp_q;
      #10;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL edge %0d: q=%0b", i, q); end
    end
    rst = 1'b1; #10;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL async clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
