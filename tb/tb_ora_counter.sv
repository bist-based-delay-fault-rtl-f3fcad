// Testbench for ora_counter (three slices, 6 bits): counts bursts of clock
// pulses of random length and compares with the pulse total modulo 64,
// including wrap-around past 63, and checks the asynchronous clear.
`timescale 1ps/1ps
module tb_ora_counter;
  logic clk = 1'b1, rst = 1'b0;
  logic [5:0] count;
  int checks = 0, failures = 0;
  int total;

  ora_counter #(.SLICES(3)) dut (.clk(clk), .rst(rst), .count(count));

  task automatic pulses(input int n);
    repeat (n) begin
      #2000 clk = 1'b0;
      #2000 clk = 1'b1;
    end
    total += n;
    #10;
    checks++;
    if (count !== 6'(total % 64)) begin
      failures++;
      $display("FAIL count=%0d expected %0d", count, total % 64);
    end
  endtask

  initial begin
    #50 rst = 1'b1;
    #50 rst = 1'b0;
    total = 0;
    #10;
    checks++;
    if (count !== 6'd0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 30; i++) pulses($urandom_range(0, 20));
    pulses(63);
    pulses(70);
    rst = 1'b1; #10;
    checks++;
    if (count !== 6'd0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
