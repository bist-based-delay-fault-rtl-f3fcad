// Testbench for adder_plb (K = 4): exhaustive A, B, carry-in against the
// arithmetic sum.
`timescale 1ps/1ps
module tb_adder_plb;
  logic [3:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  adder_plb #(.K(4)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int i = 0; i < 512; i++) begin
      a = 4'(i); b = 4'(i >> 4); cin = 1'(i >> 8);
      #10;
      checks++;
      if ({cout, s} !== 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++; $display("FAIL %0d+%0d+%0d", a, b, cin);
      end
    end
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
