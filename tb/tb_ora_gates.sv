// Testbench for ora_gates: all 2^N input patterns for N = 4 and N = 8,
// compared against the OR and NAND worked out bit by bit.
`timescale 1ps/1ps
module tb_ora_gates;
  int checks = 0, failures = 0;
  logic [3:0] p4;
  logic [7:0] p8;
  logic f4, l4, f8, l8;

  ora_gates #(.N(4)) dut4 (.put(p4), .first(f4), .last_n(l4));
  ora_gates #(.N(8)) dut8 (.put(p8), .first(f8), .last_n(l8));

  function automatic logic any_one(logic [7:0] v, int n);
    for (int i = 0; i < n; i++) if (v[i]) return 1'b1;
    return 1'b0;
  endfunction
  function automatic logic all_one(logic [7:0] v, int n);
    for (int i = 0; i < n; i++) if (!v[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      p8 = 8'(v); p4 = 4'(v);
      #10;
      checks += 4;
      if (f8 !== any_one(p8, 8))  begin failures++; $display("FAIL first8 %h", p8); end
      if (l8 !== !all_one(p8, 8)) begin failures++; $display("FAIL last8 %h", p8); end
      if (f4 !== any_one(8'(p4), 4))  begin failures++; $display("FAIL first4 %h", p4); end
      if (l4 !== !all_one(8'(p4), 4)) begin failures++; $display("FAIL last4 %h", p4); end
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
