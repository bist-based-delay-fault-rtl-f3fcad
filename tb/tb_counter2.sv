// Testbench for counter2: random count enables against a reference count,
// checking q and the carry-out on every clock, plus asynchronous clear.
`timescale 1ps/1ps
module tb_counter2;
  logic clk = 1'b0, rst = 1'b1, cin = 1'b0, cout;
  logic [1:0] q;
  int checks = 0, failures = 0;
  int ref_q = 0;

  counter2 dut (.clk(clk), .rst(rst), .cin(cin), .q(q), .cout(cout));

  always #5000 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      cin = 1'($urandom_range(0, 1));
      #1;
      checks += 2;
      if (q !== 2'(ref_q)) begin failures++; $display("FAIL q=%0d ref=%0d", q, ref_q); end
      if (cout !== (cin && ref_q == 3)) begin failures++; $display("FAIL cout"); end
      @(posedge clk);
      if (cin) ref_q = (ref_q + 1) % 4;
    end
    #1 rst = 1'b1; #1;
    checks++;
    if (q !== 2'd0) begin failures++; $display("FAIL clear"); end
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
