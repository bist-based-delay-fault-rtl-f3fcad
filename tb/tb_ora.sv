// Testbench for ora: drives four PUT outputs with transitions at chosen
// times and checks the final count and fault flag against the spread
// D = last arrival - first arrival. Expected count: floor(D/2H) or one more
// (partial pulse), where H is the oscillator half period; with the divider
// the count is the number of oscillator pulses halved, rounded up. Rising and
// falling launches, spreads of zero, below and above threshold.
`timescale 1ps/1ps
module tb_ora;
  localparam int H = 2058;
  logic [3:0] put = '0;
  logic rst = 1'b0;
  logic first, last_n, osc, fault, first2, last_n2, osc2, fault2;
  logic [5:0] count, count2;
  int checks = 0, failures = 0;

  ora #(.N(4), .CNT_W(6), .HALF_PS(H), .DIV_OSC(1'b0), .THRESHOLD(2)) dut (
    .put(put), .rst(rst), .first(first), .last_n(last_n), .osc(osc),
    .count(count), .fault(fault));
  ora #(.N(4), .CNT_W(6), .HALF_PS(H), .DIV_OSC(1'b1), .THRESHOLD(2)) dut_div (
    .put(put), .rst(rst), .first(first2), .last_n(last_n2), .osc(osc2),
    .count(count2), .fault(fault2));

  // arrival offsets (ps) of the four paths
  task automatic run(input int d0, input int d1, input int d2, input int d3, input bit fall);
    int dmin, dmax, d, lo, lo2, hi2;
    int dl[4];
    dl = '{d0, d1, d2, d3};
    put = fall ? '1 : '0;
    rst = 1'b1; #(5*H); rst = 1'b0; #(5*H);
    fork
      for (int i = 0; i < 4; i++) begin
        automatic int k = i;
        fork
          begin #(dl[k]); put[k] = ~fall; end
        join_none
      end
    join
    dmin = d0; dmax = d0;
    foreach (dl[i]) begin
      if (dl[i] < dmin) dmin = dl[i];
      if (dl[i] > dmax) dmax = dl[i];
    end
    #(dmax + 6*H);
    d = dmax - dmin;
    lo = d / (2*H);
    checks += 3;
    if (32'(count) < lo || 32'(count) > lo + 1) begin
      failures++; $display("FAIL D=%0d count=%0d expected %0d..%0d", d, count, lo, lo+1);
    end
    if (fault !== (32'(count) >= 2)) begin failures++; $display("FAIL fault flag"); end
    lo2 = (lo + 1) / 2; hi2 = (lo + 2) / 2;
    if (32'(count2) < lo2 || 32'(count2) > hi2) begin
      failures++; $display("FAIL div D=%0d count=%0d expected %0d..%0d", d, count2, lo2, hi2);
    end
    if (d >= 6*H) begin
      checks++;
      if (!fault) begin failures++; $display("FAIL missed fault D=%0d", d); end
    end
    if (d == 0) begin
      checks++;
      if (count !== 6'd0) begin failures++; $display("FAIL count on equal paths"); end
    end
  endtask

  initial begin
    run(50000, 50000, 50000, 50000, 0);
    run(50000, 50000, 50000, 50000, 1);
    run(50000, 50500, 50200, 50100, 0);
    run(50000, 50000, 50000, 90000, 0);
    run(50000, 60000, 55000, 51000, 1);
    run(70000, 20000, 30000, 25000, 0);
    for (int i = 0; i < 10; i++)
      run($urandom_range(10000, 60000), $urandom_range(10000, 60000),
          $urandom_range(10000, 60000), $urandom_range(10000, 60000), 1'($urandom_range(0, 1)));
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
