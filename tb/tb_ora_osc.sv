// Testbench for ora_osc: opens enable windows of several widths D and counts
// the oscillator's rising edges. With half period H the count must lie in
// [floor(D/2H), floor(D/2H)+1]; the period while running must be 2H; the
// output must rest at 1 whenever either input is 0.
`timescale 1ps/1ps
module tb_ora_osc;
  localparam int H = 2058;
  logic first = 1'b0, last_n = 1'b1, osc;
  int checks = 0, failures = 0;
  int n_rise = 0;
  longint t_last = -1;
  longint period = 0;

  ora_osc #(.HALF_PS(H)) dut (.first(first), .last_n(last_n), .osc(osc));

  always @(posedge osc) begin
    n_rise++;
    if (t_last >= 0) period = $time - t_last;
    t_last = $time;
  end

  task automatic window(input int d, input bit rising_style);
    int lo;
    n_rise = 0; t_last = -1; period = 0;
    // rising style: FIRST rises, later LAST_N falls; falling style: LAST_N
    // rises, later FIRST falls
    if (rising_style) begin first = 1'b0; last_n = 1'b1; end
    else begin first = 1'b1; last_n = 1'b0; end
    #(10*H);
    if (rising_style) first = 1'b1; else last_n = 1'b1;
    #(d);
    if (rising_style) last_n = 1'b0; else first = 1'b0;
    #(4*H);
    lo = d / (2*H);
    checks++;
    if (n_rise < lo || n_rise > lo + 1) begin
      failures++;
      $display("FAIL window %0d: %0d pulses, expected %0d..%0d", d, n_rise, lo, lo+1);
    end
    checks++;
    if (osc !== 1'b1) begin failures++; $display("FAIL osc not at rest"); end
    if (n_rise >= 2) begin
      checks++;
      if (period != 2*H) begin failures++; $display("FAIL period %0d", period); end
    end
  endtask

  initial begin
    #(5*H);
    checks++;
    if (osc !== 1'b1) begin failures++; $display("FAIL rest value"); end
    window(100, 1);
    window(H + 10, 1);
    window(10*H, 1);
    window(41*H + 7, 1);
    window(3*H, 0);
    window(25*H + 100, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000*H);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
