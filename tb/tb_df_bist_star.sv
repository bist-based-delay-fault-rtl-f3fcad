// End-to-end testbench for df_bist_star.
//
// Eight copies of the BIST run side by side from one 8 MHz clock and one
// global reset: fault-free and faulty path sets of every PUT kind, one with
// the divide-by-two counter clock and one with a fault below the detection
// threshold. Each sequence (reset, release, launch, measure) is run for a
// 0/1 and a 1/0 launch. Checked for every copy: the launch leaves the TPG on
// the second clock edge after reset release; the count lies in the range
// worked out from the emulated extra delay D and the oscillator half period H
// (floor(D/2H) or one more, halved and rounded up with the divider); the
// fault flag equals count >= 2. The testbench also counts how often each
// mechanism happened (oscillator run, fault detected, clean pass, 1/0
// launch, divided clock, each PUT kind) and fails if one never did.
`timescale 1ps/1ps
module tb_df_bist_star;
  import df_pkg::*;
  localparam int H   = 2058;
  localparam int NI  = 8;
  localparam int CLK_HALF = 62500;    // 8 MHz

  // emulated extra delay of each copy, DIV_OSC and kind
  localparam int EXTRA [NI] = '{0, 20000, 20000, 15000, 12000, 0, 9000, 1000};
  localparam bit DIV   [NI] = '{0, 0, 1, 0, 0, 0, 0, 0};
  localparam int KINDI [NI] = '{0, 0, 0, 1, 2, 3, 3, 0};

  logic clk = 1'b0, gsr = 1'b0, fall = 1'b0;
  logic [NI-1:0] launch, first, last_n, osc, fault;
  logic [5:0] count [NI];
  logic [3:0] put_end [NI];
  int checks = 0, failures = 0;
  int n_osc_run = 0, n_detect = 0, n_pass = 0, n_fall = 0, n_div = 0;
  int n_kind [4] = '{0, 0, 0, 0};
  int osc_edges [NI];

  always #(CLK_HALF) clk = ~clk;

  df_bist_star u0 (.clk_tpg(clk), .gsr(gsr), .falling(fall), .put_launch(launch[0]), .put_end(put_end[0]),
                   .first(first[0]), .last_n(last_n[0]), .osc(osc[0]), .count(count[0]), .fault(fault[0]));
  df_bist_star #(.FAULT_PUT(1), .FAULT_EXTRA_PS(20000)) u1 (
    .clk_tpg(clk), .gsr(gsr), .falling(fall), .put_launch(launch[1]), .put_end(put_end[1]),
    .first(first[1]), .last_n(last_n[1]), .osc(osc[1]), .count(count[1]), .fault(fault[1]));
  df_bist_star #(.DIV_OSC(1'b1), .FAULT_PUT(3), .FAULT_EXTRA_PS(20000)) u2 (
    .clk_tpg(clk), .gsr(gsr), .falling(fall), .put_launch(launch[2]), .put_end(put_end[2]),
    .first(first[2]), .last_n(last_n[2]), .osc(osc[2]), .count(count[2]), .fault(fault[2]));
  df_bist_star #(.PUT_KIND(PUT_LUT), .LUT_K(2), .SEG_DELAY_PS(5000), .FAULT_PUT(0), .FAULT_EXTRA_PS(15000)) u3 (
    .clk_tpg(clk), .gsr(gsr), .falling(fall), .put_launch(launch[3]), .put_end(put_end[3]),
    .first(first[3]), .last_n(last_n[3]), .osc(osc[3]), .count(count[3]), .fault(fault[3]));
  df_bist_star #(.PUT_KIND(PUT_CARRY), .FAULT_PUT(3), .FAULT_EXTRA_PS(12000)) u4 (
    .clk_tpg(clk), .gsr(gsr), .falling(fall), .put_launch(launch[4]), .put_end(put_end[4]),
    .first(first[4]), .last_n(last_n[4]), .osc(osc[4]), .count(count[4]), .fault(fault[4]));
  df_bist_star #(.PUT_KIND(PUT_ADD_PAIR), .PAIR_ORDER(PAIR_CIN_S_FIRST)) u5 (
    .clk_tpg(clk), .gsr(gsr), .falling(fall), .put_launch(launch[5]), .put_end(put_end[5]),
    .first(first[5]), .last_n(last_n[5]), .osc(osc[5]), .count(count[5]), .fault(fault[5]));
  df_bist_star #(.PUT_KIND(PUT_ADD_PAIR), .PAIR_ORDER(PAIR_A_COUT_FIRST), .FAULT_PUT(2), .FAULT_EXTRA_PS(9000)) u6 (
    .clk_tpg(clk), .gsr(gsr), .falling(fall), .put_launch(launch[6]), .put_end(put_end[6]),
    .first(first[6]), .last_n(last_n[6]), .osc(osc[6]), .count(count[6]), .fault(fault[6]));
  df_bist_star #(.FAULT_PUT(0), .FAULT_EXTRA_PS(1000)) u7 (
    .clk_tpg(clk), .gsr(gsr), .falling(fall), .put_launch(launch[7]), .put_end(put_end[7]),
    .first(first[7]), .last_n(last_n[7]), .osc(osc[7]), .count(count[7]), .fault(fault[7]));

  for (genvar i = 0; i < NI; i++) begin : g_mon
    always @(negedge osc[i]) osc_edges[i]++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic sequence_run(input logic f);
    int lo, hi, c;
    fall = f;
    gsr = 1'b1;
    repeat (3) @(posedge clk);
    foreach (osc_edges[i]) osc_edges[i] = 0;
    #1000;
    for (int i = 0; i < NI; i++) begin
      chk(count[i] == 6'd0, $sformatf("copy %0d count cleared", i));
      chk(launch[i] == f, $sformatf("copy %0d launch rest value", i));
    end
    @(negedge clk) gsr = 1'b0;
    @(posedge clk); #1000;
    for (int i = 0; i < NI; i++) chk(launch[i] == f, $sformatf("copy %0d early launch", i));
    @(posedge clk); #1000;
    for (int i = 0; i < NI; i++) chk(launch[i] == ~f, $sformatf("copy %0d launch on 2nd edge", i));
    // longest path: 5 stretches of 20 ns plus fault, then the oscillator settles
    #(400000);
    if (f) n_fall++;
    for (int i = 0; i < NI; i++) begin
      lo = EXTRA[i] / (2*H);
      hi = lo + 1;
      if (DIV[i]) begin lo = (lo + 1) / 2; hi = (hi + 1) / 2; end
      c = int'(count[i]);
      chk(c >= lo && c <= hi, $sformatf("copy %0d fall=%0b count %0d expected %0d..%0d", i, f, c, lo, hi));
      chk(fault[i] == (c >= 2), $sformatf("copy %0d fault flag", i));
      chk(&put_end[i] == ~f && |put_end[i] == ~f, $sformatf("copy %0d paths settled", i));
      chk(osc[i] == 1'b1, $sformatf("copy %0d oscillator stopped", i));
      if (osc_edges[i] > 0) n_osc_run++;
      if (fault[i]) n_detect++; else n_pass++;
      if (DIV[i] && c > 0) n_div++;
      n_kind[KINDI[i]]++;
      if (EXTRA[i] >= 6*H) chk(fault[i], $sformatf("copy %0d fault missed", i));
      if (EXTRA[i] == 0) chk(c <= 1, $sformatf("copy %0d false alarm", i));
    end
  endtask

  initial begin
    sequence_run(1'b0);
    sequence_run(1'b1);
    sequence_run(1'b0);
    $display("mechanisms: oscillator runs=%0d faults detected=%0d clean passes=%0d 1/0 launches=%0d divided-clock counts=%0d kinds=%0d/%0d/%0d/%0d",
             n_osc_run, n_detect, n_pass, n_fall, n_div, n_kind[0], n_kind[1], n_kind[2], n_kind[3]);
    chk(n_osc_run > 0, "no oscillator run");
    chk(n_detect > 0, "no fault detected");
    chk(n_pass > 0, "no clean pass");
    chk(n_fall > 0, "no 1/0 launch");
    chk(n_div > 0, "divided clock never counted");
    for (int k = 0; k < 4; k++) chk(n_kind[k] > 0, $sformatf("PUT kind %0d never run", k));
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
