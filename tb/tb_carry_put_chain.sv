// Testbench for carry_put_chain: the three adder set-ups, each with two PLB
// pairs (4 PLBs) and with one pair (2 PLBs), for 0/1 and 1/0 launches.
// Expected, worked out from the adder arithmetic: the carry chain passes
// the transition unchanged; each PLB pair inverts it, so two pairs pass it
// and one pair inverts it. Every output switches exactly once and arrives
// after the number of routing stretches on the path times SEG.
`timescale 1ps/1ps
module tb_carry_put_chain;
  import df_pkg::*;
  localparam int SEG = 1000;
  logic in, fall;
  logic [4:0] out;
  int edges [5];
  longint t_arr [5];
  int checks = 0, failures = 0;

  carry_put_chain #(.K(4), .N_PLB(4), .KIND(PUT_CARRY), .SEG_DELAY_PS(SEG)) d0 (.in(in), .falling(fall), .out(out[0]));
  carry_put_chain #(.K(4), .N_PLB(4), .KIND(PUT_ADD_PAIR), .ORDER(PAIR_CIN_S_FIRST),  .SEG_DELAY_PS(SEG)) d1 (.in(in), .falling(fall), .out(out[1]));
  carry_put_chain #(.K(4), .N_PLB(4), .KIND(PUT_ADD_PAIR), .ORDER(PAIR_A_COUT_FIRST), .SEG_DELAY_PS(SEG)) d2 (.in(in), .falling(fall), .out(out[2]));
  carry_put_chain #(.K(4), .N_PLB(2), .KIND(PUT_ADD_PAIR), .ORDER(PAIR_CIN_S_FIRST),  .SEG_DELAY_PS(SEG)) d3 (.in(in), .falling(fall), .out(out[3]));
  carry_put_chain #(.K(4), .N_PLB(2), .KIND(PUT_ADD_PAIR), .ORDER(PAIR_A_COUT_FIRST), .SEG_DELAY_PS(SEG)) d4 (.in(in), .falling(fall), .out(out[4]));

  // expected arrival in segments and whether the output is inverted
  localparam int ARR [5] = '{4, 4, 4, 2, 2};
  localparam bit INV [5] = '{0, 0, 0, 1, 1};

  for (genvar i = 0; i < 5; i++) begin : g_mon
    always @(posedge out[i] or negedge out[i]) begin edges[i]++; t_arr[i] = $time; end
  end

  task automatic run(input logic f);
    longint t0;
    fall = f; in = f;
    #(50*SEG);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (out[i] !== (f ^ INV[i])) begin failures++; $display("FAIL rest value path %0d fall=%0b", i, f); end
      edges[i] = 0;
    end
    t0 = $time;
    in = ~f;
    #(50*SEG);
    for (int i = 0; i < 5; i++) begin
      checks += 3;
      if (out[i] !== (~f ^ INV[i])) begin failures++; $display("FAIL final value path %0d fall=%0b", i, f); end
      if (edges[i] != 1) begin failures++; $display("FAIL path %0d switched %0d times", i, edges[i]); end
      if (t_arr[i] - t0 != ARR[i] * SEG) begin failures++; $display("FAIL path %0d arrival %0d", i, t_arr[i] - t0); end
    end
  endtask

  initial begin
    run(1'b0);
    run(1'b1);
    run(1'b0);
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
