// Testbench for put_bank: for each PUT kind, launches 0/1 and 1/0
// transitions and checks every path's final value and arrival time against
// the count of routing stretches on it (one from the TPG plus one per stage
// or LUT column), with and without an emulated fault adding EXTRA on one path.
// For LUT bundles a late row delays the whole bundle.
`timescale 1ps/1ps
module tb_put_bank;
  import df_pkg::*;
  localparam int SEG = 1000;
  localparam int EXTRA = 3000;
  logic launch, fall;
  logic [3:0] e_plb, e_plbf, e_lut, e_lutf, e_car, e_pair;
  int checks = 0, failures = 0;

  put_bank #(.N_PUTS(4), .KIND(PUT_PLB), .N_PLB(3), .LUT_K(4), .SEG_DELAY_PS(SEG)) b0 (.launch(launch), .falling(fall), .put_end(e_plb));
  put_bank #(.N_PUTS(4), .KIND(PUT_PLB), .N_PLB(3), .LUT_K(4), .SEG_DELAY_PS(SEG), .FAULT_PUT(2), .FAULT_EXTRA_PS(EXTRA)) b1 (.launch(launch), .falling(fall), .put_end(e_plbf));
  put_bank #(.N_PUTS(4), .KIND(PUT_LUT), .LUT_K(2), .N_GROUPS(1), .SEG_DELAY_PS(SEG)) b2 (.launch(launch), .falling(fall), .put_end(e_lut));
  put_bank #(.N_PUTS(4), .KIND(PUT_LUT), .LUT_K(2), .N_GROUPS(1), .SEG_DELAY_PS(SEG), .FAULT_PUT(3), .FAULT_EXTRA_PS(EXTRA)) b3 (.launch(launch), .falling(fall), .put_end(e_lutf));
  put_bank #(.N_PUTS(4), .KIND(PUT_CARRY), .N_PLB(2), .ADD_K(4), .SEG_DELAY_PS(SEG)) b4 (.launch(launch), .falling(fall), .put_end(e_car));
  put_bank #(.N_PUTS(4), .KIND(PUT_ADD_PAIR), .PAIR_ORDER(PAIR_A_COUT_FIRST), .N_PLB(4), .ADD_K(4), .SEG_DELAY_PS(SEG), .FAULT_PUT(0), .FAULT_EXTRA_PS(EXTRA)) b5 (.launch(launch), .falling(fall), .put_end(e_pair));

  longint t_arr [6][4];
  for (genvar p = 0; p < 4; p++) begin : g_mon
    always @(posedge e_plb[p]  or negedge e_plb[p])  t_arr[0][p] = $time;
    always @(posedge e_plbf[p] or negedge e_plbf[p]) t_arr[1][p] = $time;
    always @(posedge e_lut[p]  or negedge e_lut[p])  t_arr[2][p] = $time;
    always @(posedge e_lutf[p] or negedge e_lutf[p]) t_arr[3][p] = $time;
    always @(posedge e_car[p]  or negedge e_car[p])  t_arr[4][p] = $time;
    always @(posedge e_pair[p] or negedge e_pair[p]) t_arr[5][p] = $time;
  end

  function automatic int expected(int bank, int p);
    case (bank)
      0: return 4 * SEG;
      1: return 4 * SEG + ((p == 2) ? EXTRA : 0);
      2: return 5 * SEG;
      3: return 5 * SEG + ((p >= 2) ? EXTRA : 0);
      4: return 3 * SEG;
      default: return 5 * SEG + ((p == 0) ? EXTRA : 0);
    endcase
  endfunction

  task automatic run(input logic f);
    longint t0;
    logic [3:0] v [6];
    fall = f; launch = f;
    #(100*SEG);
    t0 = $time;
    launch = ~f;
    #(100*SEG);
    v = '{e_plb, e_plbf, e_lut, e_lutf, e_car, e_pair};
    for (int b = 0; b < 6; b++) begin
      for (int p = 0; p < 4; p++) begin
        checks += 2;
        if (v[b][p] !== ~f) begin failures++; $display("FAIL bank %0d path %0d value", b, p); end
        if (t_arr[b][p] - t0 != expected(b, p)) begin
          failures++; $display("FAIL bank %0d path %0d arrival %0d expected %0d", b, p, t_arr[b][p] - t0, expected(b, p));
        end
      end
    end
  endtask

  initial begin
    run(1'b0);
    run(1'b1);
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
