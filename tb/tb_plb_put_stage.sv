// Testbench for plb_put_stage (K = 4): random LUT contents and addresses
// against a table lookup; the latch transparent when its gate is 1 and
// holding when 0; LUT bypass; and the identity configurations (AND for 0/1,
// OR for 1/0) passing a transition applied to all inputs.
`timescale 1ps/1ps
module tb_plb_put_stage;
  logic [3:0]  in;
  logic [15:0] lut;
  logic g, byp, use_l, out;
  int checks = 0, failures = 0;

  plb_put_stage #(.K(4)) dut (.in(in), .lut_init(lut), .latch_g(g), .bypass_lut(byp),
                              .use_latch(use_l), .out(out));

  task automatic expect_out(input logic e, input string what);
    #10;
    checks++;
    if (out !== e) begin failures++; $display("FAIL %s: out=%0b exp=%0b", what, out, e); end
  endtask

  initial begin
    g = 1'b1; byp = 1'b0;
    for (int i = 0; i < 200; i++) begin
      lut = 16'($urandom); in = 4'($urandom);
      use_l = 1'($urandom_range(0, 1));
      expect_out(lut[in], "lut");
    end
    // latch holds while the gate is 0
    use_l = 1'b1; lut = 16'hFFFF; in = 4'h3; expect_out(1'b1, "latch load");
    g = 1'b0; lut = 16'h0000; expect_out(1'b1, "latch hold");
    use_l = 1'b0; expect_out(1'b0, "lut path while latch holds");
    g = 1'b1; use_l = 1'b1; expect_out(1'b0, "latch transparent again");
    // LUT bypass: the latch follows in[0]
    byp = 1'b1; lut = 16'h0000;
    in = 4'h1; expect_out(1'b1, "bypass 1");
    in = 4'hE; expect_out(1'b0, "bypass 0");
    byp = 1'b0;
    // identity configurations
    lut = df_pkg::plb_identity_lut(4, 1'b0);
    in = 4'h0; expect_out(1'b0, "AND rest");
    in = 4'h7; expect_out(1'b0, "AND partial");
    in = 4'hF; expect_out(1'b1, "AND done");
    lut = df_pkg::plb_identity_lut(4, 1'b1);
    in = 4'hF; expect_out(1'b1, "OR rest");
    in = 4'h8; expect_out(1'b1, "OR partial");
    in = 4'h0; expect_out(1'b0, "OR done");
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
