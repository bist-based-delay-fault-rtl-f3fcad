// One path under test through N_PLB adder PLBs, testing the carry paths.
//
// KIND = PUT_CARRY (carry-in and B to carry-out): every PLB gets the incoming
//   transition on carry-in and on all B bits, with A = all 0 for a 0/1 launch
//   (carry-out = AND) or A = all 1 for a 1/0 launch (carry-out = OR). The
//   carry-out drives the next PLB over the dedicated carry routing.
// KIND = PUT_ADD_PAIR, ORDER = PAIR_CIN_S_FIRST: PLBs work in pairs. The
//   first has A = 0, B = all 1 and the transition on carry-in, so every sum
//   bit switches the opposite way; the sum bus drives A of the second, which
//   has B = all 1 and carry-in 0 (carry-out = OR of A) when the pair receives
//   a rising transition, and B = all 0 and carry-in 1 (carry-out = AND of A)
//   when it receives a falling one. Each pair inverts the transition, so
//   the two set-ups alternate along the path.
// KIND = PUT_ADD_PAIR, ORDER = PAIR_A_COUT_FIRST: the first PLB of a pair
//   has the transition on all A bits, B = 0 and carry-in 1 (carry-out = AND of
//   A); the second has A = 0, B = all 1 and carry-in from that carry-out, and
//   its sum bus feeds A of the next pair. The path output is sum bit 0 of
//   the last PLB.
// The constant values follow the published set-ups; the choice of sum bit 0
// as the observed output, and modelling each route between PLBs as a
// route_seg, are this design's. N_PLB must be even for PUT_ADD_PAIR.
`timescale 1ps/1ps
module carry_put_chain #(
  parameter int unsigned         K            = 4,
  parameter int unsigned         N_PLB        = 4,
  parameter df_pkg::put_kind_e   KIND         = df_pkg::PUT_CARRY,
  parameter df_pkg::pair_order_e ORDER        = df_pkg::PAIR_CIN_S_FIRST,
  parameter int unsigned         SEG_DELAY_PS = 5000
) (
  input  logic in,
  input  logic falling,   // configuration: polarity of the launched transition
  output logic out
);

  if (KIND == df_pkg::PUT_CARRY) begin : g_carry
    logic [N_PLB:0] c;
    assign c[0] = in;
    for (genvar i = 0; i < N_PLB; i++) begin : g_plb
      logic [K-1:0] s_unused;
      logic         co;
      adder_plb #(.K(K)) u_add (
        .a    ({K{falling}}),
        .b    ({K{c[i]}}),
        .cin  (c[i]),
        .s    (s_unused),
        .cout (co)
      );
      route_seg #(.DELAY_PS(SEG_DELAY_PS)) u_seg (.a(co), .y(c[i+1]));
    end
    assign out = c[N_PLB];

  end else if (ORDER == df_pkg::PAIR_CIN_S_FIRST) begin : g_cin_s
    logic [N_PLB/2:0] c;
    assign c[0] = in;
    for (genvar g = 0; g < N_PLB / 2; g++) begin : g_pair
      // a pair receives a rising transition when the launch polarity and the
      // number of inverting pairs before it agree
      logic         rise_in;
      logic [K-1:0] s1, s1_r, s2_unused;
      logic         co1_unused, co2;
      assign rise_in = ~falling ^ 1'(g % 2);
      adder_plb #(.K(K)) u_cin_s (
        .a ('0), .b ('1), .cin (c[g]), .s (s1), .cout (co1_unused)
      );
      for (genvar b = 0; b < K; b++) begin : g_bus
        route_seg #(.DELAY_PS(SEG_DELAY_PS)) u_seg (.a(s1[b]), .y(s1_r[b]));
      end
      adder_plb #(.K(K)) u_a_cout (
        .a (s1_r), .b ({K{rise_in}}), .cin (~rise_in), .s (s2_unused), .cout (co2)
      );
      route_seg #(.DELAY_PS(SEG_DELAY_PS)) u_out (.a(co2), .y(c[g+1]));
    end
    assign out = c[N_PLB/2];

  end else begin : g_a_cout
    logic [N_PLB/2:0][K-1:0] a;
    assign a[0] = {K{in}};
    for (genvar g = 0; g < N_PLB / 2; g++) begin : g_pair
      logic [K-1:0] s1_unused, s2;
      logic         co1, co1_r, co2_unused;
      adder_plb #(.K(K)) u_a_cout (
        .a (a[g]), .b ('0), .cin (1'b1), .s (s1_unused), .cout (co1)
      );
      route_seg #(.DELAY_PS(SEG_DELAY_PS)) u_seg (.a(co1), .y(co1_r));
      adder_plb #(.K(K)) u_cin_s (
        .a ('0), .b ('1), .cin (co1_r), .s (s2), .cout (co2_unused)
      );
      for (genvar b = 0; b < K; b++) begin : g_bus
        route_seg #(.DELAY_PS(SEG_DELAY_PS)) u_bus (.a(s2[b]), .y(a[g+1][b]));
      end
    end
    assign out = a[N_PLB/2][0];
  end

endmodule
