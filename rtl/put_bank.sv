// The set of N_PUTS identical paths under test (PUTs) of one BIST configuration.
//
// All paths start at the TPG output and are built alike, so that without a
// fault their delays match. Every path first crosses a stretch of routing
// (route_seg) from the TPG, then its resources of the chosen kind:
//   PUT_PLB      N_PLB PLBs as identity functions (AND/OR LUT into a
//                transparent latch), a routing stretch after each;
//   PUT_LUT      the paths form bundles of LUT_K, each bundle a lut_put_chain
//                of N_GROUPS groups of 2^LUT_K LUT columns;
//   PUT_CARRY    carry_put_chain through N_PLB adder PLBs over the carry chain;
//   PUT_ADD_PAIR carry_put_chain through N_PLB/2 pairs of adder PLBs in
//                PAIR_ORDER.
// Path FAULT_PUT (none if negative) gets FAULT_EXTRA_PS more delay on its
// first routing stretch, emulating a delay fault like an extra detour.
// For PUT_LUT, N_PUTS must be a multiple of LUT_K. Since the LUTs of a bundle
// wait for the slowest row, a slow row delays its whole bundle, which is then
// compared against the other bundles.
`timescale 1ps/1ps
module put_bank #(
  parameter int unsigned         N_PUTS         = 4,
  parameter df_pkg::put_kind_e   KIND           = df_pkg::PUT_PLB,
  parameter df_pkg::pair_order_e PAIR_ORDER     = df_pkg::PAIR_CIN_S_FIRST,
  parameter int unsigned         N_PLB          = 4,
  parameter int unsigned         LUT_K          = 4,
  parameter int unsigned         N_GROUPS       = 1,
  parameter int unsigned         ADD_K          = 4,
  parameter int unsigned         SEG_DELAY_PS   = 20000,
  parameter int                  FAULT_PUT      = -1,
  parameter int unsigned         FAULT_EXTRA_PS = 0
) (
  input  logic              launch,   // TPG output
  input  logic              falling,  // configuration: launched polarity
  output logic [N_PUTS-1:0] put_end   // path outputs to the ORA
);

  // path inputs after the first routing stretch
  logic [N_PUTS-1:0] p_in;

  for (genvar p = 0; p < N_PUTS; p++) begin : g_in
    localparam int unsigned D0 = SEG_DELAY_PS + ((p == FAULT_PUT) ? FAULT_EXTRA_PS : 0);
    route_seg #(.DELAY_PS(D0)) u_seg (.a(launch), .y(p_in[p]));
  end

  if (KIND == df_pkg::PUT_PLB) begin : g_plb
    logic [15:0] ident;
    assign ident = df_pkg::plb_identity_lut(LUT_K, falling);
    for (genvar p = 0; p < N_PUTS; p++) begin : g_path
      logic [N_PLB:0] n;
      assign n[0] = p_in[p];
      for (genvar i = 0; i < N_PLB; i++) begin : g_stage
        logic o;
        plb_put_stage #(.K(LUT_K)) u_plb (
          .in         ({LUT_K{n[i]}}),
          .lut_init   (ident[2**LUT_K-1:0]),
          .latch_g    (1'b1),
          .bypass_lut (1'b0),
          .use_latch  (1'b1),
          .out        (o)
        );
        route_seg #(.DELAY_PS(SEG_DELAY_PS)) u_seg (.a(o), .y(n[i+1]));
      end
      assign put_end[p] = n[N_PLB];
    end

  end else if (KIND == df_pkg::PUT_LUT) begin : g_lut
    logic [2**LUT_K-1:0][LUT_K-1:0] target;
    for (genvar j = 0; j < 2**LUT_K; j++) begin : g_tgt
      logic [3:0] t;
      assign t = df_pkg::lut_test_target(4'(j), LUT_K, falling);
      assign target[j] = t[LUT_K-1:0];
    end
    for (genvar b = 0; b < N_PUTS / LUT_K; b++) begin : g_bundle
      lut_put_chain #(
        .K(LUT_K), .N_GROUPS(N_GROUPS), .SEG_DELAY_PS(SEG_DELAY_PS)
      ) u_chain (
        .in     (p_in[b*LUT_K +: LUT_K]),
        .target (target),
        .out    (put_end[b*LUT_K +: LUT_K])
      );
    end

  end else begin : g_add
    for (genvar p = 0; p < N_PUTS; p++) begin : g_path
      carry_put_chain #(
        .K(ADD_K), .N_PLB(N_PLB), .KIND(KIND), .ORDER(PAIR_ORDER),
        .SEG_DELAY_PS(SEG_DELAY_PS)
      ) u_chain (
        .in      (p_in[p]),
        .falling (falling),
        .out     (put_end[p])
      );
    end
  end

endmodule
