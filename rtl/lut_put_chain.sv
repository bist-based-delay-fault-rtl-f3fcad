// A bundle of K paths under test through columns of K-input LUTs.
//
// This exercises one chosen address of every LUT rather than only the all-0
// and all-1 addresses. Each column holds K LUTs (one per path, row 0 on top)
// and every LUT in a column reads the K outputs of the previous column, row 0
// as the most significant address bit. A LUT with target address t holds a
// single 1 at t (0/1 transition) or a single 0 at t (1/0 transition), so its
// output switches once, spike-free, when the slowest of its inputs reaches t.
// Which of the two a LUT holds follows from the next column: row r ends at
// bit r of the next column's target. Columns come in groups of 2^K, each
// column of a group with its own target; groups repeat and the column after
// a group's last column is the first column of the next group.
//
// The targets are a configuration input, like the configuration memory of
// the FPGA. df_pkg::lut_test_target gives the published example (11, 01, 10,
// 00 for K = 2); the first target must equal the value the launch settles to.
// K is at most 4 (the LUT contents are computed in 16-bit words).
//
// Every row-to-column connection runs through a route_seg of SEG_DELAY_PS.
`timescale 1ps/1ps
module lut_put_chain #(
  parameter int unsigned K            = 4,
  parameter int unsigned N_GROUPS     = 1,
  parameter int unsigned SEG_DELAY_PS = 5000
) (
  input  logic [K-1:0]                 in,      // row r = in[r], already settled to the launch start value
  input  logic [2**K-1:0][K-1:0]       target,  // target address of each column of a group
  output logic [K-1:0]                 out      // row outputs of the last column
);

  localparam int unsigned GCOLS = 2**K;
  localparam int unsigned COLS  = N_GROUPS * GCOLS;

  // x[j] = inputs of column j (after routing), y[j] = outputs of column j
  logic [K-1:0] x [COLS+1];
  logic [K-1:0] y [COLS];

  assign x[0] = in;

  for (genvar j = 0; j < COLS; j++) begin : g_col
    logic [K-1:0] addr;
    logic [K-1:0] tgt;
    logic [K-1:0] nxt;

    for (genvar b = 0; b < K; b++) begin : g_addr
      assign addr[K-1-b] = x[j][b];
    end

    assign tgt = target[j % GCOLS];
    assign nxt = target[(j + 1) % GCOLS];

    for (genvar r = 0; r < K; r++) begin : g_row
      logic [15:0] content;
      assign content = df_pkg::lut_test_content(4'(tgt), K, nxt[K-1-r]);

      plb_put_stage #(.K(K)) u_lut (
        .in         (addr),
        .lut_init   (content[2**K-1:0]),
        .latch_g    (1'b1),
        .bypass_lut (1'b0),
        .use_latch  (1'b0),
        .out        (y[j][r])
      );

      route_seg #(.DELAY_PS(SEG_DELAY_PS)) u_seg (.a(y[j][r]), .y(x[j+1][r]));
    end
  end

  assign out = x[COLS];

endmodule
