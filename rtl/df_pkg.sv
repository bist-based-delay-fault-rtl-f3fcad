// Shared types and configuration functions for the delay-fault BIST.
//
// The BIST compares the propagation delays of several identical paths under
// test (PUTs). How a PUT is built out of the programmable logic blocks (PLBs)
// is chosen with put_kind_e. The functions below compute the LUT contents that
// the configuration of each PUT kind loads:
//   * plb_identity_lut: a K-input LUT that passes one transition applied to all
//     of its inputs: AND for a 0/1 transition, OR for a 1/0 transition.
//   * lut_test_target:  the target address of column j of a LUT-test group,
//     ordered as in the published example for K=2 (11, 01, 10, 00) and
//     complemented for a 1/0 launch so that the first column always targets
//     the value the launch settles to.
//   * lut_test_content: a LUT holding a single 1 (or a single 0) at its target
//     address, so that the output switches only when the address arrives there.
// The address convention is that row 0 of a LUT column drives the most
// significant address bit.
`timescale 1ps/1ps
package df_pkg;

  // Kind of resource a PUT runs through.
  typedef enum logic [1:0] {
    PUT_PLB      = 2'd0,  // PLBs as identity functions: LUT and transparent latch
    PUT_LUT      = 2'd1,  // coupled LUT columns, each LUT switching at a target address
    PUT_CARRY    = 2'd2,  // adder PLBs chained through carry-in and B to carry-out
    PUT_ADD_PAIR = 2'd3   // adder PLB pairs: carry-in->sum, then A->carry-out (or reversed)
  } put_kind_e;

  // Arrangement of one pair of adder PLBs in PUT_ADD_PAIR paths.
  typedef enum logic {
    PAIR_CIN_S_FIRST  = 1'b0, // first PLB carry-in->sum, second A->carry-out
    PAIR_A_COUT_FIRST = 1'b1  // first PLB A->carry-out, second carry-in->sum
  } pair_order_e;

  // Identity LUT: AND of all inputs (0/1 launch) or OR of all inputs (1/0 launch).
  function automatic logic [15:0] plb_identity_lut(int unsigned k, logic falling);
    logic [15:0] t;
    int unsigned n;
    n = 1 << k;
    t = '0;
    for (int unsigned a = 0; a < 16; a++) begin
      if (a < n) t[a] = falling ? (a != 0) : (a == n - 1);
    end
    return t;
  endfunction

  // Bit-reverse of the low k bits of v.
  function automatic logic [3:0] bitrev(logic [3:0] v, int unsigned k);
    logic [3:0] r;
    r = '0;
    for (int unsigned i = 0; i < 4; i++) begin
      if (i < k) r[k-1-i] = v[i];
    end
    return r;
  endfunction

  // Target address of column j (0 .. 2^k-1) of one LUT-test group.
  function automatic logic [3:0] lut_test_target(logic [3:0] j, int unsigned k, logic falling);
    logic [3:0] mask;
    mask = 4'((1 << k) - 1);
    return (bitrev(~j, k) & mask) ^ (falling ? mask : 4'h0);
  endfunction

  // LUT contents that switch to 'final_val' exactly when the address becomes 'target'.
  function automatic logic [15:0] lut_test_content(logic [3:0] target, int unsigned k, logic final_val);
    logic [15:0] t;
    t = '0;
    for (int unsigned a = 0; a < 16; a++) begin
      if (a < (1 << k)) t[a] = (4'(a) == target) ? final_val : ~final_val;
    end
    return t;
  endfunction

endpackage
