// Delay-fault BIST of one self-testing area (STAR) of an FPGA: top level.
//
// Several paths under test (PUTs) are configured identically, so that in a
// fault-free device their delays nearly match. The TPG launches one
// transition into all of them at once. At the far end the ORA opens a window
// at the first arrival (OR gate) and closes it at the last (NAND gate); a
// local NAND ring oscillator runs only inside the window and a counter counts
// its pulses. The final count is the spread between the fastest and slowest
// path in oscillator periods: 0 or 1 is a pass, THRESHOLD (default 2) or more
// flags a delay fault. The same circuit measures 0/1 and 1/0 transitions.
//
// Sequence: hold gsr high (it clears TPG and counter, and 'falling' must be
// set); release it; TPG_STAGES clk_tpg cycles later the transition leaves the
// TPG; after the path delay plus half an oscillator period the count is
// final and can be read. In the FPGA the count is read by configuration
// readback or boundary scan; here it is a port.
//
// Defaults follow the published Spartan example (4 PUTs, 2-stage TPG, 6-bit
// counter from 2-bit slices) and the 243 MHz oscillator measured on an ORCA
// part. PUT_KIND selects the resources the paths run through; the path
// length, routing delays and threshold are this design's choices, picked so
// a path spans more than 20 oscillator periods. FAULT_PUT/FAULT_EXTRA_PS
// slow one path down to emulate a delay fault.
`timescale 1ps/1ps
module df_bist_star #(
  parameter int unsigned         N_PUTS         = 4,
  parameter int unsigned         CNT_W          = 6,
  parameter df_pkg::put_kind_e   PUT_KIND       = df_pkg::PUT_PLB,
  parameter df_pkg::pair_order_e PAIR_ORDER     = df_pkg::PAIR_CIN_S_FIRST,
  parameter int unsigned         N_PLB          = 4,
  parameter int unsigned         LUT_K          = 4,
  parameter int unsigned         N_GROUPS       = 1,
  parameter int unsigned         ADD_K          = 4,
  parameter int unsigned         SEG_DELAY_PS   = 20000,
  parameter int unsigned         OSC_HALF_PS    = 2058,
  parameter bit                  DIV_OSC        = 1'b0,
  parameter int unsigned         THRESHOLD      = 2,
  parameter int unsigned         TPG_STAGES     = 2,
  parameter int                  FAULT_PUT      = -1,
  parameter int unsigned         FAULT_EXTRA_PS = 0
) (
  input  logic              clk_tpg,     // slow internal oscillator (8 MHz)
  input  logic              gsr,         // global reset, starts the sequence on release
  input  logic              falling,     // 0: 0/1 test, 1: 1/0 test
  output logic              put_launch,  // TPG output
  output logic [N_PUTS-1:0] put_end,     // path outputs at the ORA
  output logic              first,
  output logic              last_n,
  output logic              osc,
  output logic [CNT_W-1:0]  count,
  output logic              fault
);

  tpg #(.STAGES(TPG_STAGES)) u_tpg (
    .clk (clk_tpg), .gsr (gsr), .falling (falling), .launch (put_launch)
  );

  put_bank #(
    .N_PUTS(N_PUTS), .KIND(PUT_KIND), .PAIR_ORDER(PAIR_ORDER), .N_PLB(N_PLB),
    .LUT_K(LUT_K), .N_GROUPS(N_GROUPS), .ADD_K(ADD_K), .SEG_DELAY_PS(SEG_DELAY_PS),
    .FAULT_PUT(FAULT_PUT), .FAULT_EXTRA_PS(FAULT_EXTRA_PS)
  ) u_puts (
    .launch (put_launch), .falling (falling), .put_end (put_end)
  );

  ora #(
    .N(N_PUTS), .CNT_W(CNT_W), .HALF_PS(OSC_HALF_PS), .DIV_OSC(DIV_OSC),
    .THRESHOLD(THRESHOLD)
  ) u_ora (
    .put (put_end), .rst (gsr), .first (first), .last_n (last_n), .osc (osc),
    .count (count), .fault (fault)
  );

endmodule
