// isa_top: n-bit fine-grain pipelined inexact speculative adder (ISA).
//
// The n-bit addition a + b + cin is cut into n/4 blocks of 4 bits that are
// added independently. The carry into block 0 is cin; the carry into every
// other block i is guessed by a speculator (pspec) from the two top bit pairs
// of block i-1. A compensator (pcomp) per block boundary compares the real
// carry out of block i-1 with that guess and, on a mismatch, either corrects
// block i by one or, when that is impossible, balances block i-1 so that the
// error shrinks. The carry chain is therefore never longer than one 4-bit
// block, whatever n is; the price is an occasional inexact sum.
//
// Pipeline (five stages between six register levels, one result per clock):
//   L1  input register: a, b, cin
//   S1  speculators, first half                 -> L2 (inside pspec)
//   S2  speculators, second half  ||  adders, first half (operands of L2)
//                                               -> L3 (c_spec here; adder regs)
//   S3  adders, second half, carry in = cin or the speculated carry -> L4
//   S4  compensators, first half                -> L5 (inside pcomp)
//   S5  compensators, second half and the choice, per block, between the
//       balanced value (if the block above reduced its error into this one)
//       and the corrected value                 -> L6 output register
// A result is in the output register LATENCY = 6 clock edges after its
// operands are sampled; out_valid follows in_valid with that delay.
//
// Interface: clk, active-low asynchronous reset rst_n (clears only the valid
// pipeline; the datapath registers need no reset), in_valid/a/b/cin in,
// out_valid/sum/cout out, plus per-block flags for the result on the output:
// fault[i] (carry into block i was mis-speculated), corrected[i] (block i was
// corrected) and reduced[i] (block i's error was reduced into block i-1), for
// i = 1 .. N/4-1 (block 0 takes the exact carry in and has no compensator).
//
// Parameters: N (a multiple of 4, default 16 as in the source design's main
// configuration) and ADDER, the 4-bit adder used in every block: the
// Brent-Kung adder (default, the source design's final version) or the carry
// look-ahead adder (its first version). The stage assignment of S1-S5, the
// valid pipeline, the reset and the flag outputs are this design's choices.
// The carry out is the raw carry out of the top block.
module isa_top
  import isa_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter adder_kind_e ADDER = ADDER_BKA
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic         out_valid,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic [N/BLK-1:1] fault,
  output logic [N/BLK-1:1] corrected,
  output logic [N/BLK-1:1] reduced
);

  localparam int unsigned NB = N / BLK;

  initial begin
    assert (N >= 2 * BLK && N % BLK == 0)
      else $error("isa_top: N must be a multiple of %0d and at least %0d", BLK, 2 * BLK);
  end

  // ---------------- valid pipeline (L1 .. L6) ----------------
  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

  // ---------------- L1: input register ----------------
  logic [N-1:0] a1, b1;
  logic         cin1;
  always_ff @(posedge clk) begin
    a1   <= a;
    b1   <= b;
    cin1 <= cin;
  end

  // ---------------- L2: operands delayed for the adders ----------------
  logic [N-1:0] a2, b2;
  logic         cin2;
  always_ff @(posedge clk) begin
    a2   <= a1;
    b2   <= b1;
    cin2 <= cin1;
  end

  // ---------------- S1/S2: speculators ----------------
  logic [NB-1:1] c_spec;   // combinational in S2
  for (genvar i = 1; i < NB; i++) begin : g_spec
    pspec u_pspec (
      .clk    (clk),
      .a      (a1[BLK*i-1 -: 2]),
      .b      (b1[BLK*i-1 -: 2]),
      .c_spec (c_spec[i])
    );
  end

  // ---------------- L3: carries into the adder second halves ----------------
  logic [NB-1:0] blk_cin3;
  always_ff @(posedge clk) begin
    blk_cin3 <= {c_spec[NB-1:1], cin2};
  end

  // ---------------- S2/S3: 4-bit adders ----------------
  logic [BLK-1:0] s3 [NB];
  logic [NB-1:0]  co3;
  for (genvar i = 0; i < NB; i++) begin : g_add
    if (ADDER == ADDER_BKA) begin : g_bka
      pbka4 u_add (
        .clk  (clk),
        .a    (a2[BLK*i +: BLK]),
        .b    (b2[BLK*i +: BLK]),
        .cin  (blk_cin3[i]),
        .sum  (s3[i]),
        .cout (co3[i])
      );
    end else begin : g_cla
      pcla4 u_add (
        .clk  (clk),
        .a    (a2[BLK*i +: BLK]),
        .b    (b2[BLK*i +: BLK]),
        .cin  (blk_cin3[i]),
        .sum  (s3[i]),
        .cout (co3[i])
      );
    end
  end

  // ---------------- L4: block sums, carries and guesses ----------------
  logic [NB-1:0][BLK-1:0] s4;
  logic [NB-1:0]  co4;
  logic [NB-1:1]  cspec4;
  always_ff @(posedge clk) begin
    for (int i = 0; i < NB; i++) s4[i] <= s3[i];  // packed: plain flip-flops
    co4    <= co3;
    cspec4 <= blk_cin3[NB-1:1];
  end

  // ---------------- S4/S5: compensators ----------------
  logic [BLK-1:0] s_corr [NB];   // block i after correction by pcomp i
  logic [BLK-1:0] s_bal  [1:NB-1]; // block i-1 after balancing by pcomp i
  logic [NB-1:1]  flt, cor, red;

  // block 0 has no compensator below it: its sum only needs the L5 delay
  logic [BLK-1:0] s0_q;
  logic           cout_q;
  always_ff @(posedge clk) begin
    s0_q   <= s4[0];
    cout_q <= co4[NB-1];
  end
  assign s_corr[0] = s0_q;

  for (genvar i = 1; i < NB; i++) begin : g_comp
    pcomp u_pcomp (
      .clk       (clk),
      .s_lo      (s4[i-1]),
      .cout_lo   (co4[i-1]),
      .s_up      (s4[i]),
      .c_spec_up (cspec4[i]),
      .s_up_corr (s_corr[i]),
      .s_lo_bal  (s_bal[i]),
      .fault     (flt[i]),
      .corrected (cor[i]),
      .reduced   (red[i])
    );
  end

  // Final value of each block: balanced by the compensator above it if that
  // one reduced its error, otherwise as corrected by the one below it.
  logic [N-1:0] s5;
  for (genvar i = 0; i < NB - 1; i++) begin : g_merge
    assign s5[BLK*i +: BLK] = red[i+1] ? s_bal[i+1] : s_corr[i];
  end
  assign s5[N-1 -: BLK] = s_corr[NB-1];   // nothing above the top block

  // ---------------- L6: output register ----------------
  always_ff @(posedge clk) begin
    sum       <= s5;
    cout      <= cout_q;
    fault     <= flt;
    corrected <= cor;
    reduced   <= red;
  end

endmodule
