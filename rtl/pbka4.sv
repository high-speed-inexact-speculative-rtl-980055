// pbka4: four-bit pipelined Brent-Kung adder (p-BKA).
//
// The same adder as the carry look-ahead block but with its carry network
// built as a Brent-Kung prefix tree (bk_prefix with W = 4: black cells for
// 1:0, 3:2 and 3:0, then 2:0 on the way back down) instead of flat
// sum-of-products terms.
// First half (operands a, b): bit generate/propagate pairs and the prefix
// tree; the prefix pairs G/P[i:0] and the bit propagates go into the internal
// pipeline register. Second half: one gray cell per bit folds in the carry in,
// c_(i+1) = G[i:0] | P[i:0] & cin, and s_i = p_i ^ c_i, cout = c_4.
//
// Timing: a and b are sampled at one clock edge; cin is used combinationally
// in the next cycle and sum/cout are valid in that cycle (same as pcla4, so
// the two are interchangeable in the ISA). Where the register sits in the
// tree is this design's choice; the source design gives only that the block
// is a pipelined Brent-Kung adder with two stages.
module pbka4
  import isa_pkg::BLK, isa_pkg::gp_t, isa_pkg::gray_cell;
(
  input  logic           clk,
  input  logic [BLK-1:0] a,
  input  logic [BLK-1:0] b,
  input  logic           cin,   // one cycle after a and b
  output logic [BLK-1:0] sum,
  output logic           cout
);

  gp_t bit_gp [BLK];
  gp_t pre_gp [BLK];
  gp_t [BLK-1:0] pre_q;   // packed: plain flip-flops
  logic [BLK-1:0] p_q;

  always_comb begin
    for (int i = 0; i < BLK; i++) begin
      bit_gp[i].g = a[i] & b[i];
      bit_gp[i].p = a[i] ^ b[i];
    end
  end

  bk_prefix #(.W(BLK)) u_tree (
    .gp_in  (bit_gp),
    .gp_out (pre_gp)
  );

  always_ff @(posedge clk) begin
    for (int i = 0; i < BLK; i++) begin
      pre_q[i] <= pre_gp[i];
      p_q[i]   <= bit_gp[i].p;
    end
  end

  logic [BLK:0] c;
  always_comb begin
    c[0] = cin;
    for (int i = 0; i < BLK; i++) c[i+1] = gray_cell(pre_q[i], cin);
  end

  assign sum  = p_q ^ c[BLK-1:0];
  assign cout = c[BLK];

endmodule
