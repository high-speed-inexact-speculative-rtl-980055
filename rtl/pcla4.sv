// pcla4: four-bit pipelined carry look-ahead adder (PCLA).
//
// First half (operands a, b): bit generates g = a&b and propagates p = a^b,
// then the flat carry look-ahead group terms of every prefix i:0, each a
// single AND-OR level:
//   G[i:0] = g_i | p_i g_(i-1) | p_i p_(i-1) g_(i-2) | ...,
//   P[i:0] = p_i p_(i-1) ... p_0.
// These and the bit propagates are held in the internal pipeline register.
// Second half (carry in): c_(i+1) = G[i:0] | P[i:0] & cin, s_i = p_i ^ c_i,
// cout = c_4.
//
// Timing: a and b are sampled at one clock edge; cin is used combinationally
// in the following cycle, together with the registered terms, and sum/cout
// are valid in that same cycle. This lets the speculated carry, which itself
// takes one register stage to form, enter the adder one cycle after the
// operands. Splitting the gates so that the carry in enters after the
// register is this design's choice; the source design places one register
// level across the CLA gate network.
module pcla4
  import isa_pkg::BLK;
(
  input  logic           clk,
  input  logic [BLK-1:0] a,
  input  logic [BLK-1:0] b,
  input  logic           cin,   // one cycle after a and b
  output logic [BLK-1:0] sum,
  output logic           cout
);

  logic [BLK-1:0] g, p;
  logic [BLK-1:0] grp_g, grp_p;      // prefix i:0, sum-of-products form
  logic [BLK-1:0] p_q, grp_g_q, grp_p_q;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    for (int i = 0; i < BLK; i++) begin
      logic term;
      grp_g[i] = 1'b0;
      grp_p[i] = 1'b1;
      for (int j = 0; j <= i; j++) begin
        // product term: generate at bit j, propagated through bits j+1..i
        term = g[j];
        for (int k = j + 1; k <= i; k++) term = term & p[k];
        grp_g[i] = grp_g[i] | term;
        grp_p[i] = grp_p[i] & p[j];
      end
    end
  end

  always_ff @(posedge clk) begin
    p_q     <= p;
    grp_g_q <= grp_g;
    grp_p_q <= grp_p;
  end

  logic [BLK:0] c;
  always_comb begin
    c[0] = cin;
    for (int i = 0; i < BLK; i++) c[i+1] = grp_g_q[i] | (grp_p_q[i] & cin);
  end

  assign sum  = p_q ^ c[BLK-1:0];
  assign cout = c[BLK];

endmodule
