// bk_prefix: Brent-Kung parallel-prefix network (combinational).
//
// Given the bit-level generate/propagate pairs gp_in[i] of a W-bit addition,
// it returns for every bit i the group pair gp_out[i] of the prefix i:0, from
// which the carry out of bit i is gp_out[i].g | gp_out[i].p & cin.
//
// Structure, as in the classic Brent-Kung network: a forward binary tree of
// black cells builds the prefixes 1:0, 3:0, 7:0, ... (the groups of 2, 4,
// 8 bits); a reverse tree then fans those prefixes back down to fill in the
// remaining positions. That takes 2*log2(W)-1 cell levels and no cell drives
// more than two others. The buffers of the textbook drawing carry no logic and
// are left out. Every cell here is a black cell, so that the group propagate
// of each prefix is also available to callers that add a carry in afterwards.
//
// Parameters: W, a power of two, default 8 (the 8-bit network of the source
// design; its 16-bit drawing is W = 16).
// Timing: purely combinational, no clock.
module bk_prefix
  import isa_pkg::gp_t, isa_pkg::black_cell;
#(
  parameter int unsigned W = 8
) (
  input  gp_t gp_in  [W],
  output gp_t gp_out [W]
);

  localparam int unsigned LEVELS = $clog2(W);

  initial begin
    assert (W >= 2 && (1 << LEVELS) == W)
      else $error("bk_prefix: W must be a power of two, got %0d", W);
  end

  always_comb begin
    gp_t node [W];
    for (int i = 0; i < W; i++) node[i] = gp_in[i];

    // Forward tree: at level l, bit i with (i+1) a multiple of 2^(l+1)
    // absorbs the group that ends 2^l bits below it.
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < W; i++) begin
        if (((i + 1) % (1 << (l + 1))) == 0)
          node[i] = black_cell(node[i], node[i - (1 << l)]);
      end
    end

    // Reverse tree: at level l (from the top down), bit i = 3*2^l-1,
    // 5*2^l-1, ... takes the finished prefix that ends 2^l bits below it.
    for (int l = int'(LEVELS) - 2; l >= 0; l--) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (3 << l) - 1 && ((i + 1) % (1 << (l + 1))) == (1 << l))
          node[i] = black_cell(node[i], node[i - (1 << l)]);
      end
    end

    for (int i = 0; i < W; i++) gp_out[i] = node[i];
  end

endmodule
