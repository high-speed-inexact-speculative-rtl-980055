// isa_pkg: types, constants and prefix-cell functions shared by the blocks of
// the pipelined inexact speculative adder (ISA).
//
// The adder splits an n-bit addition into 4-bit blocks (BLK). Each block is a
// two-stage pipelined 4-bit adder, either a carry look-ahead adder or a
// Brent-Kung prefix adder (ADDER_CLA / ADDER_BKA). The carry into every block
// but the lowest is guessed by a speculator and checked afterwards by a
// compensator. The whole adder has five pipeline stages between six register
// levels, so a result leaves the output register six clock edges after its
// operands were sampled (LATENCY).
//
// The generate/propagate pair and the black and gray cells of a parallel-prefix
// network are defined here so that the prefix network and the adders share one
// definition. A black cell combines two (G,P) pairs; a gray cell only forms the
// group generate.
package isa_pkg;

  // Width of one adder block (x = 4 in the source design).
  localparam int unsigned BLK = 4;

  // Number of register levels an operand pair crosses, input to output.
  localparam int unsigned LATENCY = 6;

  // Which 4-bit adder the ISA uses in every block.
  typedef enum logic {
    ADDER_CLA = 1'b0,  // pipelined carry look-ahead adder (PCLA)
    ADDER_BKA = 1'b1   // pipelined Brent-Kung adder (p-BKA)
  } adder_kind_e;

  // Generate / propagate pair of one bit or of a group of bits.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // Black cell: (G,P) of the high group combined with the low group below it.
  function automatic gp_t black_cell(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Gray cell: only the group generate, for a prefix that ends at bit 0 with
  // an external carry in as the low "group".
  function automatic logic gray_cell(gp_t hi, logic lo_g);
    return hi.g | (hi.p & lo_g);
  endfunction

endpackage
