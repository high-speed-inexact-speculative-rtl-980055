// pspec: pipelined carry speculator (PSPEC) of one block boundary.
//
// It guesses the carry into block i from the two most significant bit pairs
// of block i-1 alone, using carry look-ahead logic with the carry into those
// two bits taken as 0:  c_spec = g1 | p1 & g0, where g/p are the generate and
// propagate of bits ix-1 (index 1) and ix-2 (index 0). Because a generate is
// certain whatever the lower bits do, a guess of 1 is always right; a guess of
// 0 can miss a carry that ripples in from further below, which the
// compensator detects later.
//
// Pipelining: the first half (the two generates and the propagate) ends in an
// internal register; the second half (AND and OR) is combinational from that
// register to c_spec.
// Timing: c_spec belongs to the operands applied one clock edge earlier.
// The two-bit window, the split of the gates around the register and the
// function follow the source design; using XOR for the propagate is this
// design's choice (OR would give the same result).
module pspec (
  input  logic       clk,
  input  logic [1:0] a,       // operand A bits ix-1 (a[1]) and ix-2 (a[0])
  input  logic [1:0] b,       // operand B bits ix-1 (b[1]) and ix-2 (b[0])
  output logic       c_spec   // speculated carry into block i
);

  logic g1_q, p1_q, g0_q;

  always_ff @(posedge clk) begin
    g1_q <= a[1] & b[1];
    p1_q <= a[1] ^ b[1];
    g0_q <= a[0] & b[0];
  end

  assign c_spec = g1_q | (p1_q & g0_q);

endmodule
