// pcomp: pipelined compensator (PCOMP) between block i-1 (lower) and block i
// (upper).
//
// An XOR of the lower block's carry out and the carry that was speculated
// into the upper block gives the error flag fe. On an error the compensator
// does one of two things, chosen by a de-multiplexer:
//  * correction - the upper block's sum is moved by one to what the real
//    carry would have given: +1 when a carry was missed (cout_lo = 1), -1 when
//    a carry was wrongly assumed (cout_lo = 0). This is possible unless the
//    step would leave the block (upper sum all ones for +1, all zeros for -1);
//  * reduction (balancing) - when correction is not possible, the lower
//    block's sum is forced to all ones (missed carry) or all zeros (wrongly
//    assumed carry), which moves the result as far towards the exact sum as
//    the lower block allows.
// Both directions are built. With the speculator of this adder, which only
// ever misses carries, the -1 / all-zeros direction is never used by the ISA.
//
// Pipelining: first half - error flag, direction, the incremented or
// decremented upper sum and the "correction possible" test, all registered;
// second half - the output multiplexers.
// Timing: inputs are sampled at a clock edge; outputs are combinational from
// the internal register, valid the cycle after.
// The XOR error flag, incrementer, de-multiplexer and multiplexers follow the
// source design; which test selects reduction and that the whole lower block
// is balanced are this design's choices.
module pcomp
  import isa_pkg::BLK;
(
  input  logic           clk,
  input  logic [BLK-1:0] s_lo,       // sum of the lower block i-1
  input  logic           cout_lo,    // carry out of the lower block i-1
  input  logic [BLK-1:0] s_up,       // sum of the upper block i
  input  logic           c_spec_up,  // carry that was speculated into block i
  output logic [BLK-1:0] s_up_corr,  // corrected upper sum
  output logic [BLK-1:0] s_lo_bal,   // balanced lower sum
  output logic           fault,      // speculation error detected
  output logic           corrected,  // error corrected in the upper block
  output logic           reduced     // error reduced in the lower block
);

  logic           fe, up, can;
  logic [BLK-1:0] adj;

  assign fe  = cout_lo ^ c_spec_up;
  assign up  = cout_lo;                       // 1: the real carry was 1
  assign adj = up ? s_up + 1'b1 : s_up - 1'b1;
  assign can = up ? ~&s_up : |s_up;           // step stays inside the block

  logic           fe_q, up_q, can_q;
  logic [BLK-1:0] adj_q, s_up_q, s_lo_q;

  always_ff @(posedge clk) begin
    fe_q   <= fe;
    up_q   <= up;
    can_q  <= can;
    adj_q  <= adj;
    s_up_q <= s_up;
    s_lo_q <= s_lo;
  end

  // de-multiplexer: route the error to correction or to reduction
  assign fault     = fe_q;
  assign corrected = fe_q & can_q;
  assign reduced   = fe_q & ~can_q;

  assign s_up_corr = corrected ? adj_q : s_up_q;
  assign s_lo_bal  = reduced ? {BLK{up_q}} : s_lo_q;

endmodule
