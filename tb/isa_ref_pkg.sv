// isa_ref_pkg: reference model of the inexact speculative adder for the
// testbenches, written with plain integer arithmetic rather than gates.
//
// For an n-bit adder (n a multiple of 4, at most 64):
//   carry into block 0 = cin; guessed carry into block k = carry out of the
//   two-bit sum a[4k-1:4k-2] + b[4k-1:4k-2];
//   raw block sum and carry out = a_k + b_k + carry in of block k;
//   block k (k >= 1) is wrong when the carry out of block k-1 differs from
//   its guessed carry in; it is then moved by +1/-1 if that stays inside 4
//   bits, otherwise block k-1 is forced to all ones / all zeros;
//   a forced block k-1 ignores its own correction; cout is the raw carry out
//   of the top block.
package isa_ref_pkg;

  typedef struct {
    logic [63:0] sum;
    logic        cout;
    logic [15:0] fault, corrected, reduced;
  } isa_res_t;

  function automatic isa_res_t isa_model(int n, logic [63:0] a, logic [63:0] b, logic cin);
    isa_res_t r;
    int nb = n / 4;
    int unsigned cin_k [16], s_k [16], co_k [16];
    r.sum = '0; r.fault = '0; r.corrected = '0; r.reduced = '0;
    for (int k = 0; k < nb; k++) begin
      int unsigned ak = int'((a >> (4 * k)) & 64'hF);
      int unsigned bk = int'((b >> (4 * k)) & 64'hF);
      int unsigned raw;
      if (k == 0) cin_k[k] = cin;
      else cin_k[k] = ((int'((a >> (4 * k - 2)) & 64'h3) + int'((b >> (4 * k - 2)) & 64'h3)) >= 4) ? 1 : 0;
      raw = ak + bk + cin_k[k];
      s_k[k]  = raw % 16;
      co_k[k] = raw / 16;
    end
    // corrections
    for (int k = 1; k < nb; k++) begin
      if (co_k[k-1] != cin_k[k]) begin
        r.fault[k] = 1'b1;
        if (co_k[k-1] == 1) begin
          if (s_k[k] != 15) r.corrected[k] = 1'b1; else r.reduced[k] = 1'b1;
        end else begin
          if (s_k[k] != 0)  r.corrected[k] = 1'b1; else r.reduced[k] = 1'b1;
        end
      end
    end
    for (int k = 0; k < nb; k++) begin
      int unsigned v = s_k[k];
      if (r.corrected[k]) v = (co_k[k-1] == 1) ? v + 1 : v - 1;
      if (k + 1 < nb && r.reduced[k+1]) v = (co_k[k] == 1) ? 15 : 0;
      r.sum |= 64'(v % 16) << (4 * k);
    end
    r.cout = co_k[nb-1][0];
    return r;
  endfunction

endpackage
