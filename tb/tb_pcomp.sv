// tb_pcomp: self-checking test of the pipelined compensator.
//
// All 1,024 combinations of the lower sum, lower carry out, upper sum and
// speculated carry are applied, one per clock, then 2,000 random ones. One
// cycle later the outputs are compared with a reference worked out here:
// no error -> both sums pass unchanged; missed carry -> upper sum + 1, or
// lower sum forced to 1111 when the upper sum is 1111; wrongly assumed
// carry -> upper sum - 1, or lower sum forced to 0000 when the upper sum is
// 0000. Before the clock edge the outputs must still show the previous
// vector's result (one-register latency). Each of the four compensation
// cases must occur at least once.
module tb_pcomp;
  int checks = 0, failures = 0;
  int n_inc = 0, n_dec = 0, n_red_hi = 0, n_red_lo = 0;
  logic clk = 0;
  logic [3:0] s_lo, s_up, s_up_corr, s_lo_bal;
  logic cout_lo, c_spec_up, fault, corrected, reduced;

  pcomp dut (.clk(clk), .s_lo(s_lo), .cout_lo(cout_lo), .s_up(s_up), .c_spec_up(c_spec_up),
             .s_up_corr(s_up_corr), .s_lo_bal(s_lo_bal), .fault(fault),
             .corrected(corrected), .reduced(reduced));

  always #5 clk = ~clk;

  typedef struct packed {
    logic [3:0] up, lo;
    logic f, c, r;
  } res_t;

  function automatic res_t ref_model(logic [3:0] lo, logic co, logic [3:0] up, logic cs);
    res_t r;
    r = '{up: up, lo: lo, f: co != cs, c: 1'b0, r: 1'b0};
    if (co && !cs) begin                 // carry missed: result too small
      if (up != 4'd15) begin r.up = up + 4'd1; r.c = 1; end
      else             begin r.lo = 4'd15;     r.r = 1; end
    end else if (!co && cs) begin        // carry wrongly assumed: too large
      if (up != 4'd0)  begin r.up = up - 4'd1; r.c = 1; end
      else             begin r.lo = 4'd0;      r.r = 1; end
    end
    return r;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    res_t exp_r, prev_r, got;
    for (int n = 0; n < 3024; n++) begin
      logic [9:0] v;
      v = (n < 1024) ? 10'(n) : 10'($urandom);
      {s_lo, cout_lo, s_up, c_spec_up} = v;
      exp_r = ref_model(s_lo, cout_lo, s_up, c_spec_up);
      #1;
      got = '{up: s_up_corr, lo: s_lo_bal, f: fault, c: corrected, r: reduced};
      if (n > 0) begin
        checks++;
        if (got !== prev_r) begin
          failures++;
          $display("latency: outputs changed before the edge");
        end
      end
      @(posedge clk);
      #1;
      got = '{up: s_up_corr, lo: s_lo_bal, f: fault, c: corrected, r: reduced};
      checks++;
      if (got !== exp_r) begin
        failures++;
        if (failures < 10)
          $display("lo=%h co=%b up=%h cs=%b: got %p exp %p", s_lo, cout_lo, s_up, c_spec_up, got, exp_r);
      end
      if (exp_r.c && cout_lo)  n_inc++;
      if (exp_r.c && !cout_lo) n_dec++;
      if (exp_r.r && cout_lo)  n_red_hi++;
      if (exp_r.r && !cout_lo) n_red_lo++;
      prev_r = exp_r;
      @(negedge clk);
    end
    $display("corrections +1: %0d, -1: %0d; reductions to 1111: %0d, to 0000: %0d",
             n_inc, n_dec, n_red_hi, n_red_lo);
    checks++;
    if (n_inc == 0 || n_dec == 0 || n_red_hi == 0 || n_red_lo == 0) begin
      failures++;
      $display("a compensation case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
