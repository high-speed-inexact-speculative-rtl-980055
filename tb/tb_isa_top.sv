// tb_isa_top: end-to-end self-checking test of the pipelined inexact
// speculative adder at its default parameters (16 bits, Brent-Kung blocks).
//
// After reset the adder gets directed operand pairs that force each
// mechanism (exact result, missed carry corrected in the upper block, missed
// carry reduced into the lower block), then a long random stream with idle
// gaps in in_valid and long back-to-back runs. Every result is compared with
// an integer reference model (isa_ref_pkg): sum, carry out and the per-block
// fault / corrected / reduced flags. Checked besides:
//  * latency - each result appears exactly LATENCY clock edges after its
//    operands were sampled, and in order;
//  * throughput - one result per clock in back-to-back runs;
//  * exactness - a result with no fault flag equals a + b + cin.
// The test counts speculation faults, corrections, reductions, exact and
// inexact results and back-to-back results, and counts a failure for any of
// them that never occurred.
module tb_isa_top;
  import isa_pkg::*;
  import isa_ref_pkg::*;

  localparam int unsigned N  = 16;
  localparam int unsigned NB = N / BLK;
  localparam int NVEC = 20000;

  int checks = 0, failures = 0;
  int n_fault = 0, n_corr = 0, n_red = 0, n_exact = 0, n_inexact = 0, n_b2b = 0, n_out = 0;
  longint cycle = 0;

  logic clk = 0, rst_n = 0, in_valid = 0, cin = 0;
  logic [N-1:0] a = '0, b = '0;
  logic out_valid, cout;
  logic [N-1:0] sum;
  logic [NB-1:1] fault, corrected, reduced;

  isa_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .cin(cin),
    .out_valid(out_valid), .sum(sum), .cout(cout),
    .fault(fault), .corrected(corrected), .reduced(reduced)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    logic [N-1:0] a, b;
    logic         cin;
    longint       t_in;
  } vec_t;
  vec_t sb[$];

  initial begin
    repeat (NVEC * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record the operands at the edge that samples them
  always @(posedge clk) if (rst_n && in_valid) sb.push_back('{a, b, cin, cycle});

  // check results just after the edge that loads the output register
  longint last_out = -10;
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      vec_t v;
      isa_res_t e;
      logic [N:0] exact;
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("out_valid with no operands outstanding");
      end else begin
        v = sb.pop_front();
        e = isa_model(N, 64'(v.a), 64'(v.b), v.cin);
        exact = (N+1)'(v.a) + (N+1)'(v.b) + (N+1)'(v.cin);
        if (sum !== e.sum[N-1:0] || cout !== e.cout || fault !== e.fault[NB-1:1] ||
            corrected !== e.corrected[NB-1:1] || reduced !== e.reduced[NB-1:1]) begin
          failures++;
          if (failures < 10)
            $display("a=%h b=%h cin=%b: got sum=%h cout=%b f=%b c=%b r=%b, exp sum=%h cout=%b f=%b c=%b r=%b",
                     v.a, v.b, v.cin, sum, cout, fault, corrected, reduced,
                     e.sum[N-1:0], e.cout, e.fault[NB-1:1], e.corrected[NB-1:1], e.reduced[NB-1:1]);
        end
        checks++;
        if (cycle - v.t_in != LATENCY) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - v.t_in, LATENCY);
        end
        if (fault == '0) begin
          checks++;
          if ({cout, sum} !== exact) begin
            failures++;
            $display("no fault flagged but a=%h b=%h gave %h, exact %h", v.a, v.b, {cout, sum}, exact);
          end
        end
        n_out++;
        if (fault != '0) n_fault++;
        if (corrected != '0) n_corr++;
        if (reduced != '0) n_red++;
        if ({cout, sum} === exact) n_exact++; else n_inexact++;
        if (last_out == cycle - 1) n_b2b++;
        last_out = cycle;
      end
    end
  end

  task automatic send(logic [N-1:0] x, logic [N-1:0] y, logic c);
    @(negedge clk);
    a = x; b = y; cin = c; in_valid = 1;
  endtask

  task automatic idle(int n);
    @(negedge clk);
    in_valid = 0;
    repeat (n - 1) @(negedge clk);
  endtask

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r;
    for (int i = 0; i < N; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // exact: no carry crosses a block boundary
    send(N'('h1234), N'('h4321), 0);
    // block 0 carries out through bits 3:2 that only propagate: the guess
    // for block 1 misses it and block 1 (0 -> 1) is corrected
    send(N'('h00F), N'('h001), 0);
    // same, but block 1 is 1111 and cannot take +1: block 0 is forced to 1111
    send(N'('h0FF), N'('h001), 0);
    // all ones plus carry in: a ripple through every block
    send('1, '0, 1);
    idle(4);
    for (int n = 0; n < NVEC; n++) begin
      send(rnd(), ($urandom % 4 == 0) ? ~rnd() & rnd() : rnd(), 1'($urandom));
      if ($urandom % 64 == 0) idle(1 + $urandom % 8);
    end
    idle(LATENCY + 4);
    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("%0d results never came out", sb.size());
    end
    $display("results %0d: exact %0d, inexact %0d, with fault %0d, corrected %0d, reduced %0d, back-to-back %0d",
             n_out, n_exact, n_inexact, n_fault, n_corr, n_red, n_b2b);
    checks++;
    if (n_fault == 0 || n_corr == 0 || n_red == 0 || n_exact == 0 || n_inexact == 0 || n_b2b == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
