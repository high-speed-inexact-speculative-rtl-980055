// tb_pspec: self-checking test of the pipelined speculator.
//
// All 16 combinations of the two operand bit pairs are applied, one per
// clock, in a random order repeated many times. One cycle later c_spec must
// equal the carry out of the two-bit sum a[1:0] + b[1:0] (carry in 0), which
// is the speculator's definition; the one-cycle latency is checked by
// checking, before the next edge, that c_spec still belongs to the operands
// of the previous cycle.
module tb_pspec;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [1:0] a, b;
  logic c_spec;
  logic [1:0] a_prev, b_prev;

  pspec dut (.clk(clk), .a(a), .b(b), .c_spec(c_spec));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      a_prev = a; b_prev = b;
      a = (n < 16) ? 2'(n) : 2'($urandom);
      b = (n < 16) ? 2'(n >> 2) : 2'($urandom);
      #1;
      // new operands not yet sampled: c_spec still belongs to the old ones
      checks++;
      if (c_spec !== ((3'(a_prev) + 3'(b_prev)) >> 2)) begin
        failures++;
        $display("latency: a=%b b=%b: c_spec=%b", a_prev, b_prev, c_spec);
      end
      @(posedge clk);
      #1;
      // c_spec now reflects the operands sampled at this edge
      checks++;
      if (c_spec !== ((3'(a) + 3'(b)) >> 2)) begin
        failures++;
        $display("a=%b b=%b: c_spec=%b", a, b, c_spec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
