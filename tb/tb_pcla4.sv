// tb_pcla4: self-checking test of the four-bit pipelined carry look-ahead adder.
//
// All 512 combinations of a, b and cin are applied back to back, one per
// clock, then 2,000 random ones. The operands go in before a clock edge, the
// carry in just after it (as in the ISA pipeline, where the speculated carry
// arrives one cycle after the operands), and sum/cout must then equal
// a + b + cin. Before the edge the outputs must still show the previous
// result, which checks the one-register latency of the operand path.
module tb_pcla4;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [3:0] a, b, sum;
  logic cin, cout;
  logic [4:0] prev_exp;

  pcla4 dut (.clk(clk), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] na, nb;
    logic       nc;
    prev_exp = 'x;
    a = 0; b = 0; cin = 0;
    for (int n = 0; n < 2512; n++) begin
      na = (n < 512) ? 4'(n) : 4'($urandom);
      nb = (n < 512) ? 4'(n >> 4) : 4'($urandom);
      nc = (n < 512) ? n[8] : 1'($urandom);
      a = na; b = nb;
      #1;
      if (n > 0) begin
        checks++;
        if ({cout, sum} !== prev_exp) begin
          failures++;
          $display("latency: outputs changed before the edge, got %h exp %h", {cout, sum}, prev_exp);
        end
      end
      @(posedge clk);
      #1 cin = nc;
      #1;
      prev_exp = 5'(na) + 5'(nb) + 5'(nc);
      checks++;
      if ({cout, sum} !== prev_exp) begin
        failures++;
        if (failures < 10) $display("a=%h b=%h cin=%b: got %h exp %h", na, nb, nc, {cout, sum}, prev_exp);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
