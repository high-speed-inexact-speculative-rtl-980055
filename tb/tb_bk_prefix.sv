// tb_bk_prefix: self-checking test of the Brent-Kung prefix network.
//
// Two instances, W = 8 (the default) and W = 16. For every operand pair the
// group generate of prefix i:0 must equal the carry out of bit i of the plain
// integer sum a[i:0] + b[i:0], and the group propagate must be the AND of the
// bit propagates a^b over i:0. The 8-bit network is tested exhaustively
// (65,536 pairs), the 16-bit one with 20,000 random pairs plus the carry
// chain extremes. A watchdog ends the run if it hangs.
module tb_bk_prefix;
  import isa_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] a16, b16;
  gp_t in8 [8], out8 [8], in16 [16], out16 [16];

  always_comb for (int i = 0; i < 8; i++)  in8[i]  = '{g: a8[i] & b8[i], p: a8[i] ^ b8[i]};
  always_comb for (int i = 0; i < 16; i++) in16[i] = '{g: a16[i] & b16[i], p: a16[i] ^ b16[i]};

  bk_prefix dut8 (.gp_in(in8), .gp_out(out8));
  bk_prefix #(.W(16)) dut16 (.gp_in(in16), .gp_out(out16));

  task automatic check8();
    for (int i = 0; i < 8; i++) begin
      longint unsigned m = (64'd1 << (i + 1)) - 1;
      logic exp_g = (((a8 & m) + (b8 & m)) >> (i + 1)) & 1;
      logic exp_p = (((a8 ^ b8) & m) == m);
      checks++;
      if (out8[i].g !== exp_g || out8[i].p !== exp_p) begin
        failures++;
        if (failures < 10) $display("W=8 a=%h b=%h bit %0d: got g=%b p=%b exp g=%b p=%b",
                                    a8, b8, i, out8[i].g, out8[i].p, exp_g, exp_p);
      end
    end
  endtask

  task automatic check16();
    for (int i = 0; i < 16; i++) begin
      longint unsigned m = (64'd1 << (i + 1)) - 1;
      logic exp_g = (((a16 & m) + (b16 & m)) >> (i + 1)) & 1;
      logic exp_p = (((a16 ^ b16) & m) == m);
      checks++;
      if (out16[i].g !== exp_g || out16[i].p !== exp_p) begin
        failures++;
        if (failures < 10) $display("W=16 a=%h b=%h bit %0d: got g=%b p=%b exp g=%b p=%b",
                                    a16, b16, i, out16[i].g, out16[i].p, exp_g, exp_p);
      end
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1 check8();
      end
    a16 = 16'hFFFF; b16 = 16'h0001; #1 check16();
    a16 = 16'h7FFF; b16 = 16'h7FFF; #1 check16();
    a16 = 16'h5555; b16 = 16'hAAAA; #1 check16();
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1 check16();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
