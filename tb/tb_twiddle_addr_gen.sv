// tb_twiddle_addr_gen -- exhaustive check that the twiddle address is B with
// its 2p low bits cleared, for M=4/V=3 and M=8/V=5.
module tb_twiddle_addr_gen;
  int checks = 0, failures = 0;

  logic [2:0] p4;
  logic [3:0] b4, a4;
  logic [4:0] p8;
  logic [7:0] b8, a8;

  twiddle_addr_gen #(.M(4), .V(3)) dut4 (.pass_oh(p4), .bcnt(b4), .addr(a4));
  twiddle_addr_gen #(.M(8), .V(5)) dut8 (.pass_oh(p8), .bcnt(b8), .addr(a8));

  initial begin
    for (int p = 0; p < 3; p++)
      for (int b = 0; b < 16; b++) begin
        p4 = 3'(1 << p); b4 = 4'(b); #1;
        checks++;
        if (int'(a4) != ((b >> (2 * p)) << (2 * p))) begin
          failures++; $display("FAIL M4 p%0d b%0d -> %0d", p, b, a4);
        end
      end
    for (int p = 0; p < 5; p++)
      for (int b = 0; b < 256; b++) begin
        p8 = 5'(1 << p); b8 = 8'(b); #1;
        checks++;
        if (int'(a8) != ((b >> (2 * p)) << (2 * p))) begin
          failures++; $display("FAIL M8 p%0d b%0d -> %0d", p, b, a8);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
