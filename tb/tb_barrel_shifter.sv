// tb_barrel_shifter -- exhaustive check of RR(B, 2p) for the 64-point
// (M=4, V=3) and 1024-point (M=8, V=5) sizes, plus the pass-1 read
// addresses of the 64-point address table (0, 4, 8, 12, 1, 5, ...).
module tb_barrel_shifter;
  int checks = 0, failures = 0;

  logic [2:0] p4;
  logic [3:0] b4, a4;
  logic [4:0] p8;
  logic [7:0] b8, a8;

  barrel_shifter #(.M(4), .V(3)) dut4 (.pass_oh(p4), .bcnt(b4), .addr(a4));
  barrel_shifter #(.M(8), .V(5)) dut8 (.pass_oh(p8), .bcnt(b8), .addr(a8));

  function automatic int rr(int x, int sh, int m);
    sh = sh % m;
    return ((x >> sh) | (x << (m - sh))) & ((1 << m) - 1);
  endfunction

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int p = 0; p < 3; p++)
      for (int b = 0; b < 16; b++) begin
        p4 = 3'(1 << p); b4 = 4'(b); #1;
        chk(int'(a4) == rr(b, 2 * p, 4), $sformatf("M4 p%0d b%0d -> %0d", p, b, a4));
      end
    for (int p = 0; p < 5; p++)
      for (int b = 0; b < 256; b++) begin
        p8 = 5'(1 << p); b8 = 8'(b); #1;
        chk(int'(a8) == rr(b, 2 * p, 8), $sformatf("M8 p%0d b%0d -> %0d", p, b, a8));
      end
    // pass 1 of the 64-point transform: bank-0 words 0,4,8,12 then 1,5,9,13
    begin
      int exp_a [8] = '{0, 4, 8, 12, 1, 5, 9, 13};
      for (int b = 0; b < 8; b++) begin
        p4 = 3'b010; b4 = 4'(b); #1;
        chk(int'(a4) == exp_a[b], $sformatf("table pass1 b%0d -> %0d", b, a4));
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
