// tb_reorder_regs -- drives both register-set variants with a counter-style
// B sequence and tagged words, and checks the transpose property: a word
// loaded in group g, slot t, lane x leaves in group g+1 on slot x, lane t
// (passes 1..), or on slot t, lane x (pass 0). It also replays the first
// nine clocks of pass 1 of the 64-point transform with bank words tagged by
// their sample address and compares the input-set registers with the
// address table of the design (R0-R3 = 0,4,8,12 after clock 3, then
// R0-R3 = 1,17,33,49, R4-R7 = 5,21,37,53, R0/R4/R8/R12 = 2,18,34,50).
module tb_reorder_regs;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] b;
  logic       p0, we;
  cplx_t      din [4], dout_a [4], dout_b [4];

  reorder_regs #(.ROW_FIRST(1'b0)) dut_a (.clk, .bcnt_lsb(b), .pass0(p0), .wr_en(we), .din, .dout(dout_a));
  reorder_regs #(.ROW_FIRST(1'b1)) dut_b (.clk, .bcnt_lsb(b), .pass0(p0), .wr_en(we), .din, .dout(dout_b));

  function automatic cplx_t tag(int g, int t, int x);
    return '{re: 16'(g), im: 16'(16 * t + x)};
  endfunction

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic int rr2(int v);  // RR(v, 2) on 4 bits
    return ((v >> 2) | (v << 2)) & 15;
  endfunction

  initial begin
    cplx_t e;
    we = 1'b1; p0 = 1'b0; b = '0;
    for (int pass0 = 0; pass0 < 2; pass0++)
      for (int c = 0; c < 64; c++) begin
        @(negedge clk);
        p0 = pass0[0];
        b  = 3'(c % 8);
        for (int x = 0; x < 4; x++) din[x] = tag(c / 4, c % 4, x);
        #1;
        if (c >= 4 + 4)  // both groups of this pass seen
          for (int l = 0; l < 4; l++) begin
            e = pass0 ? tag(c / 4 - 1, c % 4, l) : tag(c / 4 - 1, l, c % 4);
            chk(dout_a[l] == e && dout_b[l] == e,
                $sformatf("p0=%0d clk %0d lane %0d: %h/%h expected %h",
                          pass0, c, l, dout_a[l], dout_b[l], e));
          end
      end
    // pass-1 replay: bank j at clock c returns sample 16*j + RR(c, 2)
    for (int c = 0; c < 9; c++) begin
      @(negedge clk);
      p0 = 1'b0;
      b  = 3'(c % 8);
      for (int j = 0; j < 4; j++) din[j] = '{re: 16'(16 * j + rr2(c)), im: '0};
      @(posedge clk);
      #1;
      case (c)
        3: chk(dut_a.regs[0].re == 0 && dut_a.regs[1].re == 4 && dut_a.regs[2].re == 8 &&
               dut_a.regs[3].re == 12 && dut_a.regs[4].re == 16 && dut_a.regs[15].re == 60,
               "table clock 3");
        4: chk(dut_a.regs[0].re == 1 && dut_a.regs[1].re == 17 && dut_a.regs[2].re == 33 &&
               dut_a.regs[3].re == 49 && dut_a.regs[4].re == 16, "table clock 4");
        5: chk(dut_a.regs[4].re == 5 && dut_a.regs[5].re == 21 && dut_a.regs[6].re == 37 &&
               dut_a.regs[7].re == 53, "table clock 5");
        8: chk(dut_a.regs[0].re == 2 && dut_a.regs[4].re == 18 && dut_a.regs[8].re == 34 &&
               dut_a.regs[12].re == 50 && dut_a.regs[1].re == 17, "table clock 8");
        default: ;
      endcase
    end
    // wr_en low: contents are kept
    @(negedge clk);
    we = 1'b0;
    for (int j = 0; j < 4; j++) din[j] = '{re: 16'h7fff, im: '0};
    @(posedge clk);
    #1;
    chk(dut_a.regs[1].re == 17 && dut_a.regs[5].re == 21, "hold with wr_en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
