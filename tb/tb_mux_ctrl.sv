// tb_mux_ctrl -- exhaustive check of the register selects of both register
// sets against the orientation rules: input set columns in even groups and
// rows in odd groups, output set the other way round; in pass 0 each set
// keeps its even-group orientation; register 4*i + j is row i, column j.
module tb_mux_ctrl;
  int checks = 0, failures = 0;

  logic [2:0] b;
  logic       p0;
  logic [3:0] s_in [4], s_out [4];

  mux_ctrl #(.ROW_FIRST(1'b0)) dut_in  (.bcnt_lsb(b), .pass0(p0), .sel(s_in));
  mux_ctrl #(.ROW_FIRST(1'b1)) dut_out (.bcnt_lsb(b), .pass0(p0), .sel(s_out));

  initial begin
    int t, col_in, col_out, e_in, e_out;
    for (int pp = 0; pp < 2; pp++)
      for (int bb = 0; bb < 8; bb++) begin
        b = 3'(bb); p0 = pp[0]; #1;
        t       = bb % 4;
        col_in  = (pp == 1) || (bb < 4);
        col_out = (pp == 0) && (bb >= 4);
        for (int x = 0; x < 4; x++) begin
          e_in  = col_in  ? 4 * x + t : 4 * t + x;
          e_out = col_out ? 4 * x + t : 4 * t + x;
          checks++;
          if (int'(s_in[x]) != e_in || int'(s_out[x]) != e_out) begin
            failures++;
            $display("FAIL b=%0d p0=%0d lane %0d: %0d/%0d expected %0d/%0d",
                     bb, pp, x, s_in[x], s_out[x], e_in, e_out);
          end
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
