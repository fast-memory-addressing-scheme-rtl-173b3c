// tb_radix4_butterfly -- random operands and twiddles, one per clock, with
// gaps; each result is compared with the butterfly equations evaluated in
// the testbench on real and imaginary parts (scaled by 1/4, rounded, clipped
// like the hardware). Checks that out_valid follows in_valid by exactly four
// clocks and that a clipping input raises sat.
module tb_radix4_butterfly;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid, out_valid, sat;
  cplx_t x [4], y [4];
  twid_t w [4];

  radix4_butterfly dut (.*);

  typedef struct { longint r[4]; longint i[4]; bit clip; } res_t;
  res_t q [$];
  int   n_sat = 0;

  function automatic longint sc(longint v, ref bit clip);
    longint r = (v + 32768) >>> 16;
    if (r > 32767)  begin clip = 1; return 32767; end
    if (r < -32768) begin clip = 1; return -32768; end
    return r;
  endfunction

  // equations as printed for the design, real and imaginary parts
  function automatic res_t ref_bf();
    res_t o;
    longint xa = x[0].re, ya = x[0].im, xb = x[1].re, yb = x[1].im;
    longint xc = x[2].re, yc = x[2].im, xd = x[3].re, yd = x[3].im;
    longint rb = w[1].re, ib = w[1].im, rc = w[2].re, ic = w[2].im;
    longint rd = w[3].re, id = w[3].im;
    o.clip = 0;
    o.r[0] = sc((xa + xb + xc + xd) * 16384, o.clip);
    o.i[0] = sc((ya + yb + yc + yd) * 16384, o.clip);
    o.r[1] = sc((xa + yb - xc - yd) * rb - (ya - xb - yc + xd) * ib, o.clip);
    o.i[1] = sc((ya - xb - yc + xd) * rb + (xa + yb - xc - yd) * ib, o.clip);
    o.r[2] = sc((xa - xb + xc - xd) * rc - (ya - yb + yc - yd) * ic, o.clip);
    o.i[2] = sc((ya - yb + yc - yd) * rc + (xa - xb + xc - xd) * ic, o.clip);
    o.r[3] = sc((xa - yb - xc + yd) * rd - (ya + xb - yc - xd) * id, o.clip);
    o.i[3] = sc((ya + xb - yc - xd) * rd + (xa - yb - xc + yd) * id, o.clip);
    return o;
  endfunction

  // results leave in order; compare at the negedge after each edge
  logic [7:0] vhist;
  always @(negedge clk) begin
    res_t e;
    vhist <= {vhist[6:0], in_valid};
    if (rst_n) begin
      checks++;
      if (out_valid != vhist[3]) begin
        failures++; $display("FAIL latency: out_valid=%0d", out_valid);
      end
      if (out_valid) begin
        e = q.pop_front();
        checks++;
        if (sat != e.clip) begin failures++; $display("FAIL sat=%0d", sat); end
        if (sat) n_sat++;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (longint'(y[k].re) != e.r[k] || longint'(y[k].im) != e.i[k]) begin
            failures++;
            $display("FAIL out %0d: %0d,%0d expected %0d,%0d", k,
                     int'(y[k].re), int'(y[k].im), e.r[k], e.i[k]);
          end
        end
      end
    end
  end

  task automatic drive(bit v);
    @(posedge clk);
    #1;
    in_valid = v;
    if (v) q.push_back(ref_bf());
  endtask

  initial begin
    real ang;
    vhist = '0;
    in_valid = 1'b0;
    for (int k = 0; k < 4; k++) begin x[k] = '0; w[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        x[k].re = 16'($urandom_range(46000) - 23000);
        x[k].im = 16'($urandom_range(46000) - 23000);
        ang = 2.0 * 3.14159265358979 * real'($urandom_range(1023)) / 1024.0;
        w[k].re = 16'(int'($floor(16384.0 * $cos(ang) + 0.5)));
        w[k].im = 16'(int'($floor(-16384.0 * $sin(ang) + 0.5)));
      end
      if (n == 151) begin  // b' = 4(1+j)*32767 turned by -45 degrees: clips
        x[0] = '{re: 32767,  im: 32767};
        x[1] = '{re: -32768, im: 32767};
        x[2] = '{re: -32768, im: -32768};
        x[3] = '{re: 32767,  im: -32768};
        w[1] = '{re: 11585,  im: -11585};
      end
      in_valid = (n % 7 != 3);
      if (in_valid) q.push_back(ref_bf());
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (8) @(negedge clk);
    checks++;
    if (n_sat == 0 || q.size() != 0) begin
      failures++; $display("FAIL sat seen %0d, %0d results missing", n_sat, q.size());
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
