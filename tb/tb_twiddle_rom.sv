// tb_twiddle_rom -- reads every word of the three 64-point twiddle memories
// (K = 1, 2, 3) and compares it with W_64^(K*a) rounded to Q1.14, checks a
// few exact values, and checks the one-clock read latency.
module tb_twiddle_rom;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] addr;
  twid_t w [3];

  for (genvar k = 0; k < 3; k++) begin : g
    twiddle_rom #(.N(64), .K(k + 1)) dut (.clk, .addr, .w(w[k]));
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic int q14(real x);
    return int'($floor(x * 16384.0 + 0.5));
  endfunction

  initial begin
    real ang;
    addr = '0;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk) addr = 4'(a);
      @(negedge clk);
      for (int k = 1; k <= 3; k++) begin
        ang = 2.0 * 3.14159265358979 * real'(k * a) / 64.0;
        chk(int'(w[k-1].re) == q14($cos(ang)) && int'(w[k-1].im) == q14(-$sin(ang)),
            $sformatf("K%0d a%0d: %0d,%0d", k, a, w[k-1].re, w[k-1].im));
      end
    end
    // exact points: W^0 = 1, W_64^8 = (1-j)/sqrt2, W_64^16 = -j, W_64^24 = -(1+j)/sqrt2
    @(negedge clk) addr = 4'd0;
    @(negedge clk);
    chk(w[0].re == 16384 && w[0].im == 0 && w[2].re == 16384, "W^0");
    @(negedge clk) addr = 4'd8;
    // latency: the output still shows address 0 right after the change
    chk(w[0].re == 16384 && w[0].im == 0, "one-clock read latency");
    @(negedge clk);
    chk(w[0].re == 11585 && w[0].im == -11585, "W^8");
    chk(w[1].re == 0 && w[1].im == -16384, "W^16");
    chk(w[2].re == -11585 && w[2].im == -11585, "W^24");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
