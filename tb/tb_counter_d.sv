// tb_counter_d -- runs two transforms of the 64-point controller and one of
// the 256-point controller and checks, clock by clock: B counts 0..N/4-1 on
// the read clocks of each pass, P is one-hot and steps 1, 2, 4, ...; between
// passes there are 7 clocks without reads for N = 64 and none for N = 256,
// the last pass is followed by 13 drain clocks, busy covers the whole
// transform, and done pulses once, V*N/4 + (V-1)*gap + 13 clocks after start.
module tb_counter_d;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start;
  logic [2:0] p64;
  logic [3:0] b64;
  logic       rv64, dr64, busy64, done64;
  logic [3:0] p256;
  logic [5:0] b256;
  logic       rv256, dr256, busy256, done256;

  counter_d #(.N(64)) dut64 (.clk, .rst_n, .start, .pass_oh(p64), .bcnt(b64),
    .rd_valid(rv64), .draining(dr64), .busy(busy64), .done(done64));
  counter_d #(.N(256)) dut256 (.clk, .rst_n, .start, .pass_oh(p256), .bcnt(b256),
    .rd_valid(rv256), .draining(dr256), .busy(busy256), .done(done256));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // expected behaviour after the clock that took start, clock c = 1, 2, ...
  // g is the gap between passes: 7 clocks for N = 64, none for N = 256
  task automatic expect_clock(int n, int g, int c, int p_oh, int b, bit rv,
                              bit dr, bit bz, bit dn);
    int v = $clog2(n) / 2, per = n / 4 + g, idx = c - 1;
    int total = v * (n / 4) + (v - 1) * g + 13;
    int pass = idx / per, k = idx % per;
    bit e_bz, e_rv, e_dr;
    if (pass > v - 1) begin
      pass = v - 1;
      k    = idx - (v - 1) * per;
    end
    e_bz = idx < total;
    e_rv = e_bz && (k < n / 4);
    e_dr = e_bz && !e_rv;
    chk(rv == e_rv && dr == e_dr && bz == e_bz && dn == (idx == total),
        $sformatf("N%0d clk %0d: rv%0d dr%0d busy%0d done%0d", n, c, rv, dr, bz, dn));
    if (e_rv) chk(p_oh == (1 << pass) && b == k,
                  $sformatf("N%0d clk %0d: P=%0d B=%0d", n, c, p_oh, b));
  endtask

  initial begin
    start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!busy64 && !busy256 && !done64, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      for (int c = 1; c <= 4 * 64 + 13 + 2; c++) begin
        if (c <= 3 * 16 + 2 * 7 + 13 + 1)
          expect_clock(64, 7, c, int'(p64), int'(b64), rv64, dr64, busy64, done64);
        if (run == 0)
          expect_clock(256, 0, c, int'(p256), int'(b256), rv256, dr256, busy256, done256);
        @(negedge clk);
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
