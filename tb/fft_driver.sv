// fft_driver -- stimulus and checking for one fft_radix4 instance.
//
// Generates clock and reset, then runs three transforms through the host
// port:
//   1 random samples (|part| < 16000), which must not clip;
//   2 samples built to make one pass-0 butterfly result exceed 16 bits,
//     which must clip and raise ovf; the host also writes and pulses start
//     during the transform, which must both be ignored;
//   3 a second random set started right after the previous read-out.
// Every result word is compared bit for bit with fft_model_pkg::fft_fixed,
// and for the unclipped sets also with a floating-point DFT/N at the
// digit-reversed address (tolerance 2+V LSB). The clock count from start to
// done is checked against V*N/4 + (V-1)*gap + 13, the gap
// between passes being 7 clocks for N = 64 and none for N >= 256, and the
// butterfly must take operands on every clock of a pass (of the whole
// transform when there is no gap). The obs_* inputs watch the
// register-set control so that the parent testbench can report how often
// each mechanism occurred; a mechanism that never occurs is a failure.
module fft_driver
  import fft_pkg::*;
  import fft_model_pkg::*;
#(
  parameter int N    = 64,
  parameter int SEED = 1
) (
  output logic                        clk,
  output logic                        rst_n,
  output logic                        start,
  input  logic                        busy,
  input  logic                        done,
  input  logic                        ovf,
  output logic                        host_we,
  output logic [$clog2(N)-1:0]        host_waddr,
  output cplx_t                       host_wdata,
  output logic [$clog2(N)-1:0]        host_raddr,
  input  cplx_t                       host_rdata,
  input  logic                        obs_v1,    // input set loads bank data
  input  logic                        obs_p0,    // ... in pass 0
  input  logic                        obs_col1,  // ... as a column
  input  logic                        obs_v2,    // output set loads results
  input  logic                        obs_p0_2,  // ... in pass 0
  input  logic                        obs_col2,  // ... as a column
  input  logic                        obs_drain, // controller drains
  input  logic                        obs_ovl,   // two passes in flight
  input  logic                        obs_bf,    // butterfly takes operands
  output int                          checks,
  output int                          failures,
  output logic                        finished
);

  localparam int V      = $clog2(N) / 2;
  localparam int A      = $clog2(N);
  // gap between passes: 7 clocks for N = 64, none for longer transforms
  localparam int GAP    = (N == 64) ? 7 : 0;
  localparam int CYCLES = V * (N / 4) + (V - 1) * GAP + WR_DELAY;

  int run_bf = 0, max_run_bf = 0, n_ignored_start = 0, n_ovl = 0, n_p0 = 0;
  int n_row1 = 0, n_col1 = 0, n_row2 = 0, n_col2 = 0, n_drain = 0, n_ovf = 0;
  int n_ignored_wr = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  always @(negedge clk) begin
    if (rst_n) begin
      if (obs_v1 && obs_p0)               n_p0++;
      if (obs_v1 && !obs_p0 && obs_col1)  n_col1++;
      if (obs_v1 && !obs_p0 && !obs_col1) n_row1++;
      if (obs_v2 && !obs_p0_2 && obs_col2)  n_col2++;
      if (obs_v2 && !obs_p0_2 && !obs_col2) n_row2++;
      if (obs_drain)                      n_drain++;
      if (obs_ovl)                        n_ovl++;
      run_bf = obs_bf ? run_bf + 1 : 0;
      if (run_bf > max_run_bf) max_run_bf = run_bf;
    end
  end

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL (N=%0d) %s", N, what);
    end
  endfunction

  task automatic run(longint re[], longint im[], bit poke, bit float_check,
                     bit expect_clip);
    longint mre[] = new[N], mim[] = new[N];
    real    xr[] = new[N], xi[] = new[N];
    int     clips, cnt;
    cplx_t  got;
    // load
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      host_we    = 1'b1;
      host_waddr = A'(i);
      host_wdata = '{re: 16'(re[i]), im: 16'(im[i])};
    end
    @(negedge clk);
    host_we = 1'b0;
    // reference
    mre = re; mim = im;
    clips = fft_fixed(N, mre, mim);
    check((clips > 0) == expect_clip, "model clipping as intended by the stimulus");
    if (float_check) dft_ref(N, re, im, xr, xi);
    // run
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cnt = 0;
    check(busy, "busy after start");
    do begin
      if (poke && cnt == 5) begin
        host_we    = 1'b1;
        host_waddr = '0;
        host_wdata = '{re: 16'h1234, im: 16'h4321};
        n_ignored_wr++;
      end else host_we = 1'b0;
      start = poke && (cnt == 9);  // a second start while busy is ignored
      if (start) n_ignored_start++;
      @(negedge clk);
      cnt++;
    end while (!done && cnt < 4 * CYCLES);
    host_we = 1'b0;
    check(cnt == CYCLES, $sformatf("start-to-done %0d clocks, expected %0d", cnt, CYCLES));
    @(negedge clk);
    check(!busy, "idle after done");
    check(ovf == expect_clip, "overflow flag");
    if (ovf) n_ovf++;
    // unload and compare
    for (int i = 0; i < N; i++) begin
      host_raddr = A'(i);
      @(negedge clk);
      got = host_rdata;
      check(longint'(got.re) == mre[i] && longint'(got.im) == mim[i],
            $sformatf("addr %0d: got %0d,%0d, model %0d,%0d", i,
                      int'(got.re), int'(got.im), mre[i], mim[i]));
    end
    if (float_check)
      for (int k = 0; k < N; k++) begin
        int a = digrev4(k, V);
        check(rabs(real'(mre[a]) - xr[k]) <= real'(2 + V) &&
              rabs(real'(mim[a]) - xi[k]) <= real'(2 + V),
              $sformatf("X(%0d) = %0d,%0d, DFT/N %f,%f", k, mre[a], mim[a], xr[k], xi[k]));
      end
  endtask

  initial begin
    longint re[] = new[N], im[] = new[N];
    int unused = $urandom(SEED);
    checks = 0; failures = 0; finished = 1'b0;
    rst_n = 1'b0; start = 1'b0; host_we = 1'b0;
    host_waddr = '0; host_raddr = '0; host_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1: random, no clipping
    for (int i = 0; i < N; i++) begin
      re[i] = longint'($urandom_range(32000)) - 16000;
      im[i] = longint'($urandom_range(32000)) - 16000;
    end
    run(re, im, 1'b0, 1'b1, 1'b0);

    // 2: pass-0 butterfly N/8 gets a-jb-c+jd = 4(1+j)*32767, rotated by
    //    -45 degrees it exceeds 16 bits
    for (int i = 0; i < N; i++) begin
      re[i] = longint'($urandom_range(2000)) - 1000;
      im[i] = longint'($urandom_range(2000)) - 1000;
    end
    re[N/8]         =  32767; im[N/8]         =  32767;
    re[N/8 + N/4]   = -32768; im[N/8 + N/4]   =  32767;
    re[N/8 + N/2]   = -32768; im[N/8 + N/2]   = -32768;
    re[N/8 + 3*N/4] =  32767; im[N/8 + 3*N/4] = -32768;
    run(re, im, 1'b1, 1'b0, 1'b1);

    // 3: random again, right after the previous one
    for (int i = 0; i < N; i++) begin
      re[i] = longint'($urandom_range(32000)) - 16000;
      im[i] = longint'($urandom_range(32000)) - 16000;
    end
    run(re, im, 1'b0, 1'b1, 1'b0);

    $display("mechanisms (N=%0d): pass-0 loads %0d, input set column %0d / row %0d, output set column %0d / row %0d, drain clocks %0d, pass-overlap clocks %0d, overflows %0d, ignored host writes %0d, ignored starts %0d",
             N, n_p0, n_col1, n_row1, n_col2, n_row2, n_drain, n_ovl, n_ovf, n_ignored_wr, n_ignored_start);
    // one butterfly per clock: through a whole pass for N = 64, through the
    // whole transform when the passes follow back to back
    check(max_run_bf == ((GAP > 0) ? N / 4 : V * N / 4),
          $sformatf("longest run of busy butterfly clocks %0d", max_run_bf));
    check(n_p0 > 0,    "pass-0 fixed orientation never used");
    check(n_col1 > 0,  "input set never loaded a column in passes 1..");
    check(n_row1 > 0,  "input set never loaded a row");
    check(n_col2 > 0,  "output set never loaded a column");
    check(n_row2 > 0,  "output set never loaded a row");
    check(n_drain > 0, "no drain clocks");
    check(n_ovl > 0,   "passes never overlapped in the pipeline");
    check(n_ovf > 0,   "overflow never flagged");
    check(n_ignored_wr > 0, "no host write during a transform");
    check(n_ignored_start > 0, "no start during a transform");
    finished = 1'b1;
  end

endmodule
