// tb_fft_workloads -- the processor at the three transform lengths 64, 256
// and 1024 points, side by side, each run through the same three data sets
// and checks as the default-size test (see fft_driver). The butterfly, the
// register sets and their select logic are the same at every length; only
// the counter, the shifter and the memories grow.
module tb_fft_workloads;
  import fft_pkg::*;

  localparam int NS [3] = '{64, 256, 1024};

  int   checks [3], failures [3];
  logic fin [3];

  for (genvar g = 0; g < 3; g++) begin : g_n
    localparam int N = NS[g];
    localparam int A = $clog2(N);
    logic         clk, rst_n, start, busy, done, ovf, host_we;
    logic [A-1:0] host_waddr, host_raddr;
    cplx_t        host_wdata, host_rdata;

    fft_radix4 #(.N(N)) dut (.*);

    fft_driver #(.N(N), .SEED(100 + g)) drv (
      .clk, .rst_n, .start, .busy, .done, .ovf,
      .host_we, .host_waddr, .host_wdata, .host_raddr, .host_rdata,
      .obs_v1    (dut.ctl_q[1].v),
      .obs_p0    (dut.ctl_q[1].p[0]),
      .obs_col1  (dut.u_set1.u_ctrl.col),
      .obs_v2    (dut.bf_out_valid),
      .obs_p0_2  (dut.ctl_q[9].p[0]),
      .obs_col2  (dut.u_set2.u_ctrl.col),
      .obs_drain (dut.u_cnt.draining),
      .obs_bf    (dut.ctl_q[5].v),
      .obs_ovl   (dut.ctl_q[0].v && dut.ctl_q[WR_DELAY].v &&
                  dut.ctl_q[0].p != dut.ctl_q[WR_DELAY].p),
      .checks    (checks[g]),
      .failures  (failures[g]),
      .finished  (fin[g])
    );
  end

  initial begin
    #1;
    wait (fin[0] && fin[1] && fin[2]);
    $display("TB_RESULT checks=%0d failures=%0d",
             checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog: a transform did not finish");
    $display("TB_RESULT checks=%0d failures=%0d",
             checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end
endmodule
