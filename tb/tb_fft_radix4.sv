// tb_fft_radix4 -- end-to-end test of the 64-point processor at its default
// parameters: load, transform and read back three data sets through the host
// port, bit-exact against a reference model (see fft_driver).
module tb_fft_radix4;
  import fft_pkg::*;

  logic       clk, rst_n, start, busy, done, ovf, host_we, finished;
  logic [5:0] host_waddr, host_raddr;
  cplx_t      host_wdata, host_rdata;
  int         checks, failures;

  fft_radix4 dut (.*);

  fft_driver #(.N(64), .SEED(11)) drv (
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
    .checks, .failures, .finished
  );

  initial begin
    #1;
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("watchdog: transform did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
