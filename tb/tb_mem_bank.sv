// tb_mem_bank -- random simultaneous reads and writes against an array
// model; checks one-clock read latency and that a read of the address being
// written in the same clock returns the old word.
module tb_mem_bank;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       we;
  logic [3:0] waddr, raddr;
  cplx_t      wdata, rdata, model [16], expect_q;

  mem_bank #(.DEPTH(16)) dut (.*);

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    // fill
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'(i); wdata = cplx_t'($urandom); model[i] = wdata;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we    = ($urandom_range(1) == 1);
      waddr = 4'($urandom_range(15));
      raddr = (n % 5 == 0) ? waddr : 4'($urandom_range(15));
      wdata = cplx_t'($urandom);
      expect_q = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", raddr, rdata, expect_q);
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
