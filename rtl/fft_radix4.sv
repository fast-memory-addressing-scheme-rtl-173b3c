// fft_radix4 -- in-place N-point radix-4 FFT processor with an adder-free
// address generator.
//
// Data sit in four two-port memory banks of N/4 words; bank k holds sample
// addresses k*N/4 .. k*N/4+N/4-1. Each of the V = log4(N) passes reads all
// four banks every clock at one common address, RR(B, 2p), and writes the
// results back to the same addresses, so no address needs an adder. In pass
// 0 the four words read together are the operands of one butterfly. In the
// later passes the four operands of a butterfly lie in one bank and arrive
// over four clocks; the input register set (R0-R15) collects four clocks of
// reads and hands out one complete butterfly per clock, and the output
// register set (R16-R31) does the reverse for the write-back. The selects of
// both sets depend only on B[2:0], whatever N is.
//
// Pipeline, in clocks after a read address is issued (stage numbers of the
// control pipeline ctl_q): 1 bank data enter the input set; 4 twiddle
// address; 5 butterfly input; 9 butterfly result enters the output set;
// 13 write-back to the address issued 13 clocks earlier.
//
// Host side: while busy is low the banks are loaded and read through the
// host port (write in one clock, read data one clock after the address).
// start runs a whole transform; done pulses when the results are in memory.
// The results are the DFT divided by N, stored in base-4 digit-reversed
// order: X(k) is at the address whose base-4 digits are those of k reversed.
// ovf is set if any butterfly result was clipped during the transform.
// One transform takes V*N/4 + (V-1)*GAP + 13 clocks from start to done:
// the passes follow each other back to back for N >= 256 (GAP = 0), while
// for N = 64 a pass is shorter than the pipeline and GAP = 7 idle clocks
// keep it from reading words its predecessor has not yet written (75 clocks
// in all); the final 13 clocks drain the pipeline. The host port, the gap,
// the fixed-point scaling and the digit-reversed result order are this
// design's own choices.
module fft_radix4
  import fft_pkg::*;
#(
  parameter int N = 64,
  parameter int V = $clog2(N) / 2,    // passes, log4(N)
  parameter int M = $clog2(N / 4),    // bank address width, log2(N/4)
  parameter int A = M + 2             // sample address width
) (
  input  logic         clk,
  input  logic         rst_n,
  // control
  input  logic         start,
  output logic         busy,
  output logic         done,
  output logic         ovf,
  // host port, used while busy is low
  input  logic         host_we,
  input  logic [A-1:0] host_waddr,
  input  cplx_t        host_wdata,
  input  logic [A-1:0] host_raddr,
  output cplx_t        host_rdata
);

  typedef struct packed {
    logic         v;     // a read was issued
    logic [V-1:0] p;     // pass, one-hot
    logic [M-1:0] b;     // butterfly counter
    logic [M-1:0] a;     // bank address
  } ctl_t;

  // ---------------------------------------------------------------- Counter D
  logic [V-1:0] pass_oh;
  logic [M-1:0] bcnt;
  logic         rd_valid;

  counter_d #(.N(N), .V(V), .M(M)) u_cnt (
    .clk, .rst_n, .start,
    .pass_oh, .bcnt, .rd_valid, .draining(), .busy, .done
  );

  // ----------------------------------------------------------- Barrel shifter
  logic [M-1:0] rd_addr;

  barrel_shifter #(.M(M), .V(V)) u_bs (
    .pass_oh (pass_oh),
    .bcnt    (bcnt),
    .addr    (rd_addr)
  );

  // --------------------------------------------------------- control pipeline
  ctl_t ctl_q [WR_DELAY + 1];

  assign ctl_q[0] = '{v: rd_valid, p: pass_oh, b: bcnt, a: rd_addr};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)
      for (int s = 1; s <= WR_DELAY; s++) ctl_q[s] <= '0;
    else
      for (int s = 1; s <= WR_DELAY; s++) ctl_q[s] <= ctl_q[s-1];

  localparam int S_IN  = RD_LAT;                    // 1
  localparam int S_BF  = RD_LAT + BUF_LAT;          // 5
  localparam int S_OUT = S_BF + BF_LAT;             // 9
  localparam int S_WR  = WR_DELAY;                  // 13

  // ------------------------------------------------------------- memory banks
  cplx_t        bank_rdata [4];
  cplx_t        bank_wdata [4];
  cplx_t        set2_out   [4];
  logic         bank_we    [4];
  logic [M-1:0] bank_waddr, bank_raddr;
  logic [1:0]   host_rbank;

  always_comb begin
    bank_raddr = busy ? rd_addr : host_raddr[M-1:0];
    bank_waddr = busy ? ctl_q[S_WR].a : host_waddr[M-1:0];
    for (int k = 0; k < 4; k++) begin
      bank_wdata[k] = busy ? set2_out[k] : host_wdata;
      bank_we[k]    = busy ? ctl_q[S_WR].v
                           : (host_we && host_waddr[A-1:M] == 2'(k));
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_bank
    mem_bank #(.DEPTH(N / 4), .AW(M)) u_ram (
      .clk,
      .we    (bank_we[k]),
      .waddr (bank_waddr),
      .wdata (bank_wdata[k]),
      .raddr (bank_raddr),
      .rdata (bank_rdata[k])
    );
  end

  always_ff @(posedge clk) host_rbank <= host_raddr[A-1:M];
  assign host_rdata = bank_rdata[host_rbank];

  // ----------------------------------------------------- input register set
  cplx_t bf_in [4];

  reorder_regs #(.ROW_FIRST(1'b0)) u_set1 (
    .clk,
    .bcnt_lsb (ctl_q[S_IN].b[2:0]),
    .pass0    (ctl_q[S_IN].p[0]),
    .wr_en    (ctl_q[S_IN].v),
    .din      (bank_rdata),
    .dout     (bf_in)
  );

  // --------------------------------------------------------- twiddle factors
  logic [M-1:0] tw_addr;
  twid_t        tw [4];

  twiddle_addr_gen #(.M(M), .V(V)) u_twa (
    .pass_oh (ctl_q[S_BF-1].p),
    .bcnt    (ctl_q[S_BF-1].b),
    .addr    (tw_addr)
  );

  assign tw[0] = '0;
  for (genvar k = 1; k < 4; k++) begin : g_tw
    twiddle_rom #(.N(N), .K(k), .AW(M)) u_rom (
      .clk,
      .addr (tw_addr),
      .w    (tw[k])
    );
  end

  // --------------------------------------------------------------- butterfly
  cplx_t bf_out [4];
  logic  bf_out_valid, bf_sat;

  radix4_butterfly u_bf (
    .clk, .rst_n,
    .in_valid  (ctl_q[S_BF].v),
    .x         (bf_in),
    .w         (tw),
    .out_valid (bf_out_valid),
    .y         (bf_out),
    .sat       (bf_sat)
  );

  // ---------------------------------------------------- output register set
  reorder_regs #(.ROW_FIRST(1'b1)) u_set2 (
    .clk,
    .bcnt_lsb (ctl_q[S_OUT].b[2:0]),
    .pass0    (ctl_q[S_OUT].p[0]),
    .wr_en    (bf_out_valid),
    .din      (bf_out),
    .dout     (set2_out)
  );

  // ------------------------------------------------------------ overflow flag
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                ovf <= 1'b0;
    else if (start && !busy)   ovf <= 1'b0;
    else if (bf_sat)           ovf <= 1'b1;

  // the butterfly latency must match the control pipeline
  a_bf_lat: assert property (@(posedge clk) disable iff (!rst_n)
                             bf_out_valid == ctl_q[S_OUT].v);

  // the mux control needs B[2], so N must be at least 64
  initial assert (N >= 64 && N == 4 ** V)
    else $error("fft_radix4: N must be a power of 4, at least 64");

endmodule
