// mem_bank -- one two-port data memory bank.
//
// DEPTH words of 32-bit complex data with one write port and one read port,
// so the bank can deliver one word and accept one word in the same clock.
// Both ports are synchronous: a write lands at the clock edge, a read returns
// the addressed word one clock after the address (a write and a read of the
// same address in the same clock return the old word). Bank k of the
// processor holds global sample addresses k*DEPTH .. k*DEPTH+DEPTH-1.
// Written as an array, so synthesis maps it to a RAM macro or block RAM.
module mem_bank
  import fft_pkg::*;
#(
  parameter int DEPTH = 16,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cplx_t         wdata,
  input  logic [AW-1:0] raddr,
  output cplx_t         rdata
);

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
