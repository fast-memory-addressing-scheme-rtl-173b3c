// reorder_regs -- one register set: 16 data registers with four 1-of-16
// input selectors and four 16-to-1 output multiplexers.
//
// Every clock the mux_ctrl logic names four registers, one per lane. Each
// named register hands its old word to output lane x and, when wr_en is set,
// takes the word on input lane x at the clock edge. Because the named group
// switches between a column and a row of the 4x4 register matrix from one
// group of four clocks to the next, four words that entered across four
// clocks on one lane come out together on the four lanes four clocks later.
//
// As the input set (registers 0-15) it turns four memory-bank words per clock
// (one per bank) into the four operands of one butterfly per clock. As the
// output set (registers 16-31) it turns one butterfly result per clock back
// into four words per clock, one for each bank. Outputs are combinational
// from the registers. The 16 registers and the eight selectors follow the
// register sets of the original scheme; leaving the data registers without
// reset (a word is never used before it has been written) is this design's
// choice.
module reorder_regs
  import fft_pkg::*;
#(
  parameter bit ROW_FIRST = 1'b0
) (
  input  logic       clk,
  input  logic [2:0] bcnt_lsb,   // B[2:0] of the group being stored
  input  logic       pass0,
  input  logic       wr_en,
  input  cplx_t      din  [4],
  output cplx_t      dout [4]
);

  cplx_t      regs [16];
  logic [3:0] sel  [4];

  mux_ctrl #(.ROW_FIRST(ROW_FIRST)) u_ctrl (
    .bcnt_lsb (bcnt_lsb),
    .pass0    (pass0),
    .sel      (sel)
  );

  always_ff @(posedge clk)
    if (wr_en)
      for (int x = 0; x < 4; x++) regs[sel[x]] <= din[x];

  always_comb
    for (int x = 0; x < 4; x++) dout[x] = regs[sel[x]];

endmodule
