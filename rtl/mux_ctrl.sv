// mux_ctrl -- select logic for the multiplexers of one register set.
//
// A register set holds 16 words, seen as a 4x4 matrix: register 4*i + j is
// row i, column j. Each clock the set loads four words and hands out four,
// always from the same four registers: column t or row t, where t = B[1:0] is
// the slot within the current group of four clocks. Which of the two is used
// alternates from group to group with B[2], so the words loaded as columns
// are read out as rows four clocks later and vice versa: a transpose buffer
// that needs no double buffering.
//
// For lane x (0..3) the register index is {x, t} for a column and {t, x} for
// a row; with x fixed each select bit is a single AND of B1/B0 with the
// orientation, which depends only on B[2] and the pass.
//
// ROW_FIRST picks the orientation of the even groups (B[2] = 0): the input
// set loads columns first, the output set rows first, as in the address
// tables of the design. In pass 0 the four operands of a butterfly arrive
// together, so the set does not alternate: it keeps the orientation of the
// even groups and acts as a four-cycle delay line. Because the first group
// of pass 1 is even as well, the last group of pass 0 can be emptied while
// pass 1 fills the same registers, with no gap between the passes. The
// pass-0 behaviour is this design's own choice.
module mux_ctrl #(
  parameter bit ROW_FIRST = 1'b0
) (
  input  logic [2:0] bcnt_lsb,  // B[2:0]
  input  logic       pass0,     // pass 0 in progress
  output logic [3:0] sel [4]    // register index used by lanes 0..3
);

  logic       col;
  logic [1:0] t;

  always_comb begin
    col = pass0 ? !ROW_FIRST : (bcnt_lsb[2] == ROW_FIRST);
    t   = bcnt_lsb[1:0];
    for (int x = 0; x < 4; x++)
      sel[x] = col ? {2'(x), t} : {t, 2'(x)};
  end

endmodule
