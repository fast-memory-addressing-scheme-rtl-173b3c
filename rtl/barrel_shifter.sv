// barrel_shifter -- data memory address generator, RR(B, 2p).
//
// Rotates the butterfly counter B right by twice the pass number p. The pass
// number arrives one-hot (pass_oh[p] set during pass p), so the shifter is a
// one-hot multiplexer over the V possible rotations: no adder and no decoder,
// and the depth does not grow with the transform length. The same address is
// presented to all four memory banks.
//
// In pass p the two bits that step fastest in B (B1 B0) land on address bits
// M-2p+1 and M-2p, which is the stride of the pass-p butterfly inside one
// bank; the bits above them pick the butterfly. In pass 0 the address is B
// itself and the four operands sit at the same address in the four banks.
//
// Purely combinational. The one-hot pass encoding is this design's reading of
// a pass counter that is V bits wide.
module barrel_shifter #(
  parameter int M = 4,  // width of butterfly counter B, log2(N/4)
  parameter int V = 3   // number of passes, log4(N)
) (
  input  logic [V-1:0] pass_oh,
  input  logic [M-1:0] bcnt,
  output logic [M-1:0] addr
);

  function automatic logic [M-1:0] rotr(logic [M-1:0] x, int sh);
    logic [M-1:0] r;
    for (int i = 0; i < M; i++) r[i] = x[(i + sh) % M];
    return r;
  endfunction

  always_comb begin
    addr = '0;
    for (int p = 0; p < V; p++)
      if (pass_oh[p]) addr |= rotr(bcnt, 2 * p);
  end

endmodule
