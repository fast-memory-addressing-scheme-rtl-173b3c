// twiddle_addr_gen -- address of the three twiddle-factor memories.
//
// In pass p the twiddle address is the butterfly counter B with its 2p least
// significant bits forced to zero: B[M-1] .. B[2p] followed by 2p zeros. B
// shifted right by 2p is the position of the butterfly inside its pass-p
// sub-transform, and shifting it back left by 2p scales the twiddle exponent
// by 4^p, so one table of W_N^a serves every pass. In the last pass all bits
// are cleared and the twiddles are 1.
//
// Combinational; the pass number is one-hot, as for the barrel shifter, so
// the logic is an AND of each counter bit with a pass-dependent mask.
module twiddle_addr_gen #(
  parameter int M = 4,
  parameter int V = 3
) (
  input  logic [V-1:0] pass_oh,
  input  logic [M-1:0] bcnt,
  output logic [M-1:0] addr
);

  logic [M-1:0] mask;

  always_comb begin
    mask = '0;
    for (int p = 0; p < V; p++)
      if (pass_oh[p])
        for (int i = 0; i < M; i++)
          if (i >= 2 * p) mask[i] = 1'b1;
    addr = bcnt & mask;
  end

endmodule
