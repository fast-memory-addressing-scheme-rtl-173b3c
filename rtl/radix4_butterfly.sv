// radix4_butterfly -- pipelined radix-4 decimation-in-frequency butterfly.
//
// From four complex inputs a, b, c, d and three twiddles Wb, Wc, Wd it forms
//   a' =  a + b + c + d
//   b' = (a - jb - c + jd) * Wb
//   c' = (a - b + c - d)   * Wc
//   d' = (a + jb - c - jd) * Wd
// which are the butterfly equations of the design written in complex form.
//
// Pipeline (BF_LAT = 4 clocks from in_valid to out_valid):
//   1  the four add/subtract combinations, 18-bit, full precision
//   2  the twelve real products with the twiddles (18 x 16 bits)
//   3  real and imaginary sums of the products
//   4  rounding, scaling and saturation to 16 bits
// Every result is scaled by 1/4 (round to nearest, ties upward), so a full
// transform returns the DFT divided by N and cannot overflow for inputs of
// magnitude below 2^15/sqrt(2). A result that still exceeds 16 bits is
// clipped and flagged on `sat` in the same clock as out_valid. The scaling,
// rounding and saturation are this design's choices; the twiddles are Q1.14.
module radix4_butterfly
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t x   [4],  // a, b, c, d
  input  twid_t w   [4],  // index 1..3: Wb, Wc, Wd (index 0 unused)
  output logic  out_valid,
  output cplx_t y   [4],  // a', b', c', d'
  output logic  sat
);

  localparam int SW = DW + 2;           // sum width
  localparam int PW = SW + TW;          // product width
  localparam int AW = PW + 1;           // accumulated product width
  localparam int SH = TW_FRAC + 2;      // twiddle fraction + scaling by 1/4

  typedef struct packed {
    logic signed [SW-1:0] re;
    logic signed [SW-1:0] im;
  } sum_t;

  // stage 1
  sum_t  s1 [4];
  twid_t w1 [4];
  // stage 2
  logic signed [PW-1:0] rr2 [4], ii2 [4], ri2 [4], ir2 [4];
  // stage 3
  logic signed [AW-1:0] re3 [4], im3 [4];
  logic [3:0] v;

  function automatic logic signed [SW-1:0] ext(logic signed [DW-1:0] a);
    return SW'(a);
  endfunction

  // round to nearest, shift right by SH, clip to DW bits
  function automatic logic signed [DW-1:0] scale(logic signed [AW-1:0] a,
                                                 output logic clipped);
    logic signed [AW-1:0] r;
    r = (a + (AW'(1) <<< (SH - 1))) >>> SH;
    clipped = 1'b0;
    if (r > AW'(2 ** (DW - 1) - 1)) begin
      clipped = 1'b1;
      return {1'b0, {(DW - 1){1'b1}}};
    end
    if (r < -AW'(2 ** (DW - 1))) begin
      clipped = 1'b1;
      return {1'b1, {(DW - 1){1'b0}}};
    end
    return DW'(r);
  endfunction

  always_ff @(posedge clk) begin
    // stage 1: add / subtract, j*z = (-z.im, z.re)
    s1[0].re <= ext(x[0].re) + ext(x[1].re) + ext(x[2].re) + ext(x[3].re);
    s1[0].im <= ext(x[0].im) + ext(x[1].im) + ext(x[2].im) + ext(x[3].im);
    s1[1].re <= ext(x[0].re) + ext(x[1].im) - ext(x[2].re) - ext(x[3].im);
    s1[1].im <= ext(x[0].im) - ext(x[1].re) - ext(x[2].im) + ext(x[3].re);
    s1[2].re <= ext(x[0].re) - ext(x[1].re) + ext(x[2].re) - ext(x[3].re);
    s1[2].im <= ext(x[0].im) - ext(x[1].im) + ext(x[2].im) - ext(x[3].im);
    s1[3].re <= ext(x[0].re) - ext(x[1].im) - ext(x[2].re) + ext(x[3].im);
    s1[3].im <= ext(x[0].im) + ext(x[1].re) - ext(x[2].im) - ext(x[3].re);
    w1[0].re <= TW'(1 << TW_FRAC);      // a' is not rotated
    w1[0].im <= '0;
    for (int k = 1; k < 4; k++) w1[k] <= w[k];

    // stage 2: products
    for (int k = 0; k < 4; k++) begin
      rr2[k] <= PW'(s1[k].re) * PW'(w1[k].re);
      ii2[k] <= PW'(s1[k].im) * PW'(w1[k].im);
      ri2[k] <= PW'(s1[k].re) * PW'(w1[k].im);
      ir2[k] <= PW'(s1[k].im) * PW'(w1[k].re);
    end

    // stage 3: complex product sums
    for (int k = 0; k < 4; k++) begin
      re3[k] <= AW'(rr2[k]) - AW'(ii2[k]);
      im3[k] <= AW'(ir2[k]) + AW'(ri2[k]);
    end
  end

  // stage 4: round, scale, saturate
  always_ff @(posedge clk) begin
    logic c_re, c_im, any;
    any = 1'b0;
    for (int k = 0; k < 4; k++) begin
      y[k].re <= scale(re3[k], c_re);
      y[k].im <= scale(im3[k], c_im);
      any = any | c_re | c_im;
    end
    sat <= any & v[2];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v <= '0;
    else        v <= {v[2:0], in_valid};

  assign out_valid = v[3];

endmodule
