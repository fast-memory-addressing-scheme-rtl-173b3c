// fft_pkg -- types and timing constants shared by the radix-4 FFT processor.
//
// Data words are 32-bit complex numbers, 16 bits each for the real and the
// imaginary part (the word size of the synthesis results this design follows).
// Twiddle factors are 16-bit signed Q1.14 values, so +1.0 is exactly 16384;
// the twiddle format is this design's own choice.
//
// Pipeline timing, counted in clocks from the cycle a read address is issued
// to the four memory banks:
//   RD_LAT   synchronous read of a memory bank
//   BUF_LAT  a register set holds a word for one group of four cycles
//   BF_LAT   butterfly pipeline depth (four clocks, as in the address tables)
// A butterfly result is written back WR_DELAY clocks after its operands were
// read, to the address they were read from (in-place addressing).
package fft_pkg;

  localparam int DW      = 16;  // bits per real / imaginary part
  localparam int TW      = 16;  // bits per twiddle part
  localparam int TW_FRAC = 14;  // fraction bits of a twiddle part

  localparam int RD_LAT   = 1;
  localparam int BUF_LAT  = 4;
  localparam int BF_LAT   = 4;
  localparam int WR_DELAY = RD_LAT + BUF_LAT + BF_LAT + BUF_LAT;  // 13

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW-1:0] re;
    logic signed [TW-1:0] im;
  } twid_t;

endpackage
