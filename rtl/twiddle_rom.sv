// twiddle_rom -- one twiddle-factor memory.
//
// Holds W_N^(K*a) = cos(2*pi*K*a/N) - j*sin(2*pi*K*a/N) for a = 0 .. N/4-1,
// in Q1.14 (rounded to nearest). The processor has three of them, K = 1, 2
// and 3, for the twiddles Wb, Wc and Wd of the butterfly; all three are read
// at the same address. The contents are computed at elaboration time by a
// constant function, so no table file is needed for any N. The read is
// synchronous: data one clock after the address.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int N  = 64,
  parameter int K  = 1,
  parameter int AW = $clog2(N / 4)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output twid_t         w
);

  localparam int DEPTH = N / 4;
  typedef logic signed [TW-1:0] table_t [DEPTH];

  // part = 0: real part cos(angle), part = 1: imaginary part -sin(angle)
  function automatic table_t make_table(int part);
    table_t t;
    real    ang, scale, val;
    scale = real'(1 << TW_FRAC);
    for (int a = 0; a < DEPTH; a++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(K * a) / real'(N);
      val  = (part == 0) ? scale * $cos(ang) : -scale * $sin(ang);
      t[a] = TW'(longint'($floor(val + 0.5)));
    end
    return t;
  endfunction

  localparam table_t TAB_RE = make_table(0);
  localparam table_t TAB_IM = make_table(1);

  always_ff @(posedge clk) begin
    w.re <= TAB_RE[addr];
    w.im <= TAB_IM[addr];
  end

endmodule
