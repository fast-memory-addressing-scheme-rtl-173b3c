// fft_model_pkg -- reference models for the radix-4 FFT testbenches.
//
// fft_fixed() is a plain in-place radix-4 decimation-in-frequency FFT over an
// array of N samples, written as the textbook triple loop (pass, block,
// butterfly) with no knowledge of banks, register sets or address rotation.
// It uses the processor's number format: Q1.14 twiddles rounded to nearest,
// full-precision sums and products, then (x + 2^15) >> 16 and clipping to
// 16 bits, so its result must match the hardware bit for bit.
// dft_ref() is a floating-point DFT divided by N, to check the model itself.
package fft_model_pkg;

  function automatic int digrev4(int k, int v);
    int r = 0;
    for (int i = 0; i < v; i++) begin
      r = r * 4 + (k % 4);
      k = k / 4;
    end
    return r;
  endfunction

  // Q1.14 twiddle W_N^e, part 0 = real, 1 = imaginary
  function automatic longint tw(int n, int e, int part);
    real ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(n);
    real val = (part == 0) ? 16384.0 * $cos(ang) : -16384.0 * $sin(ang);
    return longint'($floor(val + 0.5));
  endfunction

  function automatic longint scale(longint x, ref int clips);
    longint r = (x + 64'sd32768) >>> 16;
    if (r > 32767)  begin clips++; return 32767;  end
    if (r < -32768) begin clips++; return -32768; end
    return r;
  endfunction

  // in place; returns the number of clipped parts
  function automatic int fft_fixed(int n, ref longint re[], ref longint im[]);
    int clips = 0;
    int l, s, q;
    longint tr[4], ti[4], wr, wi, pr, pi;
    int idx[4];
    q = 1;                                  // 4^p
    for (l = n; l >= 4; l = l / 4) begin
      s = l / 4;
      for (int base = 0; base < n; base += l)
        for (int j = 0; j < s; j++) begin
          for (int e = 0; e < 4; e++) idx[e] = base + j + e * s;
          tr[0] = re[idx[0]] + re[idx[1]] + re[idx[2]] + re[idx[3]];
          ti[0] = im[idx[0]] + im[idx[1]] + im[idx[2]] + im[idx[3]];
          tr[1] = re[idx[0]] + im[idx[1]] - re[idx[2]] - im[idx[3]];
          ti[1] = im[idx[0]] - re[idx[1]] - im[idx[2]] + re[idx[3]];
          tr[2] = re[idx[0]] - re[idx[1]] + re[idx[2]] - re[idx[3]];
          ti[2] = im[idx[0]] - im[idx[1]] + im[idx[2]] - im[idx[3]];
          tr[3] = re[idx[0]] - im[idx[1]] - re[idx[2]] + im[idx[3]];
          ti[3] = im[idx[0]] + re[idx[1]] - im[idx[2]] - re[idx[3]];
          for (int k = 0; k < 4; k++) begin
            if (k == 0) begin wr = 16384; wi = 0; end
            else begin
              wr = tw(n, k * j * q, 0);
              wi = tw(n, k * j * q, 1);
            end
            pr = tr[k] * wr - ti[k] * wi;
            pi = ti[k] * wr + tr[k] * wi;
            re[idx[k]] = scale(pr, clips);
            im[idx[k]] = scale(pi, clips);
          end
        end
      q = q * 4;
    end
    return clips;
  endfunction

  // X(k)/N in floating point
  function automatic void dft_ref(int n, const ref longint re[], const ref longint im[],
                                  ref real xr[], ref real xi[]);
    real ang;
    for (int k = 0; k < n; k++) begin
      xr[k] = 0.0;
      xi[k] = 0.0;
      for (int t = 0; t < n; t++) begin
        ang = 2.0 * 3.14159265358979323846 * real'((t * k) % n) / real'(n);
        xr[k] += real'(re[t]) * $cos(ang) + real'(im[t]) * $sin(ang);
        xi[k] += real'(im[t]) * $cos(ang) - real'(re[t]) * $sin(ang);
      end
      xr[k] /= real'(n);
      xi[k] /= real'(n);
    end
  endfunction

endpackage
