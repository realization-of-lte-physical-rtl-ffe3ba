// fft8: combinational 8-point DFT, X(k) = sum_n x(n) exp(-j*2*pi*n*k/8),
// without the 1/sqrt(8) scaling.
//
// Structure as in the document: a first stage of butterflies
//   P_n = x_n + x_{n+4},  M_n = x_n - x_{n+4}   (n = 0..3)
// then the even outputs are a 4-point DFT of P,
//   X_{2m} = sum_n c_{2nm mod 8} P_n,
// and the odd outputs combine M with the twiddles,
//   X_{2m+1} = sum_n c_{n(2m+1) mod 8} M_n,
// where c_k = exp(-j*2*pi*k/8) (one w8_mul per term). Multiplications by
// c0, c2, c4, c6 are sign changes and swaps; c1, c3, c5, c7 multiply by
// 1/sqrt(2) as a 32 x 32 bit product truncated back to 32 bits (document:
// 32-bit adders, 64-bit products truncated to 32 bits). Data are Q15.16
// (this design's format); the sums grow by up to 3 bits.
module fft8
  import lte_pkg::*;
(
  input  cfix_t x [8],
  output cfix_t y [8]
);

  cfix_t p [4];
  cfix_t m [4];
  cfix_t t [8][4];   // t[k][n] = c_{nk mod 8} * (P_n or M_n)

  for (genvar n = 0; n < 4; n++) begin : g_bfly
    assign p[n].re = x[n].re + x[n+4].re;
    assign p[n].im = x[n].im + x[n+4].im;
    assign m[n].re = x[n].re - x[n+4].re;
    assign m[n].im = x[n].im - x[n+4].im;
  end

  for (genvar k = 0; k < 8; k++) begin : g_out
    for (genvar n = 0; n < 4; n++) begin : g_term
      w8_mul #(.K((n * k) % 8)) u_tw (.a((k % 2 == 0) ? p[n] : m[n]), .y(t[k][n]));
    end
    assign y[k].re = t[k][0].re + t[k][1].re + t[k][2].re + t[k][3].re;
    assign y[k].im = t[k][0].im + t[k][1].im + t[k][2].im + t[k][3].im;
  end

endmodule
