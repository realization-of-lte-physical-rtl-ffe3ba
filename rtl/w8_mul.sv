// w8_mul: multiplies a Q15.16 complex value by the constant twiddle factor
// c_K = exp(-j*2*pi*K/8), K fixed at elaboration.
//
// K = 0, 2, 4, 6 are swaps and sign changes (1, -j, -1, j). Odd K need
// (a.re +/- a.im) / sqrt(2): each is a 32 x 32 bit product with the Q1.30
// constant 1/sqrt(2), the 64-bit result shifted back and truncated to 32
// bits, with s = a.re + a.im and d = a.im - a.re. Purely combinational.
module w8_mul
  import lte_pkg::*;
#(
  parameter int unsigned K = 1
) (
  input  cfix_t a,
  output cfix_t y
);

  if (K % 8 == 0) begin : g_k0
    assign y.re = a.re;
    assign y.im = a.im;
  end else if (K % 8 == 1) begin : g_k1
    logic signed [31:0] s, d;
    assign s = a.re + a.im;
    assign d = a.im - a.re;
    assign y.re = mul_r2(s);
    assign y.im = mul_r2(d);
  end else if (K % 8 == 2) begin : g_k2
    assign y.re = a.im;
    assign y.im = -a.re;
  end else if (K % 8 == 3) begin : g_k3
    logic signed [31:0] s, d;
    assign s = a.re + a.im;
    assign d = a.im - a.re;
    assign y.re = mul_r2(d);
    assign y.im = -mul_r2(s);
  end else if (K % 8 == 4) begin : g_k4
    assign y.re = -a.re;
    assign y.im = -a.im;
  end else if (K % 8 == 5) begin : g_k5
    logic signed [31:0] s, d;
    assign s = a.re + a.im;
    assign d = a.im - a.re;
    assign y.re = -mul_r2(s);
    assign y.im = -mul_r2(d);
  end else if (K % 8 == 6) begin : g_k6
    assign y.re = -a.im;
    assign y.im = a.re;
  end else begin : g_k7
    logic signed [31:0] s, d;
    assign s = a.re + a.im;
    assign d = a.im - a.re;
    assign y.re = -mul_r2(d);
    assign y.im = mul_r2(s);
  end

endmodule
