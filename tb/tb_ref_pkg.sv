// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: an LFSR model, the constellation tables as real
// numbers, and a floating-point DFT.
package tb_ref_pkg;

  localparam real R2  = 0.7071067811865476;   // 1/sqrt(2)
  localparam real R10 = 0.31622776601683794;  // 1/sqrt(10)
  localparam real PI  = 3.141592653589793;

  // LFSR state: bit i holds DFF(i+1). Returns the scrambled bit and
  // advances the state.
  function automatic bit lfsr_step(inout bit [7:0] st, input bit d);
    bit t, o;
    o  = d ^ st[0];
    t  = st[6] ^ st[5] ^ st[1] ^ st[0];
    st = {t, st[7:1]};
    return o;
  endfunction

  // Constellation point (real) of a group of bits, first bit in the MSB.
  // nb = 1 (BPSK), 2 (QPSK), 4 (16QAM).
  function automatic void constellation(input int nb, input bit [3:0] s,
                                        output real i, output real q);
    case (nb)
      1: begin i = s[0] ? -R2 : R2; q = i; end
      2: begin
        // 00 (+,+)  01 (+,-)  10 (-,+)  11 (-,-)
        i = s[1] ? -R2 : R2;
        q = s[0] ? -R2 : R2;
      end
      default: begin
        real mi, mq;
        mi = s[1] ? 3.0 * R10 : R10;
        mq = s[0] ? 3.0 * R10 : R10;
        i  = s[3] ? -mi : mi;
        q  = s[2] ? -mq : mq;
      end
    endcase
  endfunction

  // Upper half of the IEEE 754 single-precision encoding of v (non-zero,
  // normal range), built from the double-precision fields: sign, exponent
  // rebiased from 1023 to 127, and the top 7 fraction bits.
  function automatic bit [15:0] to_bf16(input real v);
    bit [63:0] w;
    bit [10:0] e;
    w = $realtobits(v);
    e = w[62:52] - 11'd1023 + 11'd127;
    return {w[63], e[7:0], w[51:45]};
  endfunction

  function automatic real bf16_to_real(input bit [15:0] h);
    bit [10:0] e;
    if (h[14:7] == 8'd0) return 0.0;
    e = 11'(h[14:7]) - 11'd127 + 11'd1023;
    return $bitstoreal({h[15], e, h[6:0], 45'd0});
  endfunction

  function automatic real fix_to_real(input logic signed [31:0] v);
    return real'(v) / 65536.0;
  endfunction

  // 8-point DFT without scaling.
  function automatic void dft8(input real xr [8], input real xi [8],
                               output real yr [8], output real yi [8]);
    for (int k = 0; k < 8; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
      for (int n = 0; n < 8; n++) begin
        real a;
        a = -2.0 * PI * real'(n * k) / 8.0;
        yr[k] += xr[n] * $cos(a) - xi[n] * $sin(a);
        yi[k] += xr[n] * $sin(a) + xi[n] * $cos(a);
      end
    end
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
