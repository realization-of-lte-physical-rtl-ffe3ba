// lte_pkg: types, constants and arithmetic helpers shared by the NB-IoT uplink
// transmitter and receiver.
//
// Symbols leave the modulation mapper as 32-bit complex words: the upper 16
// bits of the IEEE 754 single-precision I and Q values (the document's
// "16 bit truncation"). From the transform precoder on, resource elements are
// 64-bit complex words with 32-bit two's complement Q15.16 components; that
// fixed-point format is this design's own choice, made so that the FFT
// computes a true DFT.
package lte_pkg;

  // Modulation scheme of the active channel.
  typedef enum logic [1:0] {
    MOD_BPSK  = 2'd0,
    MOD_QPSK  = 2'd1,
    MOD_QAM16 = 2'd2
  } mod_e;

  // Channel/modulation selection {a,b}.
  typedef enum logic [1:0] {
    SEL_PUSCH_QPSK  = 2'b00,
    SEL_PUSCH_QAM16 = 2'b01,
    SEL_PUCCH_BPSK  = 2'b10,
    SEL_PUCCH_QPSK  = 2'b11
  } chan_sel_e;

  // Layer mapping selection {c,d}. 2'b01 is also transmit diversity.
  typedef enum logic [1:0] {
    LM_SINGLE    = 2'b00,
    LM_DIV_ALT   = 2'b01,
    LM_DIVERSITY = 2'b10,
    LM_SPATIAL   = 2'b11
  } lm_mode_e;

  // Resource grid sections.
  typedef enum logic [1:0] {
    SEC_PUCCH = 2'd0,
    SEC_PUSCH = 2'd1,
    SEC_PRACH = 2'd2
  } sec_e;

  // Modulation symbol: truncated IEEE 754 I and Q.
  typedef struct packed {
    logic [15:0] i;
    logic [15:0] q;
  } cplx16_t;

  // Resource element: Q15.16 fixed point.
  typedef struct packed {
    logic signed [31:0] re;
    logic signed [31:0] im;
  } cfix_t;

  // Upper halves of the IEEE 754 single-precision constants.
  localparam logic [15:0] F_R2    = 16'h3F35;  // 1/sqrt(2)
  localparam logic [15:0] F_R10   = 16'h3EA1;  // 1/sqrt(10)
  localparam logic [15:0] F_3R10  = 16'h3F72;  // 3/sqrt(10)
  localparam logic [15:0] F_SIGN  = 16'h8000;

  // 1/sqrt(2) in Q1.30 for the FFT twiddle multiplications.
  localparam logic signed [31:0] INV_SQRT2_Q30 = 32'sh2D413CCD;

  // Truncated float (sign, 8-bit exponent, 7-bit fraction) to Q15.16.
  // value = 1.f * 2^(e-127), so the 8-bit significand is shifted by e-118.
  function automatic logic signed [31:0] bf16_to_fix(input logic [15:0] f);
    logic [31:0] mag;
    int          sh;
    sh = int'(f[14:7]) - 118;
    if (f[14:7] == 8'd0)     mag = '0;
    else if (sh >= 24)       mag = 32'h7FFF_FFFF;
    else if (sh >= 0)        mag = {24'd0, 1'b1, f[6:0]} << sh;
    else if (sh > -8)        mag = {24'd0, 1'b1, f[6:0]} >> (-sh);
    else                     mag = '0;
    return f[15] ? -$signed(mag) : $signed(mag);
  endfunction

  // Multiply a Q15.16 value by 1/sqrt(2): 64-bit product, 32 bits kept.
  function automatic logic signed [31:0] mul_r2(input logic signed [31:0] a);
    logic signed [63:0] p;
    p = 64'(a) * 64'(INV_SQRT2_Q30);
    return 32'(p >>> 30);
  endfunction

endpackage
