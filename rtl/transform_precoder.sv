// transform_precoder: DFT transform precoding of one antenna port.
//
// Layer-mapped symbols (16-bit truncated IEEE 754 I/Q) are written into an
// 8-entry RAM. When the eighth arrives, all eight are converted to Q15.16
// fixed point and passed through the combinational 8-point FFT (fft8); the
// result is registered the next clock and streamed out X0..X7, one per clock,
// during the following eight clocks (out_idx = k). Buffering in a RAM and
// starting the FFT after eight symbols follow the document; the conversion to
// fixed point and the streaming output are this design's choices. A new block
// may be collected while the previous one is streamed out; inputs must be at
// least one clock apart from the block's last input for the streaming to
// finish before the next result (at the design's rate of one symbol per four
// clocks this always holds).
module transform_precoder
  import lte_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  cplx16_t in_sym,
  output logic    out_valid,
  output cfix_t   out_re,
  output logic [2:0] out_idx
);

  cplx16_t ram [8];
  logic [2:0] wr_ptr;
  cfix_t   fx   [8];
  cfix_t   fy   [8];
  cfix_t   obuf [8];
  logic    go;           // FFT result is captured this clock
  logic    streaming;
  logic [2:0] rd_ptr;

  // The eighth symbol is used straight from the input so the FFT sees all 8.
  always_comb begin
    for (int n = 0; n < 8; n++) begin
      cplx16_t s;
      s = (n == 7) ? in_sym : ram[n];
      fx[n].re = bf16_to_fix(s.i);
      fx[n].im = bf16_to_fix(s.q);
    end
  end

  fft8 u_fft (.x(fx), .y(fy));

  assign go = in_valid && (wr_ptr == 3'd7);

  always_ff @(posedge clk) begin
    if (in_valid) ram[wr_ptr] <= in_sym;
    if (go) obuf <= fy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      streaming <= 1'b0;
      rd_ptr    <= '0;
    end else begin
      if (in_valid) wr_ptr <= wr_ptr + 3'd1;
      if (go) begin
        streaming <= 1'b1;
        rd_ptr    <= '0;
      end else if (streaming) begin
        rd_ptr <= rd_ptr + 3'd1;
        if (rd_ptr == 3'd7) streaming <= 1'b0;
      end
    end
  end

  assign out_valid = streaming;
  assign out_re    = obuf[rd_ptr];
  assign out_idx   = rd_ptr;

endmodule
