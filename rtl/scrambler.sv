// scrambler: 8-bit LFSR scrambler.
//
// Eight flip-flops DFF8..DFF1 shift towards DFF1; the feedback
// T = Y[7] ^ Y[6] ^ Y[2] ^ Y[1] (Y[k] is DFFk) enters DFF8. Each input bit is
// XORed with the last LFSR bit, Y[1], to give the scrambled bit; this
// structure and polynomial follow the document. The seed (SEED, loaded at
// reset) and the handshake are this design's choices.
//
// Interface: a bit is taken when in_valid and the rate enable 'en' are both
// high (in_ready = en); the LFSR advances only then. The scrambled bit appears
// on out_bit with out_valid one clock later.
module scrambler #(
  parameter logic [7:0] SEED = 8'hFF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_valid,
  input  logic in_bit,
  output logic in_ready,
  output logic out_valid,
  output logic out_bit
);

  logic [8:1] y;
  logic       t;

  assign t        = y[7] ^ y[6] ^ y[2] ^ y[1];
  assign in_ready = en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= SEED;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= en && in_valid;
      if (en && in_valid) begin
        out_bit <= in_bit ^ y[1];
        y       <= {t, y[8:2]};
      end
    end
  end

endmodule
