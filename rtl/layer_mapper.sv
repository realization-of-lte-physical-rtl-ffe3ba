// layer_mapper: maps modulation symbols onto antenna ports 0 and 1.
//
//   LM_SINGLE    (00)      x0 = d(i); port 1 carries nothing
//   LM_DIVERSITY (10 / 01) x0 = x1 = d(i), the same symbol on both ports
//   LM_SPATIAL   (11)      x0 = d(2i), x1 = d(2i+1): even symbols on port 0,
//                          odd symbols on port 1, one output per pair
// The three cases follow the document's layer mapping table; accepting both
// 10 and 01 for diversity is this design's reading of two different codes the
// document uses for it. out_ant_en tells which ports carry a symbol.
// Timing: outputs are registered; out_valid pulses one clock after the input
// that completes an output (every input, or every second one in spatial
// mode). A pending even symbol is dropped when the mode leaves spatial.
module layer_mapper
  import lte_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  lm_mode_e mode,
  input  logic     in_valid,
  input  cplx16_t  in_sym,
  output logic     out_valid,
  output logic [1:0] out_ant_en,
  output cplx16_t  out_x0,
  output cplx16_t  out_x1
);

  cplx16_t even_q;
  logic    have_even;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      even_q     <= '0;
      have_even  <= 1'b0;
      out_valid  <= 1'b0;
      out_ant_en <= 2'b00;
      out_x0     <= '0;
      out_x1     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (mode != LM_SPATIAL) have_even <= 1'b0;
      if (in_valid) begin
        unique case (mode)
          LM_SINGLE: begin
            out_valid  <= 1'b1;
            out_ant_en <= 2'b01;
            out_x0     <= in_sym;
            out_x1     <= '0;
          end
          LM_SPATIAL: begin
            if (have_even) begin
              out_valid  <= 1'b1;
              out_ant_en <= 2'b11;
              out_x0     <= even_q;
              out_x1     <= in_sym;
              have_even  <= 1'b0;
            end else begin
              even_q    <= in_sym;
              have_even <= 1'b1;
            end
          end
          default: begin
            out_valid  <= 1'b1;
            out_ant_en <= 2'b11;
            out_x0     <= in_sym;
            out_x1     <= in_sym;
          end
        endcase
      end
    end
  end

endmodule
