// modulation_mapper: BPSK / QPSK / 16QAM constellation mapper.
//
// Collects 1, 2 or 4 scrambled bits (first bit = most significant bit of the
// group S) and outputs the constellation point as a 32-bit complex word
// {I, Q}, each the upper 16 bits of the IEEE 754 single-precision value, as
// the document specifies. Mappings (document tables; for QPSK the figure's
// table, which matches the LTE standard):
//   BPSK  S=0 -> (+1,+1)/sqrt2,  S=1 -> (-1,-1)/sqrt2
//   QPSK  S=b0b1 -> I sign b0, Q sign b1, magnitude 1/sqrt2
//   16QAM S=b0b1b2b3 -> I sign b0, Q sign b1, |I|=3 if b2, |Q|=3 if b3,
//         in units of 1/sqrt10
// Timing: sym_valid is a one-cycle pulse the clock after the last bit of a
// group arrives. A partly collected group is dropped when 'mod' changes.
module modulation_mapper
  import lte_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mod_e    mod,
  input  logic    in_valid,
  input  logic    in_bit,
  output logic    sym_valid,
  output cplx16_t sym
);

  logic [2:0] nbits;
  logic [2:0] cnt;
  logic [2:0] sh;      // bits collected so far, newest in bit 0
  logic [3:0] grp;     // complete group including the current bit
  mod_e       mod_q;
  cplx16_t    pt;

  always_comb begin
    unique case (mod)
      MOD_BPSK:  nbits = 3'd1;
      MOD_QPSK:  nbits = 3'd2;
      default:   nbits = 3'd4;
    endcase
  end

  assign grp = {sh[2:0], in_bit};

  // Constellation lookup on the completed group.
  always_comb begin
    unique case (mod)
      MOD_BPSK: begin
        pt.i = grp[0] ? (F_R2 | F_SIGN) : F_R2;
        pt.q = grp[0] ? (F_R2 | F_SIGN) : F_R2;
      end
      MOD_QPSK: begin
        pt.i = grp[1] ? (F_R2 | F_SIGN) : F_R2;
        pt.q = grp[0] ? (F_R2 | F_SIGN) : F_R2;
      end
      default: begin
        pt.i = (grp[1] ? F_3R10 : F_R10) | (grp[3] ? F_SIGN : 16'h0);
        pt.q = (grp[0] ? F_3R10 : F_R10) | (grp[2] ? F_SIGN : 16'h0);
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      sh        <= '0;
      mod_q     <= MOD_BPSK;
      sym_valid <= 1'b0;
      sym       <= '0;
    end else begin
      mod_q     <= mod;
      sym_valid <= 1'b0;
      if (mod != mod_q) begin
        cnt <= '0;
      end else if (in_valid) begin
        if (cnt == nbits - 3'd1) begin
          cnt       <= '0;
          sym_valid <= 1'b1;
          sym       <= pt;
        end else begin
          cnt <= cnt + 3'd1;
          sh  <= grp[2:0];
        end
      end
    end
  end

endmodule
