// scr_rate: scrambler rate control.
//
// The scrambler must deliver bits faster for denser modulations so that the
// symbol rate stays the same: from the 80 MHz input clock it runs at 80 MHz
// for 16QAM, 40 MHz for QPSK and 20 MHz for BPSK, i.e. one symbol every four
// input clocks in every mode. The document builds separate slow clocks; this
// design keeps the single input clock and produces a one-cycle clock enable
// 'en' every DIV_* cycles instead. The divider restarts at reset and whenever
// the modulation changes, so 'en' first rises in the cycle after the change.
module scr_rate
  import lte_pkg::*;
#(
  parameter int unsigned DIV_BPSK = 4,
  parameter int unsigned DIV_QPSK = 2,
  parameter int unsigned DIV_QAM  = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  mod_e mod,
  output logic en
);

  logic [7:0] cnt;
  mod_e       mod_q;
  logic [7:0] div;

  always_comb begin
    unique case (mod)
      MOD_BPSK:  div = 8'(DIV_BPSK);
      MOD_QPSK:  div = 8'(DIV_QPSK);
      default:   div = 8'(DIV_QAM);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      mod_q <= MOD_BPSK;
    end else begin
      mod_q <= mod;
      if (mod != mod_q || cnt == div - 8'd1) cnt <= '0;
      else                                   cnt <= cnt + 8'd1;
    end
  end

  assign en = (mod == mod_q) && (cnt == div - 8'd1);

endmodule
