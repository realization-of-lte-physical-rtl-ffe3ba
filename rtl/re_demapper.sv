// re_demapper: resource element demapper of the receiver.
//
// On 'start' it latches a section (0 PUCCH, 1 PUSCH, 2 PRACH) and a column
// and reads the first N resource elements of that section in that column of
// antenna port 0, one per clock, through an asynchronous grid read port
// (rd_row/rd_col -> rd_re). Each RE becomes one hard bit: 1 when its real part
// is not negative. 'bits_valid' pulses the clock after the last read; bit i
// comes from row FIRST+i. Reading N = 8 REs matches the 8-bit samples of the
// decision stage; the slicing rule is this design's own, since the document
// does not say how a grid value becomes a bit.
module re_demapper
  import lte_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned SEC_ROWS = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [1:0]   sec,
  input  logic [2:0]   col,
  output logic [5:0]   rd_row,
  output logic [2:0]   rd_col,
  input  cfix_t        rd_re,
  output logic         bits_valid,
  output logic [N-1:0] bits
);

  logic       run;
  logic [5:0] base;
  logic [$clog2(N)-1:0] idx;

  assign rd_row = base + 6'(idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run        <= 1'b0;
      base       <= '0;
      rd_col     <= '0;
      idx        <= '0;
      bits       <= '0;
      bits_valid <= 1'b0;
    end else begin
      bits_valid <= 1'b0;
      if (!run) begin
        if (start) begin
          run    <= 1'b1;
          base   <= 6'(sec) * 6'(SEC_ROWS);
          rd_col <= col;
          idx    <= '0;
        end
      end else begin
        bits[idx] <= !rd_re.re[31];
        idx       <= idx + 1'b1;
        if (idx == ($clog2(N))'(N - 1)) begin
          run        <= 1'b0;
          bits_valid <= 1'b1;
        end
      end
    end
  end

endmodule
