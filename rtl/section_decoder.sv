// section_decoder: Start/Stop decoding of the grid row counter for one
// channel section (PUCCH rows 0-11, PUSCH 12-23, PRACH 24-35 when counted
// from 0).
//
// 'start' is high while the row counter equals FIRST, 'stop' while it equals
// LAST; these two decodes are the document's. 'active' is this design's
// addition: high from the row where start is seen up to and including the row
// where stop is seen, so the mapper can tell whether the current row lies in
// the section. 'step' marks the cycles in which the row counter advances and
// 'clear' restarts the flag at the beginning of a scan.
module section_decoder #(
  parameter int unsigned FIRST = 0,
  parameter int unsigned LAST  = 11
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       step,
  input  logic [5:0] row,
  output logic       start,
  output logic       stop,
  output logic       active
);

  logic inside_q;

  assign start  = (row == 6'(FIRST));
  assign stop   = (row == 6'(LAST));
  assign active = start || inside_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 inside_q <= 1'b0;
    else if (clear)             inside_q <= 1'b0;
    else if (step && stop)      inside_q <= 1'b0;
    else if (step && start)     inside_q <= 1'b1;
  end

endmodule
