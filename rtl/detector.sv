// detector: decision stage of the receiver, driving the device control.
//
// The received N-bit vector x is compared with two reference samples, all
// ones and all zeros: the squared distances
//   d1 = sum_i (x_i - 1)^2   and   d0 = sum_i (x_i - 0)^2
// are formed and 'data' is 1 when d1 < d0 (x is nearer the all-ones sample).
// This follows the document's decision box; square roots are left out because
// they do not change the comparison, and a tie gives 0 (this design's
// choice). 'data' and 'out_valid' are registered one clock after in_valid;
// 'device_on' holds the last decision (the ON/OFF control output).
module detector #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] x,
  output logic         out_valid,
  output logic         data,
  output logic         device_on
);

  localparam int unsigned DW = $clog2(N + 1) + 1;

  logic [DW-1:0] d0, d1;

  always_comb begin
    d0 = '0;
    d1 = '0;
    for (int i = 0; i < N; i++) begin
      logic signed [1:0] e1, e0;
      e1 = $signed({1'b0, x[i]}) - 2'sd1;
      e0 = $signed({1'b0, x[i]});
      d1 = d1 + DW'(e1 * e1);
      d0 = d0 + DW'(e0 * e0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      data      <= 1'b0;
      device_on <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        data      <= (d1 < d0);
        device_on <= (d1 < d0);
      end
    end
  end

endmodule
