// tb_detector: every 8-bit input vector; the decision must be 1 exactly when
// more than four bits are 1 (nearer to 11111111 than to 00000000), including
// the example 11111001 -> ON. Checks the one-clock latency and that
// device_on holds the last decision.
module tb_detector;
  logic       clk = 0, rst_n = 0;
  logic       in_valid, out_valid, data, device_on;
  logic [7:0] x;
  int         checks = 0, failures = 0;

  detector dut (.clk, .rst_n, .in_valid, .x, .out_valid, .data, .device_on);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic decide(input logic [7:0] v);
    bit want;
    want = ($countones(v) > 4);
    @(negedge clk); in_valid = 1; x = v;
    @(negedge clk); in_valid = 0; x = ~v;
    checks++;
    if (!out_valid || data !== want || device_on !== want) begin
      failures++;
      $display("FAIL x=%b got %b/%b want %b", v, data, device_on, want);
    end
    repeat (2) @(negedge clk);
    checks++;
    if (out_valid || device_on !== want) begin failures++; $display("FAIL hold x=%b", v); end
  endtask

  initial begin
    in_valid = 0; x = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    decide(8'b1111_1001);
    decide(8'b0000_0000);
    decide(8'b1111_1111);
    for (int v = 0; v < 256; v++) decide(8'(v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
