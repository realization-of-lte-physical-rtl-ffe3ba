// tb_scrambler: random bits with a random rate enable and random valid;
// every scrambled bit is compared with an LFSR model started from the same
// seed. Also checks in_ready = en and the one-clock output latency.
module tb_scrambler;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic en, in_valid, in_bit, in_ready, out_valid, out_bit;
  int   checks = 0, failures = 0;
  bit [7:0] st;
  bit   exp_bit, exp_valid;

  scrambler dut (.clk, .rst_n, .en, .in_valid, .in_bit, .in_ready, .out_valid, .out_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; in_valid = 0; in_bit = 0;
    st = 8'hFF;
    exp_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      // check the result of the previous clock
      checks++;
      if (out_valid !== exp_valid || (exp_valid && out_bit !== exp_bit)) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d valid %b/%b bit %b/%b", c, out_valid, exp_valid, out_bit, exp_bit);
      end
      en       = ($urandom_range(0, 3) != 0);
      in_valid = ($urandom_range(0, 4) != 0);
      in_bit   = $urandom_range(0, 1);
      #1;
      checks++;
      if (in_ready !== en) failures++;
      exp_valid = en && in_valid;
      if (exp_valid) exp_bit = lfsr_step(st, in_bit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
