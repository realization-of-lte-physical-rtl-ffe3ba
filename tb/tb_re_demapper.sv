// tb_re_demapper: a grid held in the testbench answers the demapper's
// asynchronous reads. For random grid contents, sections and columns the
// eight hard bits must equal "real part not negative" of rows FIRST..FIRST+7
// of that column, and bits_valid must come 9 clocks after start.
module tb_re_demapper;
  import lte_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       start, bits_valid;
  logic [1:0] sec;
  logic [2:0] col, rd_col;
  logic [5:0] rd_row;
  cfix_t      rd_re;
  logic [7:0] bits;
  int         checks = 0, failures = 0;
  cfix_t      grid [7][54];

  re_demapper dut (.clk, .rst_n, .start, .sec, .col, .rd_row, .rd_col, .rd_re, .bits_valid, .bits);

  assign rd_re = (rd_row < 54) ? grid[rd_col][rd_row] : '0;

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; sec = 0; col = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      logic [7:0] want;
      int s, c, n;
      for (int cc = 0; cc < 7; cc++)
        for (int r = 0; r < 54; r++) grid[cc][r] = cfix_t'({$urandom, $urandom});
      s = $urandom_range(0, 2);
      c = $urandom_range(0, 6);
      for (int i = 0; i < 8; i++) want[i] = (grid[c][s * 12 + i].re >= 0);
      @(negedge clk); start = 1; sec = 2'(s); col = 3'(c);
      @(negedge clk); start = 0; sec = 2'($urandom); col = 3'($urandom);
      n = 1;
      while (!bits_valid && n < 20) begin @(negedge clk); n++; end
      checks++;
      if (n != 9 || bits !== want) begin
        failures++;
        $display("FAIL sec %0d col %0d: bits %b want %b after %0d clocks", s, c, bits, want, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
