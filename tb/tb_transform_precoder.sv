// tb_transform_precoder: blocks of eight constellation symbols (truncated
// IEEE 754) go in with random gaps; each block's eight outputs are compared
// with a floating-point DFT of the symbol values, and the output timing is
// checked: X0 in the clock after the eighth input is taken, then one per clock.
module tb_transform_precoder;
  import lte_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       in_valid, out_valid;
  cplx16_t    in_sym;
  cfix_t      out_re;
  logic [2:0] out_idx;
  int         checks = 0, failures = 0;

  transform_precoder dut (.clk, .rst_n, .in_valid, .in_sym, .out_valid, .out_re, .out_idx);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_sym = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      real xr [8], xi [8], yr [8], yi [8];
      int  nb;
      nb = 1 << $urandom_range(0, 2);
      for (int n = 0; n < 8; n++) begin
        real ei, eq;
        constellation(nb, 4'($urandom_range(0, 15)), ei, eq);
        @(negedge clk);
        in_valid = 1;
        in_sym.i = to_bf16(ei);
        in_sym.q = to_bf16(eq);
        xr[n] = bf16_to_real(in_sym.i);
        xi[n] = bf16_to_real(in_sym.q);
        @(negedge clk);
        in_valid = 0;
        if (n < 7) repeat ($urandom_range(0, 4)) @(negedge clk);
      end
      dft8(xr, xi, yr, yi);
      // X0 is out in the clock after the one that took the 8th input
      for (int k = 0; k < 8; k++) begin
        if (k > 0) @(negedge clk);
        checks++;
        if (!out_valid || out_idx !== 3'(k) ||
            fabs(fix_to_real(out_re.re) - yr[k]) > 2e-3 ||
            fabs(fix_to_real(out_re.im) - yi[k]) > 2e-3) begin
          failures++;
          if (failures < 10)
            $display("FAIL blk %0d X%0d v=%b idx=%0d got (%f,%f) want (%f,%f)", b, k, out_valid, out_idx,
                     fix_to_real(out_re.re), fix_to_real(out_re.im), yr[k], yi[k]);
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL output too long"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
