// tb_fft8: the combinational 8-point FFT against a floating-point DFT, for
// unit impulses, constants and random Q15.16 inputs of magnitude below 1.
module tb_fft8;
  import lte_pkg::*;
  import tb_ref_pkg::*;

  cfix_t x [8];
  cfix_t y [8];
  int    checks = 0, failures = 0;

  fft8 dut (.x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec(input string what);
    real xr [8], xi [8], yr [8], yi [8];
    for (int n = 0; n < 8; n++) begin
      xr[n] = fix_to_real(x[n].re);
      xi[n] = fix_to_real(x[n].im);
    end
    dft8(xr, xi, yr, yi);
    #1;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (fabs(fix_to_real(y[k].re) - yr[k]) > 1e-3 || fabs(fix_to_real(y[k].im) - yi[k]) > 1e-3) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s X%0d got (%f,%f) want (%f,%f)", what, k,
                   fix_to_real(y[k].re), fix_to_real(y[k].im), yr[k], yi[k]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      for (int n = 0; n < 8; n++) x[n] = '0;
      x[i].re = 32'sh0001_0000;
      check_vec("impulse");
      x[i].re = 0; x[i].im = -32'sh0000_8000;
      check_vec("impulse_im");
    end
    for (int n = 0; n < 8; n++) begin x[n].re = 32'sh0000_B500; x[n].im = -32'sh0000_B500; end
    check_vec("constant");
    for (int r = 0; r < 300; r++) begin
      for (int n = 0; n < 8; n++) begin
        x[n].re = 32'(signed'($urandom_range(0, 131071)) - 65536);
        x[n].im = 32'(signed'($urandom_range(0, 131071)) - 65536);
      end
      check_vec("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
