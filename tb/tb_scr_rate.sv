// tb_scr_rate: checks that the rate enable pulses once every 4, 2 and 1
// clocks for BPSK, QPSK and 16QAM (20, 40 and 80 MHz from 80 MHz), and that
// the divider restarts on a modulation change.
module tb_scr_rate;
  import lte_pkg::*;

  logic clk = 0, rst_n = 0;
  mod_e mod;
  logic en;
  int   checks = 0, failures = 0;

  scr_rate dut (.clk, .rst_n, .mod, .en);

  always #6.25 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input mod_e m, input int div);
    int n_en, last, gap_bad;
    mod = m;
    #1;                        // cycle of the change: no enable
    checks++;
    if (en) begin failures++; $display("FAIL en right after change to %s", m.name()); end
    n_en = 0; last = -1; gap_bad = 0;
    for (int c = 0; c < 64; c++) begin
      @(negedge clk);
      if (c == 0) begin
        // first enable comes DIV clocks after the change
        checks++;
        if (en !== (div == 1)) begin failures++; $display("FAIL %s first enable", m.name()); end
      end
      if (en) begin
        if (last >= 0 && c - last != div) gap_bad++;
        last = c;
        n_en++;
      end
    end
    checks++;
    if (n_en != 64 / div || gap_bad != 0) begin
      failures++;
      $display("FAIL %s: %0d enables in 64 clocks (want %0d), %0d bad gaps", m.name(), n_en, 64 / div, gap_bad);
    end
  endtask

  initial begin
    mod = MOD_QAM16;
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(MOD_BPSK, 4);
    measure(MOD_QPSK, 2);
    measure(MOD_QAM16, 1);
    measure(MOD_BPSK, 4);
    measure(MOD_QAM16, 1);
    measure(MOD_QPSK, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
