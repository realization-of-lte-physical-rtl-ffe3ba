// tb_onoff_demo: the on/off control demonstration. The control word
// 11111111 is repeated on each of the four channel selections (PUSCH QPSK,
// PUSCH 16QAM, PUCCH BPSK, PUCCH QPSK) until one precoding block of eight
// symbols is full, with single-antenna mapping; one slot is mapped and the
// receiver reads the channel's section. The grid is compared with the
// reference model (scrambled word, constellation, DFT) and the receiver's
// bits and decision with the signs of the model values (a value within
// rounding of zero may go either way). The decision of each run is printed.
module tb_onoff_demo;
  import lte_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic [1:0] chan_sel, lm_mode, rx_sec;
  logic       ctrl_valid, ctrl_bit, ctrl_ready, data_valid, data_bit, data_ready;
  logic       prach_valid;
  cfix_t      prach_re;
  logic       slot_start, slot_busy, slot_done;
  logic [4:0] slot_num;
  logic [3:0] subframe_num;
  logic [2:0] overflow, rd_col, rx_col;
  logic       rd_ant;
  logic [5:0] rd_row;
  cfix_t      rd_re;
  logic       rx_start, rx_valid, rx_data, device_on;
  logic [7:0] rx_bits;
  int         checks = 0, failures = 0;

  lte_nbiot_top dut (.*);

  always #6.25 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit [7:0] st [2];

  task automatic demo(input logic [1:0] sel);
    int  chain, nb, sec;
    real xr [8], xi [8], yr [8], yi [8];
    bit [7:0] want_lo, want_hi;
    chain = sel[1] ? 0 : 1;
    sec   = chain;
    nb    = (sel == 2'b10) ? 1 : (sel == 2'b01) ? 4 : 2;
    @(negedge clk); chan_sel = sel; lm_mode = 2'b00;
    repeat (2) @(negedge clk);
    for (int s = 0; s < 8; s++) begin
      bit [3:0] g;
      real ci, cq;
      g = 0;
      for (int b = 0; b < nb; b++) begin
        if (chain == 0) begin ctrl_valid = 1; ctrl_bit = 1; end
        else            begin data_valid = 1; data_bit = 1; end
        #1;
        while (!((chain == 0) ? ctrl_ready : data_ready)) begin @(negedge clk); #1; end
        @(negedge clk);
        ctrl_valid = 0; data_valid = 0;
        g = {g[2:0], lfsr_step(st[chain], 1'b1)};
      end
      constellation(nb, g, ci, cq);
      xr[s] = bf16_to_real(to_bf16(ci));
      xi[s] = bf16_to_real(to_bf16(cq));
    end
    dft8(xr, xi, yr, yi);
    repeat (20) @(negedge clk);
    @(negedge clk); slot_start = 1;
    @(negedge clk); slot_start = 0;
    while (!slot_done) @(negedge clk);
    // grid: rows of the section, column 0, port 0 and port 1 (empty)
    for (int k = 0; k < 8; k++) begin
      rd_ant = 0; rd_col = 0; rd_row = 6'(sec * 12 + k);
      #1;
      checks++;
      if (fabs(fix_to_real(rd_re.re) - yr[k]) > 2e-3 || fabs(fix_to_real(rd_re.im) - yi[k]) > 2e-3) begin
        failures++;
        $display("FAIL sel %b X%0d (%f,%f) want (%f,%f)", sel, k, fix_to_real(rd_re.re), fix_to_real(rd_re.im), yr[k], yi[k]);
      end
      rd_ant = 1;
      #1;
      checks++;
      if (rd_re !== '0) failures++;
      // possible bits: lo treats near-zero values as negative, hi as positive
      want_lo[k] = (yr[k] > 2e-3);
      want_hi[k] = (yr[k] > -2e-3);
    end
    @(negedge clk); rx_start = 1; rx_sec = 2'(sec); rx_col = 0;
    @(negedge clk); rx_start = 0;
    while (!rx_valid) @(negedge clk);
    checks++;
    if ((rx_bits & ~want_hi) != 0 || (want_lo & ~rx_bits) != 0 ||
        rx_data !== ($countones(rx_bits) > 4) || device_on !== rx_data) begin
      failures++;
      $display("FAIL sel %b rx %b (between %b and %b) data %b", sel, rx_bits, want_lo, want_hi, rx_data);
    end
    $display("selection %b: sent 11111111 x %0d, received bits %b -> device %s", sel, nb,
             rx_bits, device_on ? "ON" : "OFF");
  endtask

  initial begin
    chan_sel = 0; lm_mode = 0; rx_sec = 0; rx_col = 0; rx_start = 0;
    ctrl_valid = 0; ctrl_bit = 0; data_valid = 0; data_bit = 0;
    prach_valid = 0; prach_re = '0; slot_start = 0; rd_ant = 0; rd_row = 0; rd_col = 0;
    st[0] = 8'hFF; st[1] = 8'hFF;
    repeat (4) @(posedge clk);
    rst_n = 1;
    demo(2'b10);
    demo(2'b11);
    demo(2'b00);
    demo(2'b01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
