// tb_lte_nbiot_top: end-to-end test of the uplink transceiver at its default
// parameters. It sends control bits on PUCCH (BPSK, then QPSK) and data bits
// on PUSCH (QPSK, then 16QAM) under all three layer mapping modes, and PRACH
// resource elements directly; maps one slot; compares both antenna grids
// with a reference model (LFSR, constellation, layer mapping,
// floating-point DFT, section layout); then runs the receiver on several
// sections and checks the hard bits and the ON/OFF decision. A FIFO overflow
// is provoked at the end. Each mechanism (three modulations, three layer
// modes, three channels, zero-filled REs, overflow, ON and OFF decisions) is
// counted and must occur at least once.
module tb_lte_nbiot_top;
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

  always #6.25 clk = ~clk;   // 80 MHz

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  typedef struct { real r0, i0, r1, i1; bit [1:0] ae; } re_t;
  re_t       secq [3][$];          // expected FIFO contents per section
  bit [7:0]  st [2];               // LFSR per chain: 0 PUCCH, 1 PUSCH
  real       grid_r [2][7][54], grid_i [2][7][54];
  int        n_mod [3], n_lm [3], n_chan [3], n_zero, n_ovf, n_on, n_off;

  // Run nbits random bits of one chain through the model and the DUT.
  task automatic send(input int chain, input logic [1:0] sel, input logic [1:0] lm, input int nsym);
    int nb, lcnt;
    real sr [$], si [$];
    real l0r [8], l0i [8], l1r [8], l1i [8];
    bit [1:0] ae;
    nb = (sel == 2'b10) ? 1 : (sel == 2'b01) ? 4 : 2;
    @(negedge clk);
    chan_sel = sel; lm_mode = lm;
    repeat (2) @(negedge clk);
    for (int s = 0; s < nsym; s++) begin
      bit [3:0] g;
      real ci, cq;
      g = 0;
      for (int b = 0; b < nb; b++) begin
        bit v;
        v = 1'($urandom);
        if (chain == 0) begin ctrl_valid = 1; ctrl_bit = v; end
        else            begin data_valid = 1; data_bit = v; end
        #1;
        while (!((chain == 0) ? ctrl_ready : data_ready)) begin @(negedge clk); #1; end
        @(negedge clk);
        ctrl_valid = 0; data_valid = 0;
        g = {g[2:0], lfsr_step(st[chain], v)};
      end
      constellation(nb, g, ci, cq);
      sr.push_back(bf16_to_real(to_bf16(ci)));
      si.push_back(bf16_to_real(to_bf16(cq)));
    end
    // layer mapping and precoding
    lcnt = 0;
    for (int s = 0; s < nsym; s++) begin
      case (lm)
        2'b00: begin l0r[lcnt] = sr[s]; l0i[lcnt] = si[s]; l1r[lcnt] = 0; l1i[lcnt] = 0; ae = 2'b01; lcnt++; end
        2'b11: if (s % 2 == 1) begin
                 l0r[lcnt] = sr[s-1]; l0i[lcnt] = si[s-1]; l1r[lcnt] = sr[s]; l1i[lcnt] = si[s]; ae = 2'b11; lcnt++;
               end
        default: begin l0r[lcnt] = sr[s]; l0i[lcnt] = si[s]; l1r[lcnt] = sr[s]; l1i[lcnt] = si[s]; ae = 2'b11; lcnt++; end
      endcase
      if (lcnt == 8) begin
        real y0r [8], y0i [8], y1r [8], y1i [8];
        dft8(l0r, l0i, y0r, y0i);
        dft8(l1r, l1i, y1r, y1i);
        for (int k = 0; k < 8; k++) secq[chain].push_back('{y0r[k], y0i[k], y1r[k], y1i[k], ae});
        lcnt = 0;
      end
    end
    n_mod[(nb == 1) ? 0 : (nb == 2) ? 1 : 2]++;
    n_lm[(lm == 2'b00) ? 0 : (lm == 2'b11) ? 2 : 1]++;
    n_chan[chain]++;
    repeat (30) @(negedge clk);   // let the block reach the mapper
  endtask

  task automatic send_prach(input int n, input bit negative);
    for (int i = 0; i < n; i++) begin
      cfix_t v;
      v.re = 32'(signed'($urandom_range(1, 60000)));
      v.im = 32'(signed'($urandom_range(0, 60000)) - 30000);
      if (negative) v.re = -v.re;
      @(negedge clk);
      prach_valid = 1; prach_re = v;
      @(negedge clk);
      prach_valid = 0;
      secq[2].push_back('{fix_to_real(v.re), fix_to_real(v.im), 0.0, 0.0, 2'b01});
    end
    n_chan[2]++;
  endtask

  task automatic scan_and_check(input string what);
    int n, bad;
    for (int c = 0; c < 7; c++)
      for (int r = 0; r < 54; r++) begin
        int s;
        s = (r < 36) ? r / 12 : -1;
        for (int a = 0; a < 2; a++) begin grid_r[a][c][r] = 0.0; grid_i[a][c][r] = 0.0; end
        if (s >= 0 && secq[s].size() > 0) begin
          re_t e;
          e = secq[s].pop_front();
          if (e.ae[0]) begin grid_r[0][c][r] = e.r0; grid_i[0][c][r] = e.i0; end
          if (e.ae[1]) begin grid_r[1][c][r] = e.r1; grid_i[1][c][r] = e.i1; end
        end else if (s >= 0) n_zero++;
      end
    @(negedge clk); slot_start = 1;
    @(negedge clk); slot_start = 0;
    n = 1;
    while (!slot_done) begin @(negedge clk); n++; end
    checks++;
    if (n != 379) begin failures++; $display("FAIL %s: slot took %0d clocks", what, n); end
    bad = 0;
    for (int a = 0; a < 2; a++)
      for (int c = 0; c < 7; c++)
        for (int r = 0; r < 54; r++) begin
          rd_ant = a[0]; rd_col = 3'(c); rd_row = 6'(r);
          #1;
          checks++;
          if (fabs(fix_to_real(rd_re.re) - grid_r[a][c][r]) > 2e-3 ||
              fabs(fix_to_real(rd_re.im) - grid_i[a][c][r]) > 2e-3) begin
            failures++; bad++;
            if (bad < 6) $display("FAIL %s ant %0d col %0d row %0d: (%f,%f) want (%f,%f)", what, a, c, r,
                                  fix_to_real(rd_re.re), fix_to_real(rd_re.im), grid_r[a][c][r], grid_i[a][c][r]);
          end
        end
  endtask

  task automatic receive(input int sec, input int col);
    bit [7:0] want;
    bit       dec;
    int       n;
    // expected bits from the grid as read back (checked against the model
    // above), so that values of exactly zero do not depend on rounding
    for (int i = 0; i < 8; i++) begin
      rd_ant = 0; rd_col = 3'(col); rd_row = 6'(sec * 12 + i);
      #1;
      want[i] = !rd_re.re[31];
    end
    dec = ($countones(want) > 4);
    @(negedge clk); rx_start = 1; rx_sec = 2'(sec); rx_col = 3'(col);
    @(negedge clk); rx_start = 0;
    n = 1;
    while (!rx_valid && n < 30) begin @(negedge clk); n++; end
    checks++;
    if (rx_bits !== want || rx_data !== dec || device_on !== dec) begin
      failures++;
      $display("FAIL rx sec %0d col %0d: bits %b want %b, data %b want %b", sec, col, rx_bits, want, rx_data, dec);
    end
    if (dec) n_on++; else n_off++;
  endtask

  initial begin
    chan_sel = 0; lm_mode = 0; rx_sec = 0; rx_col = 0; rx_start = 0;
    ctrl_valid = 0; ctrl_bit = 0; data_valid = 0; data_bit = 0;
    prach_valid = 0; prach_re = '0; slot_start = 0; rd_ant = 0; rd_row = 0; rd_col = 0;
    st[0] = 8'hFF; st[1] = 8'hFF;
    n_zero = 0; n_ovf = 0; n_on = 0; n_off = 0;
    for (int i = 0; i < 3; i++) begin n_mod[i] = 0; n_lm[i] = 0; n_chan[i] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1;

    send(0, 2'b10, 2'b00, 8);    // PUCCH BPSK, single antenna
    send(1, 2'b00, 2'b10, 8);    // PUSCH QPSK, transmit diversity
    send(1, 2'b01, 2'b11, 16);   // PUSCH 16QAM, spatial
    send(0, 2'b11, 2'b01, 8);    // PUCCH QPSK, transmit diversity (01)
    send_prach(8, 1'b1);         // PRACH column 0: negative real parts
    send_prach(8, 1'b0);         //   rest of col 0 and column 1 positive
    scan_and_check("slot1");
    receive(2, 0);               // OFF
    receive(2, 1);               // col 1 rows 24-27 positive, rest zero: ON
    receive(0, 0);
    receive(1, 0);
    receive(1, 1);
    receive(0, 1);

    // overflow of the PRACH FIFO (16 deep)
    send_prach(17, 1'b0);
    checks++;
    if (overflow !== 3'b100) begin failures++; $display("FAIL overflow=%b", overflow); end
    else n_ovf++;
    void'(secq[2].pop_back());
    send(0, 2'b10, 2'b11, 16);   // PUCCH BPSK, spatial
    send(1, 2'b01, 2'b00, 8);    // PUSCH 16QAM, single antenna
    scan_and_check("slot2");
    checks++;
    if (slot_num !== 5'd2 || subframe_num !== 4'd1) begin
      failures++; $display("FAIL slot %0d subframe %0d after two slots", slot_num, subframe_num);
    end
    receive(2, 0);
    receive(0, 0);
    receive(1, 0);

    $display("mechanisms: BPSK %0d QPSK %0d 16QAM %0d | single %0d diversity %0d spatial %0d | PUCCH %0d PUSCH %0d PRACH %0d | zero-filled REs %0d overflow %0d ON %0d OFF %0d",
             n_mod[0], n_mod[1], n_mod[2], n_lm[0], n_lm[1], n_lm[2], n_chan[0], n_chan[1], n_chan[2],
             n_zero, n_ovf, n_on, n_off);
    for (int i = 0; i < 3; i++) begin
      checks += 3;
      if (n_mod[i] == 0)  failures++;
      if (n_lm[i] == 0)   failures++;
      if (n_chan[i] == 0) failures++;
    end
    checks += 4;
    if (n_zero == 0) failures++;
    if (n_ovf == 0)  failures++;
    if (n_on == 0)   failures++;
    if (n_off == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
