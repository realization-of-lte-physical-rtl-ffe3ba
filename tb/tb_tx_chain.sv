// tb_tx_chain: one uplink channel chain from bits to precoded resource
// elements, against a reference model (LFSR, constellation tables,
// truncation to 16-bit floats, layer mapping rules, floating-point DFT).
// Every modulation is run with every layer mapping mode, starting from reset
// each time. Checked for every output: value (within 2e-3), antenna enables
// and the clock in which it appears (X0 four clocks after the clock that
// takes the block's last bit, then one per clock). Also checks the bit rate
// (one bit per 4, 2, 1 clocks for BPSK, QPSK, 16QAM) and that an inactive
// chain takes no bits.
module tb_tx_chain;
  import lte_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       active, in_valid, in_bit, in_ready, out_valid;
  mod_e       mod;
  lm_mode_e   lm_mode;
  logic [1:0] out_ant_en;
  cfix_t      out_x0, out_x1;
  int         checks = 0, failures = 0;

  tx_chain dut (.clk, .rst_n, .active, .mod, .lm_mode, .in_valid, .in_bit, .in_ready,
                .out_valid, .out_ant_en, .out_x0, .out_x1);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  bit [7:0] st;
  int       nb, gcnt, lcnt, cyc, nbits_taken;
  bit [3:0] grp;
  real      pend_r, pend_i;
  bit       have_pend;
  real      l0r [8], l0i [8], l1r [8], l1i [8];
  bit [1:0] l_ae;
  real      e0r [$], e0i [$], e1r [$], e1i [$];
  int       et [$];
  bit [1:0] eae [$];

  task automatic model_reset();
    st = 8'hFF; gcnt = 0; lcnt = 0; have_pend = 0; grp = 0;
    e0r.delete(); e0i.delete(); e1r.delete(); e1i.delete(); et.delete(); eae.delete();
  endtask

  task automatic layer_out(input real ar, ai, br, bi, input bit [1:0] ae, input int t);
    l0r[lcnt] = ar; l0i[lcnt] = ai; l1r[lcnt] = br; l1i[lcnt] = bi; l_ae = ae;
    lcnt++;
    if (lcnt == 8) begin
      real y0r [8], y0i [8], y1r [8], y1i [8];
      dft8(l0r, l0i, y0r, y0i);
      dft8(l1r, l1i, y1r, y1i);
      for (int k = 0; k < 8; k++) begin
        e0r.push_back(y0r[k]); e0i.push_back(y0i[k]);
        e1r.push_back(y1r[k]); e1i.push_back(y1i[k]);
        et.push_back(t + 4 + k); eae.push_back(l_ae);
      end
      lcnt = 0;
    end
  endtask

  task automatic model_bit(input bit b, input int t);
    bit s;
    s = lfsr_step(st, b);
    grp = {grp[2:0], s};
    gcnt++;
    if (gcnt == nb) begin
      real ci, cq, vr, vi;
      constellation(nb, grp, ci, cq);
      vr = bf16_to_real(to_bf16(ci));
      vi = bf16_to_real(to_bf16(cq));
      gcnt = 0;
      case (lm_mode)
        LM_SINGLE:  layer_out(vr, vi, 0.0, 0.0, 2'b01, t);
        LM_SPATIAL: if (have_pend) begin
                      layer_out(pend_r, pend_i, vr, vi, 2'b11, t);
                      have_pend = 0;
                    end else begin
                      pend_r = vr; pend_i = vi; have_pend = 1;
                    end
        default:    layer_out(vr, vi, vr, vi, 2'b11, t);
      endcase
    end
  endtask

  // negedge monitor: compare outputs, feed the model with the bit the next
  // clock takes
  always @(negedge clk) begin
    if (rst_n) begin
      cyc++;
      if (out_valid) begin
        checks++;
        if (et.size() == 0) begin
          failures++; $display("FAIL unexpected output at %0d", cyc);
        end else begin
          real r0, i0, r1, i1;
          int  t;
          bit [1:0] ae;
          r0 = e0r.pop_front(); i0 = e0i.pop_front(); r1 = e1r.pop_front(); i1 = e1i.pop_front();
          t = et.pop_front(); ae = eae.pop_front();
          if (t != cyc || out_ant_en !== ae ||
              fabs(fix_to_real(out_x0.re) - r0) > 2e-3 || fabs(fix_to_real(out_x0.im) - i0) > 2e-3 ||
              (ae[1] && (fabs(fix_to_real(out_x1.re) - r1) > 2e-3 || fabs(fix_to_real(out_x1.im) - i1) > 2e-3))) begin
            failures++;
            if (failures < 10)
              $display("FAIL %s/%s at %0d (want %0d) ae %b/%b x0 (%f,%f) want (%f,%f)", mod.name(), lm_mode.name(),
                       cyc, t, out_ant_en, ae, fix_to_real(out_x0.re), fix_to_real(out_x0.im), r0, i0);
          end
        end
      end
      #1;
      if (in_valid && in_ready) begin
        nbits_taken++;
        model_bit(in_bit, cyc);
      end
    end
  end

  always @(posedge clk) if (in_valid && in_ready) in_bit <= 1'($urandom);

  task automatic run_case(input mod_e m, input lm_mode_e lm, input int nsym);
    int want_bits, c0;
    @(negedge clk);
    rst_n = 0; in_valid = 0; active = 1;
    mod = m; lm_mode = lm;
    nb = (m == MOD_BPSK) ? 1 : (m == MOD_QPSK) ? 2 : 4;
    model_reset();
    @(negedge clk);
    rst_n = 1;
    nbits_taken = 0;
    want_bits = nsym * nb;
    in_valid = 1;
    c0 = cyc;
    while (nbits_taken < want_bits) @(negedge clk);
    in_valid = 0;
    // rate: nb bits per 4 clocks
    checks++;
    if (cyc - c0 < want_bits * 4 / nb - 4 || cyc - c0 > want_bits * 4 / nb + 4) begin
      failures++; $display("FAIL %s rate: %0d bits in %0d clocks", m.name(), want_bits, cyc - c0);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (et.size() != 0) begin failures++; $display("FAIL %s/%s: %0d outputs missing", m.name(), lm.name(), et.size()); end
  endtask

  initial begin
    in_valid = 0; in_bit = 0; active = 1; mod = MOD_BPSK; lm_mode = LM_SINGLE; cyc = 0;
    repeat (3) @(posedge clk);
    for (int m = 0; m < 3; m++)
      for (int l = 0; l < 4; l++)
        run_case(mod_e'(m), lm_mode_e'(l), 32);
    // inactive chain takes nothing
    @(negedge clk); active = 0; in_valid = 1;
    repeat (40) begin
      @(negedge clk);
      checks++;
      if (in_ready) failures++;
    end
    in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
