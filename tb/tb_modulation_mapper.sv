// tb_modulation_mapper: sends every bit group of BPSK, QPSK and 16QAM (and a
// random stream) through the mapper and compares each symbol with the
// truncated IEEE 754 encoding of the tabulated constellation point. Also
// checks that a symbol appears one clock after its last bit and that a
// partial group is dropped when the modulation changes.
module tb_modulation_mapper;
  import lte_pkg::*;
  import tb_ref_pkg::*;

  logic    clk = 0, rst_n = 0;
  mod_e    mod;
  logic    in_valid, in_bit, sym_valid;
  cplx16_t sym;
  int      checks = 0, failures = 0;

  modulation_mapper dut (.clk, .rst_n, .mod, .in_valid, .in_bit, .sym_valid, .sym);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_group(input int nb, input bit [3:0] s);
    real ei, eq;
    for (int b = nb - 1; b >= 0; b--) begin
      @(negedge clk);
      in_valid = 1;
      in_bit   = s[b];
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (sym_valid !== (b == 0)) begin
        failures++;
        $display("FAIL nb=%0d s=%b bit %0d: sym_valid=%b", nb, s, b, sym_valid);
      end
    end
    constellation(nb, s, ei, eq);
    checks++;
    if (sym.i !== to_bf16(ei) || sym.q !== to_bf16(eq)) begin
      failures++;
      $display("FAIL nb=%0d s=%b got %h/%h want %h/%h", nb, s, sym.i, sym.q, to_bf16(ei), to_bf16(eq));
    end
  endtask

  initial begin
    in_valid = 0; in_bit = 0; mod = MOD_BPSK;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 2; s++) send_group(1, 4'(s));
    mod = MOD_QPSK; @(negedge clk);
    for (int s = 0; s < 4; s++) send_group(2, 4'(s));
    mod = MOD_QAM16; @(negedge clk);
    for (int s = 0; s < 16; s++) send_group(4, 4'(s));
    // partial group then a change of modulation
    @(negedge clk); in_valid = 1; in_bit = 1;
    @(negedge clk); in_valid = 1; in_bit = 0;
    @(negedge clk); in_valid = 0; mod = MOD_QPSK;
    @(negedge clk);
    for (int s = 3; s >= 0; s--) send_group(2, 4'(s));
    for (int r = 0; r < 200; r++) begin
      int nb;
      nb = 1 << $urandom_range(0, 2);
      mod = (nb == 1) ? MOD_BPSK : (nb == 2) ? MOD_QPSK : MOD_QAM16;
      @(negedge clk);
      send_group(nb, 4'($urandom_range(0, (1 << nb) - 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
