// tb_layer_mapper: random symbols in each layer mapping mode (single, both
// transmit diversity codes, spatial); outputs and antenna enables are
// compared with the mapping rules x0=d(i) / x0=x1=d(i) / x0=d(2i),x1=d(2i+1).
module tb_layer_mapper;
  import lte_pkg::*;

  logic       clk = 0, rst_n = 0;
  lm_mode_e   mode;
  logic       in_valid, out_valid;
  cplx16_t    in_sym, out_x0, out_x1;
  logic [1:0] out_ant_en;
  int         checks = 0, failures = 0;

  layer_mapper dut (.clk, .rst_n, .mode, .in_valid, .in_sym, .out_valid, .out_ant_en, .out_x0, .out_x1);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_mode(input lm_mode_e m, input int nsym);
    cplx16_t prev;
    mode = m;
    @(negedge clk);
    for (int n = 0; n < nsym; n++) begin
      cplx16_t d;
      bit      want;
      d = cplx16_t'($urandom);
      in_valid = 1; in_sym = d;
      @(negedge clk);
      in_valid = 0;
      want = (m != LM_SPATIAL) || (n % 2 == 1);
      checks++;
      if (out_valid !== want) begin
        failures++;
        $display("FAIL %s n=%0d out_valid=%b", m.name(), n, out_valid);
      end else if (want) begin
        checks++;
        case (m)
          LM_SINGLE:  if (out_ant_en !== 2'b01 || out_x0 !== d) failures++;
          LM_SPATIAL: if (out_ant_en !== 2'b11 || out_x0 !== prev || out_x1 !== d) failures++;
          default:    if (out_ant_en !== 2'b11 || out_x0 !== d || out_x1 !== d) failures++;
        endcase
      end
      prev = d;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  initial begin
    in_valid = 0; in_sym = '0; mode = LM_SINGLE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_mode(LM_SINGLE, 20);
    run_mode(LM_DIVERSITY, 20);
    run_mode(LM_DIV_ALT, 20);
    run_mode(LM_SPATIAL, 20);
    // leave spatial with an even symbol pending: it must be dropped
    in_valid = 1; in_sym = cplx16_t'(32'hDEADBEEF);
    @(negedge clk); in_valid = 0;
    run_mode(LM_SINGLE, 6);
    run_mode(LM_SPATIAL, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
