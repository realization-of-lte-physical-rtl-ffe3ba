// tb_section_decoder: sweeps the row counter 0..53 for the three sections
// (rows 0-11, 12-23, 24-35) with random stalls and checks start, stop and
// the in-section flag against the row range, twice (the flag must restart
// after 'clear').
module tb_section_decoder;
  logic       clk = 0, rst_n = 0;
  logic       clear, step;
  logic [5:0] row;
  logic [2:0] start, stop, active;
  int         checks = 0, failures = 0;

  for (genvar s = 0; s < 3; s++) begin : g
    section_decoder #(.FIRST(s * 12), .LAST(s * 12 + 11)) dut (
      .clk, .rst_n, .clear, .step, .row,
      .start(start[s]), .stop(stop[s]), .active(active[s]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; step = 0; row = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      @(negedge clk); clear = 1; row = 0;
      @(negedge clk); clear = 0;
      for (int r = 0; r < 54; r++) begin
        row  = 6'(r);
        step = 1'b0;
        repeat ($urandom_range(0, 2)) begin
          @(negedge clk);
        end
        step = 1'b1;
        #1;
        for (int s = 0; s < 3; s++) begin
          checks++;
          if (start[s] !== (r == s * 12) || stop[s] !== (r == s * 12 + 11) ||
              active[s] !== (r >= s * 12 && r <= s * 12 + 11)) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d sec %0d: %b %b %b", r, s, start[s], stop[s], active[s]);
          end
        end
        @(negedge clk);
      end
      step = 0;
      // stop the third pass half way and restart: flags must clear
      if (pass == 1) begin
        @(negedge clk); row = 6'd5; step = 1; @(negedge clk); step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
