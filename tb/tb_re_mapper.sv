// tb_re_mapper: fills the three section FIFOs with random resource elements
// (different counts and antenna enables), runs a slot scan and compares the
// whole grid of both antenna ports with a model that fills each section's
// rows column by column and writes zeros elsewhere. Checks the scan length
// (378 clocks), slot/subframe numbering over more than a frame, a second scan with empty FIFOs (all zeros), data arriving
// during a scan, and the sticky overflow flag.
module tb_re_mapper;
  import lte_pkg::*;

  localparam int ROWS = 54, COLS = 7;

  logic       clk = 0, rst_n = 0;
  logic [2:0] in_valid;
  logic [1:0] in_ant_en [3];
  cfix_t      in_x0 [3], in_x1 [3];
  logic       slot_start, busy, done;
  logic [4:0] slot_num;
  logic [3:0] subframe_num;
  int         nscans = 0;
  logic [2:0] overflow;
  logic       rd_ant, rx_ant;
  logic [5:0] rd_row, rx_row;
  logic [2:0] rd_col, rx_col;
  cfix_t      rd_re, rx_re;
  int         checks = 0, failures = 0;

  cfix_t      model [2][COLS][ROWS];
  cfix_t      q0 [3][$];
  cfix_t      q1 [3][$];
  logic [1:0] qa [3][$];

  re_mapper dut (.clk, .rst_n, .in_valid, .in_ant_en, .in_x0, .in_x1, .slot_start, .busy, .done, .slot_num, .subframe_num,
                 .overflow, .rd_ant, .rd_row, .rd_col, .rd_re, .rx_ant, .rx_row, .rx_col, .rx_re);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input int s, input logic [1:0] ae);
    cfix_t a, b;
    a = cfix_t'({$urandom, $urandom});
    b = cfix_t'({$urandom, $urandom});
    @(negedge clk);
    in_valid = '0; in_valid[s] = 1'b1;
    in_ant_en[s] = ae; in_x0[s] = a; in_x1[s] = b;
    @(negedge clk);
    in_valid = '0;
    q0[s].push_back(a); q1[s].push_back(b); qa[s].push_back(ae);
  endtask

  // Model of one scan: REs are taken in scan order from the queues.
  task automatic model_scan();
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) begin
        int s;
        s = (r < 36) ? r / 12 : -1;
        model[0][c][r] = '0;
        model[1][c][r] = '0;
        if (s >= 0 && q0[s].size() > 0) begin
          cfix_t a, b;
          logic [1:0] ae;
          a = q0[s].pop_front(); b = q1[s].pop_front(); ae = qa[s].pop_front();
          if (ae[0]) model[0][c][r] = a;
          if (ae[1]) model[1][c][r] = b;
        end
      end
  endtask

  task automatic run_scan();
    int n;
    @(negedge clk); slot_start = 1;
    @(negedge clk); slot_start = 0;
    n = 0;
    while (!done) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (n != 378) begin failures++; $display("FAIL scan took %0d clocks", n); end
    nscans++;
    @(negedge clk);
    checks++;
    if (slot_num != 5'(nscans % 20) || subframe_num != 4'((nscans % 20) / 2)) begin
      failures++; $display("FAIL slot %0d subframe %0d after %0d scans", slot_num, subframe_num, nscans);
    end
  endtask

  task automatic compare_grid(input string what);
    int bad;
    bad = 0;
    for (int a = 0; a < 2; a++)
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++) begin
          rd_ant = a[0]; rd_row = 6'(r); rd_col = 3'(c);
          rx_ant = a[0]; rx_row = 6'(r); rx_col = 3'(c);
          #1;
          checks++;
          if (rd_re !== model[a][c][r] || rx_re !== model[a][c][r]) begin
            failures++; bad++;
            if (bad < 5) $display("FAIL %s ant %0d row %0d col %0d: %h want %h", what, a, r, c, rd_re, model[a][c][r]);
          end
        end
  endtask

  initial begin
    in_valid = 0; slot_start = 0;
    for (int s = 0; s < 3; s++) begin in_ant_en[s] = 0; in_x0[s] = '0; in_x1[s] = '0; end
    rd_ant = 0; rd_row = 0; rd_col = 0; rx_ant = 0; rx_row = 0; rx_col = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++)  push(0, 2'b11);
    for (int i = 0; i < 5; i++)  push(1, 2'b01);
    for (int i = 0; i < 14; i++) push(2, 2'b01);
    model_scan();
    run_scan();
    compare_grid("scan1");
    checks++;
    if (overflow !== 3'b000) begin failures++; $display("FAIL overflow early"); end
    // second scan: nothing queued -> grid all zeros
    model_scan();
    run_scan();
    compare_grid("scan2");
    // data pushed while the scan runs: PUSCH entries queued before the scan
    // reaches row 12 of column 0 land in that column
    @(negedge clk); slot_start = 1;
    @(negedge clk); slot_start = 0;
    push(1, 2'b10);
    push(1, 2'b11);
    while (!done) @(negedge clk);
    nscans++;
    model_scan();
    compare_grid("scan3");
    // overflow: 17 writes into a 16-deep FIFO
    for (int i = 0; i < 17; i++) push(0, 2'b01);
    checks++;
    if (overflow !== 3'b001) begin failures++; $display("FAIL overflow=%b", overflow); end
    void'(q0[0].pop_back()); void'(q1[0].pop_back()); void'(qa[0].pop_back());
    model_scan();
    run_scan();
    compare_grid("scan4");
    // a whole frame: slot numbers wrap after 20 scans
    while (nscans < 22) run_scan();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
