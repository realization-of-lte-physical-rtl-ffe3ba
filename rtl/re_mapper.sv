// re_mapper: resource element mapper and resource grid.
//
// The grid of one slot has ROWS x COLS resource elements (54 subcarrier rows
// by 7 symbol columns) per antenna port. Rows 0-11 belong to PUCCH, 12-23 to
// PUSCH and 24-35 to PRACH; rows 36-53 are unused. This split, the row and
// column counters and the per-section Start/Stop decoders follow the
// document. The rest is this design's own:
//  * each section has an input FIFO (FIFO_DEPTH entries of {ant_en, x0, x1}),
//    because data is produced independently of the scan;
//  * a pulse on slot_start starts one scan: one RE per clock, rows 0..53 of
//    column 0, then column 1, ..., 378 clocks in all ('busy' high, 'done'
//    pulses after the last RE);
//  * an RE whose row lies in a section takes the next FIFO entry of that
//    section (antenna port p gets x_p if ant_en[p], else 0); if the FIFO is
//    empty, and for rows outside all sections, the RE is written 0.
// The decoders' Start and Stop outputs are the document's; the selection
// itself uses their in-section flag, so Start is not read here beyond the
// decoder.
// A frame has ten subframes of two slots: slot_num counts the scans modulo
// 20 and subframe_num = slot_num / 2 (frame structure of the document; the
// grid itself holds only the slot being written).
// Two asynchronous read ports (rd_* and rx_*) return a grid entry in the same
// clock. A write into a full FIFO is dropped and sets the sticky bit of that
// section in 'overflow'.
module re_mapper
  import lte_pkg::*;
#(
  parameter int unsigned ROWS       = 54,
  parameter int unsigned COLS       = 7,
  parameter int unsigned SEC_ROWS   = 12,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned N_ANT      = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // inputs per section: 0 PUCCH, 1 PUSCH, 2 PRACH
  input  logic [2:0]  in_valid,
  input  logic [1:0]  in_ant_en [3],
  input  cfix_t       in_x0     [3],
  input  cfix_t       in_x1     [3],
  // scan control
  input  logic        slot_start,
  output logic        busy,
  output logic        done,
  output logic [4:0]  slot_num,      // slot of the frame being written next, 0..19
  output logic [3:0]  subframe_num,  // its subframe, 0..9
  output logic [2:0]  overflow,
  // read port A
  input  logic        rd_ant,
  input  logic [5:0]  rd_row,
  input  logic [2:0]  rd_col,
  output cfix_t       rd_re,
  // read port B (receiver)
  input  logic        rx_ant,
  input  logic [5:0]  rx_row,
  input  logic [2:0]  rx_col,
  output cfix_t       rx_re
);

  localparam int unsigned NRE = ROWS * COLS;
  localparam int unsigned FW  = 2 + 2 * $bits(cfix_t);

  typedef struct packed {
    logic [1:0] ant_en;
    cfix_t      x0;
    cfix_t      x1;
  } entry_t;

  cfix_t grid [N_ANT][NRE];

  logic [5:0] row;
  logic [2:0] col;
  logic [2:0] sec_active, sec_start, sec_stop;
  logic [2:0] f_empty, f_full, f_ovf, f_pop;
  entry_t     f_out [3];
  entry_t     cur;
  logic       cur_ok;
  logic [$clog2(NRE)-1:0] wr_addr;

  for (genvar s = 0; s < 3; s++) begin : g_sec
    logic [FW-1:0] rdata;
    sync_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en   (in_valid[s]),
      .wr_data ({in_ant_en[s], in_x0[s], in_x1[s]}),
      .rd_en   (f_pop[s]),
      .rd_data (rdata),
      .empty   (f_empty[s]),
      .full    (f_full[s]),
      .overflow(f_ovf[s])
    );
    assign f_out[s] = entry_t'(rdata);

    section_decoder #(.FIRST(s * SEC_ROWS), .LAST(s * SEC_ROWS + SEC_ROWS - 1)) u_dec (
      .clk, .rst_n,
      .clear (slot_start && !busy),
      .step  (busy),
      .row,
      .start (sec_start[s]),
      .stop  (sec_stop[s]),
      .active(sec_active[s])
    );

    assign f_pop[s] = busy && sec_active[s] && !f_empty[s];
  end

  // Selection hardware: which FIFO feeds the current RE.
  always_comb begin
    cur    = '0;
    cur_ok = 1'b0;
    for (int s = 0; s < 3; s++) begin
      if (f_pop[s]) begin
        cur    = f_out[s];
        cur_ok = 1'b1;
      end
    end
  end

  assign wr_addr = ($clog2(NRE))'(col) * ($clog2(NRE))'(ROWS) + ($clog2(NRE))'(row);

  always_ff @(posedge clk) begin
    if (busy) begin
      grid[0][wr_addr] <= (cur_ok && cur.ant_en[0]) ? cur.x0 : '0;
      if (N_ANT > 1)
        grid[N_ANT-1][wr_addr] <= (cur_ok && cur.ant_en[1]) ? cur.x1 : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      row      <= '0;
      col      <= '0;
      overflow <= '0;
      slot_num <= '0;
    end else begin
      done     <= 1'b0;
      overflow <= overflow | f_ovf;
      if (!busy) begin
        if (slot_start) begin
          busy <= 1'b1;
          row  <= '0;
          col  <= '0;
        end
      end else if (row == 6'(ROWS - 1)) begin
        row <= '0;
        if (col == 3'(COLS - 1)) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          slot_num <= (slot_num == 5'd19) ? 5'd0 : slot_num + 5'd1;
        end else begin
          col <= col + 3'd1;
        end
      end else begin
        row <= row + 6'd1;
      end
    end
  end

  assign subframe_num = slot_num[4:1];

  assign rd_re = grid[(N_ANT > 1) ? int'(rd_ant) : 0][int'(rd_col) * ROWS + int'(rd_row)];
  assign rx_re = grid[(N_ANT > 1) ? int'(rx_ant) : 0][int'(rx_col) * ROWS + int'(rx_row)];

  // A section's Start must always be seen before its Stop within a scan.
  for (genvar s = 0; s < 3; s++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     busy && sec_stop[s] |-> sec_active[s]);
  end

endmodule
