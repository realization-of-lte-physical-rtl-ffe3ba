// lte_nbiot_top: LTE uplink baseband transmitter and on/off receiver for
// narrowband IoT.
//
// Transmitter: two channel chains (tx_chain), PUCCH for control bits and
// PUSCH for data bits, each scrambling, modulating, layer mapping and DFT
// precoding its input; PRACH resource elements enter directly. The resource
// element mapper queues each channel's output and, on slot_start, writes one
// 54 x 7 slot of the grid of each antenna port (PUCCH rows 0-11, PUSCH 12-23,
// PRACH 24-35).
// Receiver: on rx_start the demapper reads 8 REs of section rx_sec, column
// rx_col (antenna port 0), turns them into bits, and the detector decides
// between all-ones and all-zeros; device_on holds the decision.
//
// chan_sel {a,b}: 00 PUSCH/QPSK, 01 PUSCH/16QAM, 10 PUCCH/BPSK,
// 11 PUCCH/QPSK. Only the selected chain takes bits. lm_mode {c,d}:
// 00 single antenna, 10 or 01 transmit diversity, 11 spatial multiplexing.
// The block structure follows the document; queues, scan timing, number
// formats and the bit slicing in the receiver are this design's choices
// (see the module headers). The grid can be read through rd_*; slot_num and
// subframe_num give the frame position of the next slot scan.
module lte_nbiot_top
  import lte_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  chan_sel,
  input  logic [1:0]  lm_mode,
  // PUCCH control bits
  input  logic        ctrl_valid,
  input  logic        ctrl_bit,
  output logic        ctrl_ready,
  // PUSCH data bits
  input  logic        data_valid,
  input  logic        data_bit,
  output logic        data_ready,
  // PRACH resource elements (antenna port 0)
  input  logic        prach_valid,
  input  cfix_t       prach_re,
  // slot mapping
  input  logic        slot_start,
  output logic        slot_busy,
  output logic        slot_done,
  output logic [4:0]  slot_num,
  output logic [3:0]  subframe_num,
  output logic [2:0]  overflow,
  // grid read port
  input  logic        rd_ant,
  input  logic [5:0]  rd_row,
  input  logic [2:0]  rd_col,
  output cfix_t       rd_re,
  // receiver
  input  logic        rx_start,
  input  logic [1:0]  rx_sec,
  input  logic [2:0]  rx_col,
  output logic [7:0]  rx_bits,
  output logic        rx_valid,
  output logic        rx_data,
  output logic        device_on
);

  chan_sel_e  sel;
  lm_mode_e   lmm;
  mod_e       pucch_mod, pusch_mod;

  logic       c_valid, d_valid;
  logic [1:0] c_ant, d_ant;
  cfix_t      c_x0, c_x1, d_x0, d_x1;

  logic [2:0] m_valid;
  logic [1:0] m_ant [3];
  cfix_t      m_x0  [3];
  cfix_t      m_x1  [3];

  logic [5:0] rx_row;
  logic [2:0] rx_rcol;
  cfix_t      rx_re;
  logic       bits_valid;
  logic       det_valid, det_data;

  assign sel       = chan_sel_e'(chan_sel);
  assign lmm       = lm_mode_e'(lm_mode);
  assign pucch_mod = (sel == SEL_PUCCH_BPSK)  ? MOD_BPSK  : MOD_QPSK;
  assign pusch_mod = (sel == SEL_PUSCH_QAM16) ? MOD_QAM16 : MOD_QPSK;

  tx_chain u_pucch (
    .clk, .rst_n, .active(sel[1]), .mod(pucch_mod), .lm_mode(lmm),
    .in_valid(ctrl_valid), .in_bit(ctrl_bit), .in_ready(ctrl_ready),
    .out_valid(c_valid), .out_ant_en(c_ant), .out_x0(c_x0), .out_x1(c_x1)
  );

  tx_chain u_pusch (
    .clk, .rst_n, .active(!sel[1]), .mod(pusch_mod), .lm_mode(lmm),
    .in_valid(data_valid), .in_bit(data_bit), .in_ready(data_ready),
    .out_valid(d_valid), .out_ant_en(d_ant), .out_x0(d_x0), .out_x1(d_x1)
  );

  assign m_valid = {prach_valid, d_valid, c_valid};
  assign m_ant   = '{c_ant, d_ant, 2'b01};
  assign m_x0    = '{c_x0, d_x0, prach_re};
  assign m_x1    = '{c_x1, d_x1, cfix_t'('0)};

  re_mapper #(.FIFO_DEPTH(FIFO_DEPTH)) u_map (
    .clk, .rst_n,
    .in_valid(m_valid), .in_ant_en(m_ant), .in_x0(m_x0), .in_x1(m_x1),
    .slot_start, .busy(slot_busy), .done(slot_done), .slot_num, .subframe_num, .overflow,
    .rd_ant, .rd_row, .rd_col, .rd_re,
    .rx_ant(1'b0), .rx_row, .rx_col(rx_rcol), .rx_re
  );

  re_demapper u_demap (
    .clk, .rst_n, .start(rx_start), .sec(rx_sec), .col(rx_col),
    .rd_row(rx_row), .rd_col(rx_rcol), .rd_re(rx_re),
    .bits_valid, .bits(rx_bits)
  );

  detector u_det (
    .clk, .rst_n, .in_valid(bits_valid), .x(rx_bits),
    .out_valid(det_valid), .data(det_data), .device_on
  );

  assign rx_valid = det_valid;
  assign rx_data  = det_data;

endmodule
