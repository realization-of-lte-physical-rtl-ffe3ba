// tx_chain: transmit path of one uplink channel (PUCCH or PUSCH).
//
//   bits -> scrambler -> modulation mapper -> layer mapper
//        -> transform precoder (antenna port 0) / transform precoder (port 1)
//
// The order of the stages is the document's. scr_rate turns the modulation
// into a rate enable so that a symbol is formed every four clocks in every
// mode. 'active' gates the rate enable, so a chain that is not selected takes
// no bits. Both precoders always see the same valid strobe, so their blocks
// of eight stay aligned; the antenna ports that carry data in a block
// (out_ant_en) are those of the block's eighth layer-mapped symbol.
// Timing: a bit taken in clock t leaves the scrambler at t+1; a complete
// symbol appears at the layer mapper output two clocks after its last bit,
// and each block of eight layer outputs is streamed out of the precoders as
// X0..X7 starting two clocks after its eighth layer output.
module tx_chain
  import lte_pkg::*;
#(
  parameter logic [7:0] SEED = 8'hFF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       active,
  input  mod_e       mod,
  input  lm_mode_e   lm_mode,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       in_ready,
  output logic       out_valid,
  output logic [1:0] out_ant_en,
  output cfix_t      out_x0,
  output cfix_t      out_x1
);

  logic       rate_en, scr_en;
  logic       s_valid, s_bit;
  logic       m_valid;
  cplx16_t    m_sym;
  logic       l_valid;
  logic [1:0] l_ant_en;
  cplx16_t    l_x0, l_x1;
  logic       p1_valid;
  logic [2:0] p0_idx, p1_idx;
  logic [2:0] lcnt;
  logic [1:0] blk_ant_en, out_ant_en_q;

  scr_rate u_rate (.clk, .rst_n, .mod, .en(rate_en));

  assign scr_en = rate_en && active;

  scrambler #(.SEED(SEED)) u_scr (
    .clk, .rst_n, .en(scr_en), .in_valid, .in_bit, .in_ready,
    .out_valid(s_valid), .out_bit(s_bit)
  );

  modulation_mapper u_mod (
    .clk, .rst_n, .mod, .in_valid(s_valid), .in_bit(s_bit),
    .sym_valid(m_valid), .sym(m_sym)
  );

  layer_mapper u_lm (
    .clk, .rst_n, .mode(lm_mode), .in_valid(m_valid), .in_sym(m_sym),
    .out_valid(l_valid), .out_ant_en(l_ant_en), .out_x0(l_x0), .out_x1(l_x1)
  );

  transform_precoder u_tp0 (
    .clk, .rst_n, .in_valid(l_valid), .in_sym(l_x0),
    .out_valid, .out_re(out_x0), .out_idx(p0_idx)
  );

  transform_precoder u_tp1 (
    .clk, .rst_n, .in_valid(l_valid), .in_sym(l_x1),
    .out_valid(p1_valid), .out_re(out_x1), .out_idx(p1_idx)
  );

  // Antenna enables of the block: taken at its eighth layer output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcnt         <= '0;
      blk_ant_en   <= '0;
      out_ant_en_q <= '0;
    end else begin
      if (l_valid) begin
        lcnt <= lcnt + 3'd1;
        if (lcnt == 3'd7) blk_ant_en <= l_ant_en;
      end
      if (out_valid && p0_idx == 3'd0) out_ant_en_q <= blk_ant_en;
    end
  end

  assign out_ant_en = (p0_idx == 3'd0) ? blk_ant_en : out_ant_en_q;

  // The two precoders run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid == p1_valid && p0_idx == p1_idx);

endmodule
