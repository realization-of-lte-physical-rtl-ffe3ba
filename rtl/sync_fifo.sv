// sync_fifo: small single-clock FIFO used by the resource element mapper to
// hold precoded resource elements until the grid scan reaches their section.
//
// Writes when wr_en and not full, reads when rd_en and not empty; rd_data
// shows the oldest entry combinationally (first-word fall-through). A write
// attempted while full is dropped and raises 'overflow' for that clock.
// DEPTH must be a power of two.
module sync_fifo #(
  parameter int unsigned WIDTH = 130,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic             overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;

  assign empty    = (wptr == rptr);
  assign full     = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign rd_data  = mem[rptr[AW-1:0]];
  assign overflow = wr_en && full;

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_en && !full) wptr <= wptr + 1'b1;
      if (rd_en && !empty) rptr <= rptr + 1'b1;
    end
  end

endmodule
