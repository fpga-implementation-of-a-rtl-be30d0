// Synchronous FIFO towards the MIMO decoder.
//
// Soft-symbol records and channel-coefficient records reach the MIMO decoder
// through FIFOs; besides decoupling the two clocks of activity they hold the
// soft symbols until the coefficients of the same finger set (matching 2-bit
// tag) have been extracted, which happens one estimation window later.
// DEPTH words of width W in a memory, first-word-fall-through read port
// (`rd_data` shows the oldest word while `!empty`; `rd_en` pops it).  A write
// into a full FIFO is dropped and counted in `drops`; `level` is the fill.
// Both ports may act in the same cycle.
// The FIFO and its purpose follow the document; depth, drop policy and the
// read protocol are this design's choice.
module out_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr_en,
  input  logic [W-1:0]            wr_data,
  input  logic                    rd_en,
  output logic [W-1:0]            rd_data,
  output logic                    empty,
  output logic                    full,
  output logic [$clog2(DEPTH):0]  level,
  output logic [15:0]             drops
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;
  logic         do_wr, do_rd;

  assign empty = (wp == rp);
  assign full  = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign level = wp - rp;
  assign do_rd = rd_en && !empty;
  assign do_wr = wr_en && !full;
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; drops <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      if (wr_en && full && drops != '1) drops <= drops + 1'b1;
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) empty |-> level == '0);
endmodule
