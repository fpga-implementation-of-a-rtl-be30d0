// Tapped delay line built as a circular memory.
//
// Every valid input sample (data and sof flag) is written to a DEPTH-entry
// memory at a rotating write address.  Read tap j (1..DEPTH) returns the sample
// written j valid samples earlier, at address wr_addr - j; the fixed output
// `last` is tap DEPTH, the oldest sample, read before it is overwritten.  All
// reads are combinational, so a tap follows a changed delay at once.
// DEPTH must be a power of two.
//
// The RAKE delays the incoming signal (not the code reference) so that all
// fingers integrate over the same symbol interval; a memory instead of a
// register chain avoids the toggling of a shift register.  Both points follow
// the document; the circular addressing is this design's choice.
module delay_line
  import umts_pkg::*;
#(
  parameter int DEPTH = NPOS,
  parameter int NT    = NFING
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  stream_t                   in,
  input  logic [$clog2(DEPTH):0]    tap [NT],
  output cplx_t                     tap_d [NT],
  output stream_t                   last
);
  localparam int AW = $clog2(DEPTH);

  cplx_t mem [DEPTH];
  logic [AW-1:0] wa;
  logic [DEPTH-1:0] filled_sof;   // sof flags, in flops so that reset clears them

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa <= '0;
      filled_sof <= '0;
    end else if (in.valid) begin
      wa <= wa + 1'b1;
      filled_sof[wa] <= in.sof;
    end
  end

  always_ff @(posedge clk) begin
    if (in.valid) mem[wa] <= in.d;
  end

  for (genvar t = 0; t < NT; t++) begin : g_tap
    assign tap_d[t] = mem[wa - AW'(tap[t])];
  end

  assign last.valid = in.valid;
  assign last.sof   = in.valid & filled_sof[wa];
  assign last.d     = mem[wa];
endmodule
