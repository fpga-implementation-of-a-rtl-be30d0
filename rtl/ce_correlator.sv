// Correlator stage of the hybrid channel estimator, one per transmit antenna.
//
// The FIR stage delivers, one position per sample, the partial sums of chunk
// r for all L*OS channel positions.  This correlator keeps one accumulator per
// position in a memory used as a FIFO (read and written at the position of the
// current partial sum) and adds the partial sum times the chunk sign
// C_i,r = +/-1, the high-order part of transmit antenna i's pilot OVSF code.
// `first` starts a new accumulation (the memory word is replaced instead of
// added to), `last` ends it: the finished estimate of that position goes out
// on `h`/`h_valid` and is not written back.
//
// Latency: 1 cycle from the partial sum to h.  Accumulator width HW holds
// MAXAVG pilot symbols without overflow.
// Follows the document's correlator with FIFO memory (Figs. 6 and 7).
module ce_correlator
  import umts_pkg::*;
#(
  parameter int NP = NPOS,          // positions (memory depth)
  parameter int YW_IN = SW + 1 + $clog2(LCH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      y_valid,
  input  logic signed [YW_IN-1:0]   y_re,
  input  logic signed [YW_IN-1:0]   y_im,
  input  logic [$clog2(NP)-1:0]     y_pos,
  input  logic                      sign_neg,   // C_i,r = -1
  input  logic                      first,
  input  logic                      last,
  output hcplx_t                    h,
  output logic                      h_valid,
  output logic [$clog2(NP)-1:0]     h_pos
);
  hcplx_t mem [NP];
  hcplx_t old, nxt;
  logic signed [HW-1:0] add_re, add_im;

  assign old = first ? '0 : mem[y_pos];
  assign add_re  = sign_neg ? -HW'(y_re) : HW'(y_re);
  assign add_im  = sign_neg ? -HW'(y_im) : HW'(y_im);
  assign nxt.re = old.re + add_re;
  assign nxt.im = old.im + add_im;

  always_ff @(posedge clk) begin
    if (y_valid && !last) mem[y_pos] <= nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h <= '0; h_valid <= 1'b0; h_pos <= '0;
    end else begin
      h_valid <= y_valid & last;
      if (y_valid & last) begin
        h     <= nxt;
        h_pos <= y_pos;
      end
    end
  end
endmodule
