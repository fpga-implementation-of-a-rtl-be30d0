// FIR stage of the hybrid FIR/correlator channel estimator (shared by all
// transmit antennas of one receive antenna).
//
// The pilot sequence (PN chip times the common low-order part C_l of the pilot
// OVSF codes) is cut into chunks of L chips.  The FIR holds the last
// (L-1)*OS+1 input samples and has L taps spaced one chip (OS samples) apart;
// its coefficients are the conjugated code chips of one chunk and change only
// once per chunk.  A 2-bit-per-chip shift register collects the code; when the
// last chip of chunk r arrives (first sample of that chip) the coefficients are
// reloaded, and during the following L*OS samples the output
//   y(p) = sum_{l=0}^{L-1} x(p + (rL+l)*OS) * conj(S(rL+l))
// is the chunk-r partial sum of channel position p = 0..L*OS-1, one position
// per sample.  Multiplication by a +/-1 +/-j chip is add/subtract only.
//
// Interface: `in` sample stream; `cchip` code chip of the sample's chip (PN
// times C_l), `chip_start` marks phase 0 of a chip, `chunk_end` marks the first
// sample of the last chip of a chunk, `chunk_idx` the chunk's index.
// Outputs (registered, 1 cycle): `y`, `y_valid`, `y_first` first position of
// a chunk, `y_pos` position p,
// `y_chunk` chunk index of the partial sum.
// Structure and equations follow the hybrid estimator of the document;
// widths are this design's choice.
module ce_fir
  import umts_pkg::*;
#(
  parameter int L  = LCH,
  parameter int CW = 16     // chunk index width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  stream_t       in,
  input  chip_t         cchip,
  input  logic          chip_start,
  input  logic          chunk_end,
  input  logic [CW-1:0] chunk_idx,
  output logic signed [SW+$clog2(L):0] y_re,
  output logic signed [SW+$clog2(L):0] y_im,
  output logic          y_valid,
  output logic          y_first,
  output logic [$clog2(L*OS)-1:0] y_pos,
  output logic [CW-1:0] y_chunk
);
  localparam int NL  = (L - 1) * OS + 1;
  localparam int FW  = SW + 1 + $clog2(L);
  localparam int PWL = $clog2(L * OS);

  cplx_t xl [NL];           // xl[0] = current sample (combinational), xl[k] = k samples ago
  cplx_t xr [1:NL-1];
  chip_t cs [L-1];          // last L-1 chips, cs[0] newest
  chip_t coef [L];          // coefficient of tap k (delay k*OS)
  chip_t coef_use [L];
  logic [PWL-1:0] pos_r;
  logic [CW-1:0]  chunk_r;

  always_comb begin
    xl[0] = in.d;
    for (int k = 1; k < NL; k++) xl[k] = xr[k];
  end

  // coefficients for this sample: reloaded at the chunk's last chip
  always_comb begin
    if (chunk_end) begin
      coef_use[0] = cchip;
      for (int k = 1; k < L; k++) coef_use[k] = cs[k-1];
    end else begin
      coef_use = coef;
    end
  end

  logic signed [FW-1:0] sr, si;
  always_comb begin
    sr = '0;
    si = '0;
    for (int k = 0; k < L; k++) begin
      // x * conj(c), c = (+/-1) + j(+/-1): re = xr*cr + xi*cq, im = xi*cr - xr*cq
      logic signed [FW-1:0] a, b;
      a = FW'(xl[k*OS].re);
      b = FW'(xl[k*OS].im);
      sr = sr + (coef_use[k].i ? -a : a) + (coef_use[k].q ? -b : b);
      si = si + (coef_use[k].i ? -b : b) - (coef_use[k].q ? -a : a);
    end
  end

  always_ff @(posedge clk) begin
    if (in.valid) begin
      xr[1] <= in.d;
      for (int k = 2; k < NL; k++) xr[k] <= xr[k-1];
      if (chip_start) begin
        cs[0] <= cchip;
        for (int k = 1; k < L - 1; k++) cs[k] <= cs[k-1];
      end
      if (chunk_end) coef <= coef_use;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0; y_first <= 1'b0; y_re <= '0; y_im <= '0; y_pos <= '0; y_chunk <= '0;
      pos_r <= '0; chunk_r <= '0;
    end else begin
      y_valid <= in.valid;
      y_first <= in.valid & chunk_end;
      if (in.valid) begin
        y_re    <= sr;
        y_im    <= si;
        y_pos   <= chunk_end ? '0 : pos_r;
        y_chunk <= chunk_end ? chunk_idx : chunk_r;
        pos_r   <= (chunk_end ? '0 : pos_r) + 1'b1;
        if (chunk_end) chunk_r <= chunk_idx;
      end
    end
  end
endmodule
