// Multiple-channel estimator of one receive antenna (hybrid FIR/correlator).
//
// Estimates the NTX channel impulse responses from all transmit antennas to
// this receive antenna at NPOS = L*OS positions (sample resolution) by matched
// filtering with the pilot sequences S_i(t) = S_c(t) * C_i(t), averaged over
// `avg_syms` pilot symbols of 256 chips:
//   h_i(p) = sum_t x(p + t*OS) * conj(S_c(t)) * C_i(t).
// The pilot OVSF codes must differ only in the code-number bits at and above
// log2(L); then C_i(t) = C_l(t mod L) * C_i,r(t div L), the FIR (ce_fir) with
// the common part C_l is built once, and only the correlator (ce_correlator)
// with sign C_i,r is replicated per transmit antenna.  The code numbers are
// Walsh (Hadamard) indices: code bit of chip t = parity(t & PCODE[i]).
//
// Window control: an estimate window starts at the first chunk of a pilot
// symbol and spans 4*avg_syms chunks (avg_syms sampled at the window start,
// 0 counts as 1); windows follow each other without gap.  A frame start (sof)
// restarts the control.  During the last chunk of a window the estimates of
// positions 0..NPOS-1 leave on h/h_valid/h_pos, one position per sample, all
// NTX antennas in parallel.  The pilot symbol carries (1+j), so h is
// 2*(1+j)*256*avg_syms times the channel tap.
//
// Timing: h for position p of the window starting at chip c0 appears 2 cycles
// after input sample (c0 + 256*avg_syms - 1)*OS + p, counted from sof.
// Structure follows the document; L, widths and the window control are this
// design's choice.
module chan_est
  import umts_pkg::*;
#(
  parameter int L = LCH,
  parameter logic [15:0] PCODE [NTX] = '{16'd0, 16'd64, 16'd128, 16'd192}
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  stream_t                in,
  input  logic [17:0]            x_init,
  input  logic [$clog2(MAXAVG):0] avg_syms,
  output hcplx_t                 h [NTX],
  output logic                   h_valid,
  output logic [$clog2(L*OS)-1:0] h_pos
);
  localparam int NP  = L * OS;
  localparam int LW  = $clog2(L);
  localparam int RPS = PILOT_LEN / L;     // chunks per pilot symbol
  localparam int CW  = 16;
  localparam int WCW = $clog2(RPS * MAXAVG) + 1;

  logic [$clog2(OS)-1:0]          phase;
  logic [$clog2(FRAME_CHIPS)-1:0] chip_idx;
  logic [$clog2(PILOT_LEN)-1:0]   pchip;
  chip_t code, cchip;
  logic chip_start, sym_start;

  time_ref u_tr (.clk, .rst_n, .in, .x_init, .phase, .chip_idx, .pchip, .code,
                 .chip_start, .sym_start);

  // common low-order OVSF part of all pilot codes
  logic cl;
  assign cl    = ovsf_bit(16'(chip_idx[LW-1:0]), PCODE[0] & 16'(L - 1));
  assign cchip = '{q: code.q ^ cl, i: code.i ^ cl};

  logic chunk_end;
  assign chunk_end = chip_start && (chip_idx[LW-1:0] == LW'(L - 1));

  logic signed [SW+LW:0] y_re, y_im;
  logic y_valid, y_first;
  logic [$clog2(NP)-1:0] y_pos;
  logic [CW-1:0] y_chunk;

  ce_fir #(.L(L), .CW(CW)) u_fir (
    .clk, .rst_n, .in, .cchip, .chip_start, .chunk_end,
    .chunk_idx(CW'(chip_idx >> LW)),
    .y_re, .y_im, .y_valid, .y_first, .y_pos, .y_chunk
  );

  // ---- window control --------------------------------------------------
  logic run_r, run_c;
  logic [WCW-1:0] wc_r, wc_c, wlast_r, wlast_c;
  logic new_chunk;
  logic [$clog2(RPS)-1:0] r_in_sym;

  assign new_chunk = y_first;
  assign r_in_sym  = y_chunk[$clog2(RPS)-1:0];

  always_comb begin
    run_c = run_r; wc_c = wc_r; wlast_c = wlast_r;
    if (new_chunk) begin
      if (!run_r || wc_r == wlast_r) begin
        run_c = (r_in_sym == '0);
        wc_c  = '0;
        wlast_c = WCW'(RPS * ((avg_syms == '0) ? 1 :
                               (int'(avg_syms) > MAXAVG) ? MAXAVG : int'(avg_syms)) - 1);
      end else begin
        wc_c = wc_r + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_r <= 1'b0; wc_r <= '0; wlast_r <= '0;
    end else if (in.valid && in.sof) begin
      run_r <= 1'b0;
    end else begin
      run_r <= run_c; wc_r <= wc_c; wlast_r <= wlast_c;
    end
  end

  // ---- correlators -------------------------------------------------------
  logic [NTX-1:0] hv;
  logic [$clog2(NP)-1:0] hp [NTX];

  for (genvar i = 0; i < NTX; i++) begin : g_corr
    logic sneg;
    // C_i,r: high-order code bits against the chunk's chip offset r*L
    assign sneg = ^(16'(r_in_sym) << LW & PCODE[i] & 16'(PILOT_LEN - 1));
    ce_correlator #(.NP(NP), .YW_IN(SW + 1 + LW)) u_corr (
      .clk, .rst_n,
      .y_valid(y_valid & run_c), .y_re, .y_im, .y_pos,
      .sign_neg(sneg), .first(wc_c == '0), .last(wc_c == wlast_c),
      .h(h[i]), .h_valid(hv[i]), .h_pos(hp[i])
    );
  end

  assign h_valid = hv[0];
  assign h_pos   = hp[0];

  // all correlators share one timing
  a_sync: assert property (@(posedge clk) disable iff (!rst_n) (hv == '0 || hv == '1));
endmodule
