// Four-finger RAKE receiver of one receive antenna.
//
// The incoming samples pass through a tapped delay line (delay_line) of NPOS
// samples; finger f reads the tap NPOS - pos[f], so the correlators of all
// fingers see the signal advanced by their path delay and integrate over the
// same symbol interval: they start and dump together.  The local time
// reference runs on the delay line's oldest tap; at phase 0 of local chip c
// finger f accumulates x(c*OS + pos[f]) * conj(S_c(c) * C_d(c)), where C_d is
// the data channel's Walsh code (number `data_code`, spreading factor
// 2^sf_log2).  After the last chip of a symbol all NFING soft symbols leave
// together on y/y_valid, tagged with the 2-bit identifier of the finger set
// that produced them.
//
// A new finger set (`pos`, `pos_id`, strobe `pos_load`) takes effect at the
// next symbol start, so no symbol mixes two sets.  Symbols are produced only
// after the first frame start has reached the local time reference.
//
// Latency: y_valid rises 1 cycle after the input sample that carries the last
// chip of the symbol at the largest-delay position NPOS (i.e. NPOS samples after
// the symbol's last chip at delay 0).
// The delay-line structure and the common start of the fingers follow the
// document; code handling, tagging and widths are this design's choice.
module rake
  import umts_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  stream_t              in,
  input  logic [17:0]          x_init,
  input  logic [8:0]           data_code,
  input  logic [3:0]           sf_log2,        // 2..9
  input  logic [PW-1:0]        pos [NFING],
  input  logic [1:0]           pos_id,
  input  logic                 pos_load,
  output ycplx_t               y [NFING],
  output logic [1:0]           y_id,
  output logic                 y_valid
);
  logic [PW:0] tap [NFING];
  cplx_t       tap_d [NFING];
  stream_t     loc;

  logic [PW-1:0] cur_pos [NFING], pend_pos [NFING], use_pos [NFING];
  logic [1:0]    cur_id, pend_id, use_id;
  logic          pend;

  for (genvar f = 0; f < NFING; f++) begin : g_tap
    assign tap[f] = (PW+1)'(NPOS) - (PW+1)'(use_pos[f]);
  end

  delay_line #(.DEPTH(NPOS), .NT(NFING)) u_dl (
    .clk, .rst_n, .in, .tap, .tap_d, .last(loc)
  );

  logic [$clog2(OS)-1:0]          phase;
  logic [$clog2(FRAME_CHIPS)-1:0] chip_idx;
  logic [$clog2(PILOT_LEN)-1:0]   pchip;
  chip_t code;
  logic chip_start, sym_start;

  time_ref u_tr (.clk, .rst_n, .in(loc), .x_init, .phase, .chip_idx, .pchip,
                 .code, .chip_start, .sym_start);

  logic [8:0] cin_sym, sf_m1;
  logic first_chip, last_chip, cd;
  chip_t dc;
  assign sf_m1      = 9'((1 << sf_log2) - 1);
  assign cin_sym    = 9'(chip_idx) & sf_m1;
  assign first_chip = loc.valid && chip_start && (cin_sym == '0);
  assign last_chip  = loc.valid && chip_start && (cin_sym == sf_m1);
  assign cd = ovsf_bit(16'(cin_sym), 16'(data_code));
  assign dc = '{q: code.q ^ cd, i: code.i ^ cd};

  // finger set used for this chip: a pending set is taken at a symbol start
  always_comb begin
    use_pos = cur_pos;
    use_id  = cur_id;
    if (first_chip && pend) begin
      use_pos = pend_pos;
      use_id  = pend_id;
    end
  end

  logic started;
  ycplx_t acc [NFING];
  ycplx_t dsp [NFING];   // one despread chip per finger: tap * conj(S) * C_data

  always_comb begin
    for (int f = 0; f < NFING; f++) begin
      logic signed [YW-1:0] a, b;
      a = YW'(tap_d[f].re);
      b = YW'(tap_d[f].im);
      dsp[f].re = (dc.i ? -a : a) + (dc.q ? -b : b);
      dsp[f].im = (dc.i ? -b : b) - (dc.q ? -a : a);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 1'b0; pend_id <= '0; cur_id <= '0; started <= 1'b0;
      y_valid <= 1'b0; y_id <= '0;
      for (int f = 0; f < NFING; f++) begin
        cur_pos[f] <= '0; pend_pos[f] <= '0; acc[f] <= '0; y[f] <= '0;
      end
    end else begin
      y_valid <= 1'b0;
      if (pos_load) begin
        pend     <= 1'b1;
        pend_pos <= pos;
        pend_id  <= pos_id;
      end
      if (first_chip && pend && !pos_load) pend <= 1'b0;
      if (first_chip) begin
        cur_pos <= use_pos;
        cur_id  <= use_id;
      end
      if (loc.valid && loc.sof) started <= 1'b1;
      if (loc.valid && chip_start) begin
        for (int f = 0; f < NFING; f++) begin
          if (first_chip) begin
            acc[f].re <= dsp[f].re;
            acc[f].im <= dsp[f].im;
          end else begin
            acc[f].re <= acc[f].re + dsp[f].re;
            acc[f].im <= acc[f].im + dsp[f].im;
          end
          if (last_chip) begin
            y[f].re <= (first_chip ? '0 : acc[f].re) + dsp[f].re;
            y[f].im <= (first_chip ? '0 : acc[f].im) + dsp[f].im;
          end
        end
        if (last_chip && (started || loc.sof)) begin
          y_valid <= 1'b1;
          y_id    <= use_id;
        end
      end
    end
  end
endmodule
