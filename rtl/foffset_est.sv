// Feed-forward, phase-based carrier frequency-offset estimator.
//
// The estimator works on the signal before the offset compensation (feed-
// forward), on the receive antenna with the strongest signal.  A correlator on
// the channel's strongest path despreads one pilot (transmit antenna `pilot`,
// Walsh code PCODE[pilot]) over each 256-chip pilot symbol:
//   X(l) = sum_c x(c*OS + pos) * conj(S_c(c) * C_pilot(c)).
// The input passes through an NPOS-sample delay line so that the correlator
// reads the path at delay `pos` while its time reference runs NPOS samples
// late.  The phase of each X(l) comes from phase_est (linear arctangent); the
// phase difference to the previous symbol is a plain subtraction modulo one
// turn.  2^navg_log2 differences are summed and turned into the NCO frequency
// word of the compensation, 2^32 per turn per sample:
//   fo_step = mean(dphi16) * 2^16 / (256 * OS) = sum << 6 >> navg_log2.
// Because the argument of the arctangent keeps turning, its approximation
// error averages out over the sum.  `pos` is sampled at each symbol start; a
// change of position or pilot drops the previous phase.  `fo_valid` pulses
// with each new estimate, `sym_cnt` counts evaluated pilot symbols.
// `src` tags the receive antenna that drives `in`; when it changes, the input
// switches at once, so the symbol in progress and the next one (whose delayed
// samples may straddle the switch) are mixed: the next three symbols then
// start the difference sum afresh.
// Offsets up to half a turn per symbol (Fc/(2*256)) are unambiguous.
//
// Structure (Figs. 8a and 10b of the underlying design) follows the document;
// the averaging length and word widths are this design's choice.
module foffset_est
  import umts_pkg::*;
#(
  parameter logic [15:0] PCODE [NTX] = '{16'd0, 16'd64, 16'd128, 16'd192}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  stream_t              in,
  input  logic [17:0]          x_init,
  input  logic [PW-1:0]        pos,
  input  logic [$clog2(NTX)-1:0] pilot,
  input  logic [2:0]           navg_log2,     // 0..6
  input  logic [$clog2(NRX)-1:0] src,         // tag of the selected antenna
  output logic signed [31:0]   fo_step,
  output logic                 fo_valid,
  output logic [15:0]          sym_cnt,
  output logic                 swapped_seen    // the pi/2 - arctan(1/v) branch was used
);
  logic [PW:0] tap [1];
  cplx_t       tap_d [1];
  stream_t     loc;
  logic [PW-1:0] cur_pos, use_pos;
  logic [$clog2(NTX)-1:0] cur_pilot, use_pilot;

  assign tap[0] = (PW+1)'(NPOS) - (PW+1)'(use_pos);

  delay_line #(.DEPTH(NPOS), .NT(1)) u_dl (.clk, .rst_n, .in, .tap, .tap_d, .last(loc));

  logic [$clog2(OS)-1:0]          phase;
  logic [$clog2(FRAME_CHIPS)-1:0] chip_idx;
  logic [$clog2(PILOT_LEN)-1:0]   pchip;
  chip_t code, pc;
  logic chip_start, sym_start, sym_go, sym_end;

  time_ref u_tr (.clk, .rst_n, .in(loc), .x_init, .phase, .chip_idx, .pchip,
                 .code, .chip_start, .sym_start);

  assign sym_go  = loc.valid && sym_start;
  assign sym_end = loc.valid && chip_start && (pchip == '1);
  assign use_pos   = sym_go ? pos : cur_pos;
  assign use_pilot = sym_go ? pilot : cur_pilot;

  logic cp;
  assign cp = ovsf_bit(16'(pchip), PCODE[use_pilot]);
  assign pc = '{q: code.q ^ cp, i: code.i ^ cp};

  hcplx_t acc, xsym;
  logic started, pe_start, pe_busy, pe_done, pe_sw;
  logic [15:0] ph, ph_prev;
  logic prev_ok, restart_diff, pe_fresh;
  logic [$clog2(NRX)-1:0] src_q;
  logic [1:0] skip;       // symbols still to be treated as fresh after a source change
  logic signed [31:0] dsum;
  logic [6:0] dcnt;

  phase_est u_pe (.clk, .rst_n, .start(pe_start), .x(xsym), .busy(pe_busy), .done(pe_done),
                  .phase(ph), .swapped(pe_sw));

  // despread pilot chip and running difference sum
  logic signed [HW-1:0] tr, ti;
  logic signed [31:0] dsum_nx;
  always_comb begin
    logic signed [HW-1:0] a, b;
    a  = HW'(tap_d[0].re);
    b  = HW'(tap_d[0].im);
    tr = (pc.i ? -a : a) + (pc.q ? -b : b);
    ti = (pc.i ? -b : b) - (pc.q ? -a : a);
    dsum_nx = dsum + 32'(signed'(ph - ph_prev));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_pos <= '0; cur_pilot <= '0; acc <= '0; xsym <= '0; started <= 1'b0;
      pe_start <= 1'b0; ph_prev <= '0; prev_ok <= 1'b0; restart_diff <= 1'b0; pe_fresh <= 1'b0;
      src_q <= '0; skip <= '0;
      dsum <= '0; dcnt <= '0; fo_step <= '0; fo_valid <= 1'b0; sym_cnt <= '0;
      swapped_seen <= 1'b0;
    end else begin
      pe_start <= 1'b0;
      fo_valid <= 1'b0;
      src_q <= src;
      if (src != src_q) skip <= 2'd3;
      if (loc.valid && loc.sof) started <= 1'b1;
      if (sym_go) begin
        cur_pos   <= pos;
        cur_pilot <= pilot;
        if (pos != cur_pos || pilot != cur_pilot) restart_diff <= 1'b1;
      end
      if (loc.valid && chip_start) begin
        acc.re <= (sym_go ? '0 : acc.re) + tr;
        acc.im <= (sym_go ? '0 : acc.im) + ti;
        if (sym_end && (started || loc.sof)) begin
          xsym.re  <= acc.re + tr;
          xsym.im  <= acc.im + ti;
          pe_start <= 1'b1;
          pe_fresh <= restart_diff || (sym_go && (pos != cur_pos || pilot != cur_pilot)) ||
                      skip != 2'd0 || src != src_q;
          restart_diff <= 1'b0;
          if (skip != 2'd0 && src == src_q) skip <= skip - 1'b1;
        end
      end
      if (pe_done) begin
        sym_cnt <= sym_cnt + 1'b1;
        if (pe_sw) swapped_seen <= 1'b1;
        ph_prev <= ph;
        prev_ok <= 1'b1;
        if (pe_fresh || !prev_ok) begin
          dsum <= '0;
          dcnt <= '0;
        end else if (dcnt + 1'b1 == 7'(1 << navg_log2)) begin
          fo_step  <= (dsum_nx <<< 6) >>> navg_log2;
          fo_valid <= 1'b1;
          dsum <= '0;
          dcnt <= '0;
        end else begin
          dsum <= dsum_nx;
          dcnt <= dcnt + 1'b1;
        end
      end
    end
  end
endmodule
