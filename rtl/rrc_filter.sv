// Root-raised-cosine matched filter (UMTS chip pulse, roll-off 0.22).
//
// Direct-form FIR over NT = 2*SPAN*OS+1 samples (SPAN chips on each side of the
// centre, OS samples per chip).  The taps are sampled from the RRC impulse
// response
//   h(t) = [sin(pi t (1-b)) + 4 b t cos(pi t (1+b))] / [pi t (1 - (4 b t)^2)],
//   h(0) = 1 - b + 4 b / pi,     t in chips, b = 0.22,
// computed at elaboration and scaled so that the taps sum to 2^CF (unity DC
// gain), then rounded.  The output is the sum >> CF, saturated.
//
// The sof flag is delayed by the group delay (NT-1)/2 samples on top of the
// one-cycle latency, so a propagation path keeps the same position relative to
// sof before and after the filter.
//
// Interface: stream in/out.  Latency: 1 cycle (data), one sample per clock.
// The matched filtering follows the front-end description; the roll-off is the
// UMTS value, the span and widths are this design's choice.
module rrc_filter
  import umts_pkg::*;
#(
  parameter int SPAN = 4,   // chips on each side of the centre
  parameter int CF   = 10,  // coefficient fraction bits
  parameter int CW   = 12   // coefficient width
) (
  input  logic    clk,
  input  logic    rst_n,
  input  stream_t in,
  output stream_t out
);
  localparam int NT = 2 * SPAN * OS + 1;
  localparam int GD = (NT - 1) / 2;
  localparam int AW = SW + CW + $clog2(NT);

  function automatic real rrc(input real t);
    real b, pi;
    b  = 0.22;
    pi = 3.14159265358979;
    if (t == 0.0) return 1.0 - b + 4.0 * b / pi;
    return ($sin(pi * t * (1.0 - b)) + 4.0 * b * t * $cos(pi * t * (1.0 + b))) /
           (pi * t * (1.0 - (4.0 * b * t) ** 2));
  endfunction

  typedef logic signed [CW-1:0] ctab_t [NT];
  function automatic ctab_t coef_table();
    ctab_t c;
    real s, v;
    s = 0.0;
    for (int n = 0; n < NT; n++) s = s + rrc(real'(n - GD) / real'(OS));
    for (int k = 0; k < NT; k++) begin
      v = rrc(real'(k - GD) / real'(OS)) / s * (2.0 ** CF);
      c[k] = CW'($rtoi(v + (v >= 0.0 ? 0.5 : -0.5)));
    end
    return c;
  endfunction
  localparam ctab_t COEF = coef_table();

  cplx_t sr [NT];
  logic [GD-1:0] sofd;

  logic signed [AW-1:0] accr, acci;
  always_comb begin
    accr = AW'($signed(in.d.re)) * AW'(COEF[0]);
    acci = AW'($signed(in.d.im)) * AW'(COEF[0]);
    for (int k = 1; k < NT; k++) begin
      accr = accr + AW'($signed(sr[k-1].re)) * AW'(COEF[k]);
      acci = acci + AW'($signed(sr[k-1].im)) * AW'(COEF[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (in.valid) begin
      sr[0] <= in.d;
      for (int k = 1; k < NT; k++) sr[k] <= sr[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= '0; sofd <= '0;
    end else begin
      out.valid <= in.valid;
      out.sof   <= 1'b0;
      if (in.valid) begin
        sofd     <= {sofd[GD-2:0], in.sof};
        out.sof  <= sofd[GD-1];
        out.d.re <= sat_sw(32'(accr >>> CF));
        out.d.im <= sat_sw(32'(acci >>> CF));
      end
    end
  end
endmodule
