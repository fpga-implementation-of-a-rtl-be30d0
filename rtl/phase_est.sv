// Phase of a complex value with a linear arctangent approximation.
//
// The magnitudes a = |Re x|, b = |Im x| are ordered so that the quotient
// u = min/max lies in [0, 1] (arctan(v) = pi/2 - arctan(1/v) for v > 1); u is
// computed with FB fraction bits by the sequential divider, and
//   arctan(u) ~ 0.7918*u + 0.0493   [rad]
// gives the first-octant angle.  Undoing the swap (pi/2 - angle) and mapping
// by the signs of Re and Im (pi - angle, -angle) yields the full angle.  The
// phase is a 16-bit two's-complement fraction of a turn (65536 = 2*pi):
// 0.7918 rad -> 8259 per unit of u, 0.0493 rad -> 514.  A zero input gives 0.
//
// Interface: `start` with `x` (ignored while busy); `done` pulses with `phase`
// and `swapped` (|Im| > |Re|).  Latency: FB+3 cycles (0 input: 1 cycle).
// The range reduction, the division and the linear approximation follow the
// document; the widths and scaling are this design's choice.
module phase_est
  import umts_pkg::*;
#(
  parameter int FB = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  hcplx_t       x,
  output logic         busy,
  output logic         done,
  output logic [15:0]  phase,
  output logic         swapped
);
  localparam int K1 = 8259;
  localparam int K0 = 514;

  logic [HW-1:0] a, b;
  assign a = x.re[HW-1] ? HW'(-x.re) : HW'(x.re);
  assign b = x.im[HW-1] ? HW'(-x.im) : HW'(x.im);

  logic sw_r, nre_r, nim_r, dbusy, ddone, zero_done, run;
  logic [FB:0] q;

  seq_divider #(.NW(HW), .FB(FB)) u_div (
    .clk, .rst_n,
    .start(start && !busy && (a | b) != '0),
    .num(b > a ? a : b), .den(b > a ? b : a),
    .busy(dbusy), .done(ddone), .q
  );

  logic [15:0] th0, th1, th2;
  always_comb begin
    th0 = 16'((32'(q) * K1) >> FB) + 16'(K0);
    th1 = sw_r ? 16'(16384) - th0 : th0;
    th2 = nre_r ? 16'(32768) - th1 : th1;
    if (nim_r) th2 = -th2;
  end

  assign busy = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw_r <= 1'b0; nre_r <= 1'b0; nim_r <= 1'b0; run <= 1'b0; zero_done <= 1'b0;
      done <= 1'b0; phase <= '0; swapped <= 1'b0;
    end else begin
      done <= 1'b0;
      zero_done <= 1'b0;
      if (start && !run) begin
        sw_r  <= b > a;
        nre_r <= x.re[HW-1];
        nim_r <= x.im[HW-1];
        run   <= 1'b1;
        zero_done <= (a | b) == '0;
      end
      if (zero_done) begin
        run <= 1'b0; done <= 1'b1; phase <= '0; swapped <= 1'b0;
      end else if (ddone) begin
        run <= 1'b0; done <= 1'b1; phase <= th2; swapped <= sw_r;
      end
    end
  end
endmodule
