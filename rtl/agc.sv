// Automatic gain control of one receive antenna.
//
// The output is in * gain / 2^GF, saturated to SW bits.  A level detector
// accumulates |re|+|im| of the output over 2^WL samples; at the end of each
// window the mean level is compared with `target`: above target+target/8 the
// gain drops by 1/32 of itself, below target-target/8 it rises by 1/32 (+1),
// in between it holds.  This loop settles the average amplitude within about
// +/-12% of the target.  The gain starts at 1.0 after reset.
//
// Interface: stream in/out, `target` mean |re|+|im| level, `gain` current gain,
// `gain_up`/`gain_dn` one-cycle pulses when the gain changes.
// Latency: 1 cycle.
// The front-end description names this block only; the detector, the
// multiplicative step and the dead zone are this design's choice.
module agc
  import umts_pkg::*;
#(
  parameter int GW = 14,   // gain width
  parameter int GF = 8,    // gain fraction bits
  parameter int WL = 8     // log2 of the detector window
) (
  input  logic                clk,
  input  logic                rst_n,
  input  stream_t             in,
  input  logic [SW:0]         target,
  output stream_t             out,
  output logic [GW-1:0]       gain,
  output logic                gain_up,
  output logic                gain_dn
);
  logic [SW+WL:0] acc;
  logic [WL-1:0]  cnt;
  logic [SW:0]    lvl;
  logic [SW:0]    hyst;

  function automatic logic [SW:0] absum(input cplx_t c);
    logic [SW-1:0] mag_re, mag_im;
    mag_re = c.re[SW-1] ? SW'(-c.re) : SW'(c.re);
    mag_im = c.im[SW-1] ? SW'(-c.im) : SW'(c.im);
    return {1'b0, mag_re} + {1'b0, mag_im};
  endfunction

  logic signed [SW+GW:0] pr, pi;
  assign pr = $signed(in.d.re) * $signed({1'b0, gain});
  assign pi = $signed(in.d.im) * $signed({1'b0, gain});

  assign lvl  = (SW+1)'((acc + (SW+WL+1)'(absum(out.d))) >> WL);
  assign hyst = target >> 3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= '0; acc <= '0; cnt <= '0;
      gain <= GW'(1 << GF);
      gain_up <= 1'b0; gain_dn <= 1'b0;
    end else begin
      gain_up <= 1'b0; gain_dn <= 1'b0;
      out.valid <= in.valid;
      out.sof   <= in.valid & in.sof;
      if (in.valid) begin
        out.d.re <= sat_sw(32'(pr >>> GF));
        out.d.im <= sat_sw(32'(pi >>> GF));
      end
      if (out.valid) begin
        cnt <= cnt + 1'b1;
        if (cnt == '1) begin
          acc <= '0;
          if (lvl > target + hyst && gain > GW'(32)) begin
            gain <= gain - (gain >> 5);
            gain_dn <= 1'b1;
          end else if (lvl + hyst < target && gain < GW'((1 << GW) - (1 << (GW-5)) - 2)) begin
            gain <= gain + (gain >> 5) + 1'b1;
            gain_up <= 1'b1;
          end
        end else begin
          acc <= acc + (SW+WL+1)'(absum(out.d));
        end
      end
    end
  end
endmodule
