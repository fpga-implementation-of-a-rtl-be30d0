// Digital down-converter: real digital-IF samples to complex baseband.
//
// A 32-bit phase accumulator (NCO) advances by `if_step` per input sample
// (2^32 = one turn per sample); the CORDIC rotator multiplies the real input
// by exp(-j*phase).  The mixer output holds the wanted signal at baseband and
// its mirror image around -2*IF; a two-tap sum y(t)+y(t-1) puts a zero at half
// the sample rate, which removes the image centre for the usual IF of a
// quarter of the sample rate (if_step = 2^30).  The RRC matched filter that
// follows suppresses the rest.  The mixing halves the amplitude, the two-tap sum
// doubles it again.
//
// Interface: if_in is a real sample stream (im ignored), out a complex stream.
// Latency: cordic latency (16) + 1 cycles.
// The front-end description names this block only; NCO mixer plus two-tap
// image filter is this design's choice.
module ddc
  import umts_pkg::*;
#(
  parameter int NCO_W = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  stream_t       if_in,
  input  logic [NCO_W-1:0] if_step,
  output stream_t       out
);
  logic [NCO_W-1:0] ph;
  stream_t mix;
  cplx_t   prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= '0;
    else if (if_in.valid) ph <= (if_in.sof ? '0 : ph) + if_step;
  end

  stream_t rin;
  always_comb begin
    rin = if_in;
    rin.d.im = '0;
  end

  // rotate by -phase; the phase of the current sample (restart at frame start)
  logic [NCO_W-1:0] cur_ph;
  assign cur_ph = if_in.sof ? '0 : ph;

  cordic_rotator #(.ZW(16)) u_rot (
    .clk, .rst_n, .in(rin), .phase(-cur_ph[NCO_W-1 -: 16]), .out(mix)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out  <= '0;
      prev <= '0;
    end else begin
      out.valid <= mix.valid;
      out.sof   <= mix.sof;
      if (mix.valid) begin
        prev      <= mix.d;
        out.d.re  <= sat_sw(32'(mix.d.re) + 32'(prev.re));
        out.d.im  <= sat_sw(32'(mix.d.im) + 32'(prev.im));
      end
    end
  end
endmodule
