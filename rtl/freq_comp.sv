// Frequency-offset compensation of one receive antenna.
//
// A 32-bit phase accumulator (NCO) advances by the signed frequency word
// `fo_step` on every valid sample (2^32 = one turn per sample, so a carrier
// offset dF at sample rate Fs gives fo_step = dF/Fs * 2^32) and the CORDIC
// rotator multiplies the input by exp(-j*phase), removing the offset.  The
// word comes from the feed-forward frequency-offset estimator; all antennas use
// the same word because they share one local oscillator.
//
// Interface: stream in/out, fo_step signed frequency word.
// Latency: 16 cycles (the rotator), one sample per clock.
// The offset removal follows the front-end description; NCO width and CORDIC
// rotator are this design's choice.
module freq_comp
  import umts_pkg::*;
#(
  parameter int NCO_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  stream_t              in,
  input  logic signed [NCO_W-1:0] fo_step,
  output stream_t              out
);
  logic [NCO_W-1:0] ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        ph <= '0;
    else if (in.valid) ph <= ph + fo_step;
  end

  logic [15:0] rot;
  assign rot = -ph[NCO_W-1 -: 16];

  cordic_rotator #(.ZW(16)) u_rot (.clk, .rst_n, .in, .phase(rot), .out);
endmodule
