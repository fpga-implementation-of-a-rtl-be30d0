// Pipelined CORDIC phase rotator: out = in * exp(j*phase).
//
// Used as the mixing multiplier of a numerically controlled oscillator (the
// down-converter and the frequency-offset compensation).  The phase is a
// two's-complement fraction of a full turn: 2^ZW stands for 2*pi.  A first
// stage rotates by +/- pi/2 so that the remaining angle lies in [-pi/2, pi/2];
// NIT micro-rotation stages follow, each one register; a last stage removes
// the CORDIC gain (x 0.60725) and saturates to SW bits.
//
// Interface: stream_t in/out (valid and sof travel with the data).
// Latency: NIT + 2 clock cycles, one sample per clock.
// The CORDIC structure, widths and stage count are this design's choice; the
// front-end description only names the mixing (NCO) function.
module cordic_rotator
  import umts_pkg::*;
#(
  parameter int ZW  = 16,   // phase width
  parameter int NIT = 14,   // micro-rotation stages
  parameter int GB  = 4     // extra fractional guard bits
) (
  input  logic              clk,
  input  logic              rst_n,
  input  stream_t           in,
  input  logic [ZW-1:0]     phase,
  output stream_t           out
);
  localparam int XW = SW + 2 + GB;
  localparam int LAT = NIT + 2;

  // arctan(2^-i) in phase units, computed at elaboration
  typedef logic signed [ZW-1:0] atab_t [NIT];
  function automatic atab_t atan_table();
    atab_t t;
    for (int i = 0; i < NIT; i++)
      t[i] = ZW'($rtoi($atan(1.0 / (2.0 ** i)) / (2.0 * 3.14159265358979) * (2.0 ** ZW) + 0.5));
    return t;
  endfunction
  localparam atab_t ATAN = atan_table();

  logic signed [XW-1:0] x [0:NIT];
  logic signed [XW-1:0] y [0:NIT];
  logic signed [ZW-1:0] z [0:NIT];
  logic [LAT-1:0] vld, sofp;

  // stage 0: quadrant pre-rotation
  logic signed [XW-1:0] xi, yi;
  assign xi = XW'(in.d.re) <<< GB;
  assign yi = XW'(in.d.im) <<< GB;

  always_ff @(posedge clk) begin
    unique case (phase[ZW-1:ZW-2])
      2'b01: begin x[0] <= -yi; y[0] <= xi;  z[0] <= phase - (ZW'(1) << (ZW-2)); end
      2'b10: begin x[0] <= yi;  y[0] <= -xi; z[0] <= phase + (ZW'(1) << (ZW-2)); end
      default: begin x[0] <= xi; y[0] <= yi; z[0] <= phase; end
    endcase
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NIT; i++) begin
      if (!z[i][ZW-1]) begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - ATAN[i];
      end else begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + ATAN[i];
      end
    end
  end

  // gain correction 1/1.64676 = 39797/65536
  logic signed [XW+17:0] xs, ys;
  assign xs = $signed(x[NIT]) * 18'sd39797;
  assign ys = $signed(y[NIT]) * 18'sd39797;

  always_ff @(posedge clk) begin
    out.d.re <= sat_sw(32'(xs >>> (16 + GB)));
    out.d.im <= sat_sw(32'(ys >>> (16 + GB)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0; sofp <= '0;
    end else begin
      vld  <= {vld[LAT-2:0], in.valid};
      sofp <= {sofp[LAT-2:0], in.valid & in.sof};
    end
  end
  assign out.valid = vld[LAT-1];
  assign out.sof   = sofp[LAT-1];
endmodule
