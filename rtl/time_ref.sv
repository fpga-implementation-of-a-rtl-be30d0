// Local time reference of one sample stream.
//
// The synchronization block marks the first sample of a radio frame with the
// stream's sof flag.  From it this block counts the sample phase within a chip
// (0..OS-1), the chip index within the frame (0..FRAME_CHIPS-1) and runs the
// scrambling-code generator one chip per OS samples.  All outputs describe the
// sample presented at `in` in the same cycle (combinational through the sof
// bypass), and the counters advance on every valid sample.  Without sof the
// reference free-runs from reset.
//
// Outputs: `phase` sample phase, `chip_idx` chip within the frame, `pchip` chip
// within the 256-chip pilot symbol, `code` scrambling chip, `chip_start` the
// sample is phase 0 of a chip, `sym_start` phase 0 of pilot chip 0.
// The time reference itself is implied by the front-end description ("local
// time reference"); its counters are this design's choice.
module time_ref
  import umts_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  stream_t     in,
  input  logic [17:0] x_init,
  output logic [$clog2(OS)-1:0]          phase,
  output logic [$clog2(FRAME_CHIPS)-1:0] chip_idx,
  output logic [$clog2(PILOT_LEN)-1:0]   pchip,
  output chip_t       code,
  output logic        chip_start,
  output logic        sym_start
);
  localparam int PHW = $clog2(OS);
  localparam int CHW = $clog2(FRAME_CHIPS);

  logic [PHW-1:0] ph_r;
  logic [CHW-1:0] ch_r;
  logic restart;

  assign restart  = in.valid & in.sof;
  assign phase    = restart ? '0 : ph_r;
  assign chip_idx = restart ? '0 : ch_r;
  assign pchip    = chip_idx[$clog2(PILOT_LEN)-1:0];
  assign chip_start = (phase == '0);
  assign sym_start  = chip_start && (pchip == '0);

  logic last_ph, frame_end;
  assign last_ph   = (phase == PHW'(OS - 1));
  assign frame_end = last_ph && (chip_idx == CHW'(FRAME_CHIPS - 1));

  scr_code_gen u_pn (
    .clk, .rst_n,
    .load (restart),
    .step (in.valid & last_ph & ~frame_end),
    .wrap (in.valid & frame_end),
    .x_init,
    .chip (code)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_r <= '0;
      ch_r <= '0;
    end else if (in.valid) begin
      ph_r <= last_ph ? '0 : phase + 1'b1;
      if (last_ph) ch_r <= frame_end ? '0 : chip_idx + 1'b1;
      else         ch_r <= chip_idx;
    end
  end
endmodule
