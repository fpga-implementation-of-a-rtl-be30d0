// UMTS downlink scrambling-code (PN sequence) generator.
//
// Two 18-stage LFSRs produce the Gold code of the UMTS downlink:
//   x(i+18) = x(i+7) + x(i),  y(i+18) = y(i+10) + y(i+7) + y(i+5) + y(i)  (mod 2)
// with y starting at all ones and x at `x_init` (x_init = 1, i.e. x(0) = 1 and
// x(1..17) = 0, gives code number 0; other codes start x advanced by the code
// number).  The real chip is x(i)+y(i); the imaginary chip is the same Gold
// sequence 131072 chips later, taken from the taps x(i+4)+x(i+6)+x(i+15) and
// y(i+5)+y(i+6)+y(i+8)+...+y(i+15).
//
// `chip` shows the code chip of the current chip index.  `load` restarts the
// sequence (the restarted chip is shown in the same cycle), `step` advances it
// to the next chip at the clock edge; both may be given together.  `wrap`
// restarts the sequence at the clock edge instead (end of a radio frame).
// The document only asks for a PN sequence shared by all pilots; the generator
// polynomials are those of the UMTS standard.
module scr_code_gen
  import umts_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        step,
  input  logic        wrap,
  input  logic [17:0] x_init,
  output chip_t       chip
);
  logic [17:0] xs, ys;          // bit k holds x(i+k), y(i+k)
  logic [17:0] xc, yc;          // state of the current chip

  assign xc = load ? x_init : xs;
  assign yc = load ? '1     : ys;

  assign chip.i = xc[0] ^ yc[0];
  assign chip.q = (xc[4] ^ xc[6] ^ xc[15]) ^
                  (yc[5] ^ yc[6] ^ yc[8] ^ yc[9] ^ yc[10] ^ yc[11] ^ yc[12] ^ yc[13] ^ yc[14] ^ yc[15]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs <= 18'h1;
      ys <= '1;
    end else if (wrap) begin
      xs <= x_init;
      ys <= '1;
    end else if (step) begin
      xs <= {xc[7] ^ xc[0], xc[17:1]};
      ys <= {yc[10] ^ yc[7] ^ yc[5] ^ yc[0], yc[17:1]};
    end else if (load) begin
      xs <= xc;
      ys <= yc;
    end
  end
endmodule
