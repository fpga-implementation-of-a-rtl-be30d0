// Testbench of rrc_filter: (1) an impulse of 1024 returns the tap set, which
// is compared with the root-raised-cosine pulse (roll-off 0.22, 4 samples per
// chip, taps normalised to unit sum) computed here, within 1 LSB; the sof flag
// must come out with the group delay.  (2) A constant input must come out
// unchanged within the rounding of the taps (unit DC gain).
module tb_rrc_filter;
  import umts_pkg::*;
  localparam int NT = 33, GD = 16;
  logic clk = 0, rst_n = 0;
  stream_t in, out;
  int checks = 0, failures = 0;
  real hr [NT];

  rrc_filter dut (.clk, .rst_n, .in, .out);
  always #5 clk = ~clk;

  function automatic real pulse(real t);
    real b = 0.22, pi = 3.14159265358979;
    if (t == 0.0) return 1.0 - b + 4.0 * b / pi;
    return ($sin(pi * t * (1.0 - b)) + 4.0 * b * t * $cos(pi * t * (1.0 + b))) /
           (pi * t * (1.0 - 16.0 * b * b * t * t));
  endfunction

  int outs [$];
  int sof_at = -1, nout = 0;
  always @(posedge clk) if (rst_n && out.valid) begin
    outs.push_back(int'(out.d.re));
    if (out.sof) sof_at = nout;
    nout++;
  end

  initial begin
    real s;
    s = 0.0;
    for (int k = 0; k < NT; k++) begin hr[k] = pulse(real'(k - GD) / 4.0); s += hr[k]; end
    for (int k = 0; k < NT; k++) hr[k] = hr[k] / s * 1024.0;
    in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // flush zeros, impulse with sof, zeros
    for (int n = 0; n < 40; n++) begin
      in.valid <= 1; in.sof <= 0; in.d <= '0; @(posedge clk);
    end
    for (int n = 0; n < 60; n++) begin
      in.valid <= 1; in.sof <= (n == 0); in.d.re <= (n == 0) ? 12'sd1024 : 12'sd0; in.d.im <= '0;
      @(posedge clk);
    end
    for (int n = 0; n < 100; n++) begin
      in.valid <= (n % 3 != 1); in.sof <= 0; in.d.re <= 12'sd500; in.d.im <= -12'sd300;
      @(posedge clk);
    end
    in.valid <= 0;
    repeat (3) @(posedge clk);
    // impulse response: output index 40 + k holds tap k
    for (int k = 0; k < NT; k++) begin
      real e;
      e = real'(outs[40 + k]) - hr[k];
      checks++;
      if (e > 1.01 || e < -1.01) begin
        failures++;
        $display("FAIL tap %0d: %0d exp %f", k, outs[40 + k], hr[k]);
      end
    end
    checks++;
    if (sof_at != 40 + GD) begin
      failures++;
      $display("FAIL sof at %0d exp %0d", sof_at, 40 + GD);
    end
    checks++;
    if (outs[outs.size() - 1] < 496 || outs[outs.size() - 1] > 504) begin
      failures++;
      $display("FAIL DC output %0d", outs[outs.size() - 1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
