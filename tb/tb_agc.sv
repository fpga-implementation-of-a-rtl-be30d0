// Testbench of agc: a random-phase signal of constant amplitude is applied,
// first weak (the gain must rise) then strong (the gain must fall).  Every
// output sample is checked against in*gain/256 with saturation, computed here
// from the gain the block reports; after each settling period the mean output
// level |Re|+|Im| must lie within 15% of the target, and gain steps in both
// directions must have happened.
module tb_agc;
  import umts_pkg::*;
  localparam int TARGET = 600;
  logic clk = 0, rst_n = 0;
  stream_t in, out;
  logic [13:0] gain;
  logic gain_up, gain_dn;
  int checks = 0, failures = 0, nup = 0, ndn = 0;
  logic [13:0] gain_d;
  stream_t in_d;

  agc dut (.clk, .rst_n, .in, .target(13'(TARGET)), .out, .gain, .gain_up, .gain_dn);
  always #5 clk = ~clk;

  function automatic int sat(int v);
    return v > 2047 ? 2047 : (v < -2048 ? -2048 : v);
  endfunction

  longint lsum = 0;
  int lcnt = 0;
  always @(posedge clk) if (rst_n) begin
    gain_d <= gain;
    in_d   <= in;
    if (gain_up) nup++;
    if (gain_dn) ndn++;
    if (out.valid) begin
      int er, ei;
      er = sat((int'(in_d.d.re) * int'(gain_d)) >>> 8);
      ei = sat((int'(in_d.d.im) * int'(gain_d)) >>> 8);
      checks++;
      if (int'(out.d.re) != er || int'(out.d.im) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL out %0d,%0d exp %0d,%0d", out.d.re, out.d.im, er, ei);
      end
      lsum += (out.d.re < 0 ? -out.d.re : out.d.re) + (out.d.im < 0 ? -out.d.im : out.d.im);
      lcnt++;
    end
  end

  task automatic phase_run(real amp, int ns);
    for (int n = 0; n < ns; n++) begin
      real ph;
      ph = real'($urandom_range(62831)) / 10000.0;
      in.valid <= 1;
      in.sof   <= 0;
      in.d.re  <= SW'($rtoi(amp * $cos(ph)));
      in.d.im  <= SW'($rtoi(amp * $sin(ph)));
      if (n == ns - 4096) begin lsum = 0; lcnt = 0; end
      @(posedge clk);
    end
    checks++;
    if (real'(lsum) / lcnt < 0.85 * TARGET || real'(lsum) / lcnt > 1.15 * TARGET) begin
      failures++;
      $display("FAIL level %f target %0d (amp %f, gain %0d)", real'(lsum) / lcnt, TARGET, amp, gain);
    end
  endtask

  initial begin
    in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    phase_run(150.0, 30000);
    phase_run(1500.0, 30000);
    checks++;
    if (nup == 0 || ndn == 0) begin
      failures++;
      $display("FAIL: gain steps up %0d down %0d", nup, ndn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
