// Testbench of phase_est: random complex values over all octants plus the
// axes and zero.  The phase is checked twice: exactly against the fixed-point
// evaluation of the linear arctangent rule (quotient with 12 fraction bits,
// 0.7918 -> 8259, 0.0493 -> 514, octant mapping), and against the true atan2
// within the approximation's error bound (0.06 rad).  The latency is checked.
module tb_phase_est;
  import umts_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, swapped;
  hcplx_t x;
  logic [15:0] phase;
  int checks = 0, failures = 0, nsw = 0;

  phase_est dut (.*);
  always #5 clk = ~clk;

  task automatic one(int re, int im);
    longint a, b, q, th;
    int lat, exp_lat;
    real tru, err;
    a = re < 0 ? -re : re;
    b = im < 0 ? -im : im;
    if (a == 0 && b == 0) th = 0;
    else begin
      q  = (b > a) ? (a << 12) / b : (b << 12) / a;
      th = ((q * 8259) >> 12) + 514;
      if (b > a) th = 16384 - th;
      if (re < 0) th = 32768 - th;
      if (im < 0) th = -th;
    end
    th = th & 16'hffff;
    exp_lat = (a == 0 && b == 0) ? 2 : 15;
    x.re <= HW'(re); x.im <= HW'(im); start <= 1;
    @(posedge clk);
    start <= 0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!done && lat < 100);
    checks++;
    if (longint'(phase) != th || lat != exp_lat) begin
      failures++;
      $display("FAIL (%0d,%0d): phase %0d exp %0d latency %0d", re, im, phase, th, lat);
    end
    if (a != 0 || b != 0) begin
      tru = $atan2(real'(im), real'(re)) / (2.0 * 3.14159265358979) * 65536.0;
      err = real'(16'(phase - 16'($rtoi(tru >= 0 ? tru + 0.5 : tru + 65536.5))));
      if (err > 32768.0) err -= 65536.0;
      checks++;
      if (err > 0.06 / (2.0 * 3.14159265358979) * 65536.0 || err < -0.06 / (2.0 * 3.14159265358979) * 65536.0) begin
        failures++;
        $display("FAIL (%0d,%0d): error %f units", re, im, err);
      end
    end
    if (swapped) nsw++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    one(0, 0); one(1000, 0); one(0, 1000); one(-1000, 0); one(0, -1000);
    one(700, 700); one(-700, 700); one(-5, -3); one(3, -5);
    for (int k = 0; k < 400; k++)
      one(int'($urandom_range(200000)) - 100000, int'($urandom_range(200000)) - 100000);
    checks++;
    if (nsw == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
