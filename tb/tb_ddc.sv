// Testbench of ddc: a real IF tone A*cos(2*pi*(Fs/4 + fb)*n + th) is mixed down
// with the IF word for Fs/4.  After the 17-cycle latency each output must equal
// (A/2)*(e^{j phi(n)} + e^{j phi(n-1)}), phi(n) = 2*pi*fb*n + th, within 4% of
// A (the residue of the mirror image and rounding).  The NCO phase restart at
// sof is checked through th.
module tb_ddc;
  import umts_pkg::*;
  localparam int LAT = 17;
  localparam real A = 1000.0, FB = 0.004, TH = 0.7, PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  stream_t if_in, out;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;

  ddc dut (.clk, .rst_n, .if_in, .if_step(32'h4000_0000), .out);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out.valid) begin
    if (n_out >= 2) begin
      real p0, p1, er, ei;
      int n;
      n  = n_out;
      p0 = 2.0 * PI * FB * n + TH;
      p1 = 2.0 * PI * FB * (n - 1) + TH;
      er = real'(out.d.re) - A / 2.0 * ($cos(p0) + $cos(p1));
      ei = real'(out.d.im) - A / 2.0 * ($sin(p0) + $sin(p1));
      checks++;
      if (er * er + ei * ei > (0.04 * A) ** 2) begin
        failures++;
        if (failures < 10) $display("FAIL n %0d: %0d,%0d err %f,%f", n, out.d.re, out.d.im, er, ei);
      end
    end
    if (out.sof != (n_out == 0)) begin
      failures++;
      $display("FAIL sof at output %0d", n_out);
    end
    n_out++;
  end

  initial begin
    if_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      if_in.valid <= 1;
      if_in.sof   <= (n == 0);
      if_in.d.re  <= SW'($rtoi(A * $cos(2.0 * PI * (0.25 + FB) * n + TH)));
      if_in.d.im  <= '0;
      @(posedge clk);
    end
    if_in.valid <= 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (n_out != 2000) begin failures++; $display("FAIL outputs %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: first output exactly LAT cycles after the first input
  int c_in = -1, c = 0;
  always @(posedge clk) begin
    c <= c + 1;
    if (rst_n && if_in.valid && if_in.sof) c_in <= c;
    if (rst_n && out.valid && out.sof) begin
      checks++;
      if (c - c_in != LAT) begin failures++; $display("FAIL latency %0d", c - c_in); end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
