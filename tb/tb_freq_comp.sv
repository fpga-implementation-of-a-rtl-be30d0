// Testbench of freq_comp: a complex tone A*e^{j 2 pi f n} with a frequency
// word of f*2^32 must come out as a constant phasor A*e^{j theta} (the NCO
// starts at phase 0 with the first valid sample, the rotator delays by 16
// cycles).  Each output is compared with A*e^{j 2 pi f (n - n_nco)} removed,
// within 1% of A.
module tb_freq_comp;
  import umts_pkg::*;
  localparam int LAT = 16;
  localparam real A = 1500.0, PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  stream_t in, out;
  logic signed [31:0] fo_step;
  int checks = 0, failures = 0, n_out = 0;
  real f;

  freq_comp dut (.clk, .rst_n, .in, .fo_step, .out);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out.valid) begin
    // input n had phase 2 pi f n, the NCO removed 2 pi f n (both start at 0)
    real er, ei;
    er = real'(out.d.re) - A;
    ei = real'(out.d.im);
    checks++;
    if (er * er + ei * ei > (0.01 * A) ** 2) begin
      failures++;
      if (failures < 10) $display("FAIL out %0d: %0d,%0d", n_out, out.d.re, out.d.im);
    end
    n_out++;
  end

  task automatic run(real ff, int ns);
    f = ff;
    fo_step <= 32'($rtoi(ff * 4294967296.0));
    for (int n = 0; n < ns; n++) begin
      in.valid <= 1;
      in.sof   <= 0;
      in.d.re  <= SW'($rtoi(A * $cos(2.0 * PI * f * n) + 0.5));
      in.d.im  <= SW'($rtoi(A * $sin(2.0 * PI * f * n) + 0.5));
      @(posedge clk);
    end
    in.valid <= 0;
    repeat (LAT + 2) @(posedge clk);
  endtask

  initial begin
    in = '0; fo_step = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(0.0013, 3000);               // the NCO phase continues from 0 (reset)
    checks++;
    if (n_out != 3000) begin failures++; $display("FAIL outputs %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
