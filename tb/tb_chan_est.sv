// Testbench of chan_est: four transmit antennas send their pilots (1+j)*S*C_i
// over two-path channels to one receive antenna.  Every estimate is compared
// with the direct matched filter h_i(p) = sum_t x(p+t*OS) conj(S(t)) C_i(t)
// computed here from the same samples, and the output cycle of every position
// is checked against the documented latency.  The averaging length changes
// from one to two pilot symbols between windows.
module tb_chan_est;
  import umts_pkg::*;
  import tb_model_pkg::*;

  localparam int NS = 6400;
  localparam int PC [NTX] = '{0, 64, 128, 192};

  logic clk = 0, rst_n = 0;
  stream_t in;
  logic [$clog2(MAXAVG):0] avg_syms;
  hcplx_t h [NTX];
  logic h_valid;
  logic [PW-1:0] h_pos;

  chan_est dut (.clk, .rst_n, .in, .x_init(18'h1), .avg_syms, .h, .h_valid, .h_pos);

  always #5 clk = ~clk;

  int xr [NS], xi [NS];
  int checks = 0, failures = 0;
  int cyc = 0, cyc0 = -1;
  int win = 0, c0 = 0, K = 256;
  int win_k [4] = '{256, 256, 512, 256};

  // channel: per tx antenna two paths (delay in samples, gain re/im)
  int pd [NTX][2] = '{'{3, 41}, '{10, 77}, '{0, 130}, '{25, 200}};
  int gr [NTX][2] = '{'{60, -20}, '{-45, 30}, '{50, 10}, '{-30, -25}};
  int gi [NTX][2] = '{'{15, 25}, '{40, -10}, '{-35, 20}, '{20, 15}};

  initial begin
    build_code();
    for (int n = 0; n < NS; n++) begin
      xr[n] = 0; xi[n] = 0;
      for (int i = 0; i < NTX; i++)
        for (int k = 0; k < 2; k++) begin
          int t, c, a, b;
          if (n - pd[i][k] < 0) continue;
          t = (n - pd[i][k]) / OS;
          c = pm(walsh(t, PC[i]));
          // pilot chip (1+j)*S*C = c*((sre - sim) + j(sre + sim))
          a = c * (sre(t) - sim(t));
          b = c * (sre(t) + sim(t));
          xr[n] += gr[i][k] * a - gi[i][k] * b;
          xi[n] += gr[i][k] * b + gi[i][k] * a;
        end
    end
  end

  function automatic void ref_h(int i, int p, int c0, int K, output longint rr, output longint ri);
    rr = 0; ri = 0;
    for (int t = c0; t < c0 + K; t++) begin
      int n, c;
      n = p + t * OS;
      c = pm(walsh(t, PC[i]));
      // x * conj(S) * C
      rr += c * (xr[n] * sre(t) + xi[n] * sim(t));
      ri += c * (xi[n] * sre(t) - xr[n] * sim(t));
    end
  endfunction

  // stimulus
  initial begin
    in = '0;
    avg_syms = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < NS; n++) begin
      in.valid <= 1'b1;
      in.sof   <= (n == 0);
      in.d.re  <= SW'(xr[n]);
      in.d.im  <= SW'(xi[n]);
      if (n == 400 * OS) avg_syms <= 2;
      if (n == 700 * OS) avg_syms <= 1;
      @(posedge clk);
    end
    in.valid <= 1'b0;
    repeat (10) @(posedge clk);
    if (win != 4) begin
      failures++;
      $display("FAIL: %0d windows seen, 4 expected", win);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in.valid && in.sof) cyc0 <= cyc;
    if (h_valid && rst_n && win < 4) begin
      int p;
      p = int'(h_pos);
      K = win_k[win];
      for (int i = 0; i < NTX; i++) begin
        longint rr, ri;
        ref_h(i, p, c0, K, rr, ri);
        checks++;
        if (longint'(h[i].re) != rr || longint'(h[i].im) != ri) begin
          failures++;
          if (failures < 10)
            $display("FAIL win %0d tx %0d pos %0d: got %0d,%0d exp %0d,%0d", win, i, p,
                     h[i].re, h[i].im, rr, ri);
        end
      end
      checks++;
      if (cyc - cyc0 != (c0 + K - 1) * OS + p + 2) begin
        failures++;
        if (failures < 10) $display("FAIL latency pos %0d: %0d", p, cyc - cyc0);
      end
      if (p == NPOS - 1) begin
        c0 += K;
        win++;
      end
    end
  end

  initial begin
    repeat (NS + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
