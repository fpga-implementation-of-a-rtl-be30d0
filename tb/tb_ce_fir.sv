// Testbench of ce_fir: random samples and random code chips.  For every
// output, one cycle after input sample tau, the chunk r and the position p are
// derived from tau here, and the partial sum
//   y = sum_{l<L} x((rL+l)*OS + p) * conj(c(rL+l))
// is computed directly and compared, together with y_pos, y_first and y_chunk.
module tb_ce_fir;
  import umts_pkg::*;
  localparam int L = LCH, NS = 4 * L * OS * 4;
  logic clk = 0, rst_n = 0;
  stream_t in;
  chip_t cchip;
  logic chip_start, chunk_end, y_valid, y_first;
  logic [15:0] chunk_idx, y_chunk;
  logic signed [SW+$clog2(L):0] y_re, y_im;
  logic [$clog2(L*OS)-1:0] y_pos;
  int xr [NS], xi [NS], cr [NS/OS], ci [NS/OS];
  int checks = 0, failures = 0, nout = 0;

  ce_fir dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    int tau;
    tau = nout;                        // outputs come one per input sample, in order
    if (y_valid) nout++;
    if (y_valid && tau >= (L - 1) * OS) begin
      int r, p;
      longint sr, si;
      r = (tau / OS - (L - 1)) / L;
      p = tau - (r * L + L - 1) * OS;
      sr = 0; si = 0;
      for (int l = 0; l < L; l++) begin
        int n, t;
        t = r * L + l;
        n = t * OS + p;
        sr += xr[n] * cr[t] + xi[n] * ci[t];
        si += xi[n] * cr[t] - xr[n] * ci[t];
      end
      checks++;
      if (longint'(y_re) != sr || longint'(y_im) != si || int'(y_pos) != p ||
          y_first != (p == 0) || int'(y_chunk) != r) begin
        failures++;
        if (failures < 10) $display("FAIL tau %0d: y %0d,%0d exp %0d,%0d pos %0d/%0d chunk %0d/%0d",
                                    tau, y_re, y_im, sr, si, y_pos, p, y_chunk, r);
      end
    end
  end

  initial begin
    for (int n = 0; n < NS; n++) begin
      xr[n] = int'($urandom_range(4000)) - 2000;
      xi[n] = int'($urandom_range(4000)) - 2000;
    end
    for (int t = 0; t < NS / OS; t++) begin
      cr[t] = $urandom_range(1) ? -1 : 1;
      ci[t] = $urandom_range(1) ? -1 : 1;
    end
    in = '0; chip_start = 0; chunk_end = 0; chunk_idx = 0; cchip = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NS; n++) begin
      int t;
      t = n / OS;
      in.valid   <= 1;
      in.d.re    <= SW'(xr[n]);
      in.d.im    <= SW'(xi[n]);
      cchip.i    <= (cr[t] < 0);
      cchip.q    <= (ci[t] < 0);
      chip_start <= (n % OS == 0);
      chunk_end  <= (n % OS == 0) && (t % L == L - 1);
      chunk_idx  <= 16'(t / L);
      @(posedge clk);
    end
    in.valid <= 0;
    repeat (2) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("FAIL outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
