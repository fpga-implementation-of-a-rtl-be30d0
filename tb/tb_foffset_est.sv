// Testbench of foffset_est: the pilot of one transmit antenna arrives over a
// two-path channel with a carrier frequency offset (plus a second, orthogonal
// pilot as interference).  The estimator sits on the stronger path; each
// estimate whose window lies inside one segment must match dF/Fs * 2^32
// within 2%.  Three offsets are run, the
// last one close to the unambiguous limit and negative; between them the
// path position, pilot selection and antenna tag change.
module tb_foffset_est;
  import umts_pkg::*;
  import tb_model_pkg::*;

  logic clk = 0, rst_n = 0;
  stream_t in;
  logic [PW-1:0] pos;
  logic [1:0] pilot;
  logic signed [31:0] fo_step;
  logic fo_valid, swapped_seen;
  logic [15:0] sym_cnt;

  foffset_est dut (.clk, .rst_n, .in, .x_init(18'h1), .pos, .pilot, .navg_log2(3'd4), .src,
                   .fo_step, .fo_valid, .sym_cnt, .swapped_seen);
  always #5 clk = ~clk;

  localparam int PC [NTX] = '{0, 64, 128, 192};
  int checks = 0, failures = 0, nest = 0, seg_est = 0;
  logic [$clog2(NRX)-1:0] src = '0;
  real fo_turns;          // offset in turns per sample
  real expv;
  real ph = 0.0;          // carrier phase, continuous over segments
  int  ng = 0;            // global sample index
  int  seg_start = 0;

  // one test segment: offset `f` (turns/sample), pilot `pl` on paths d0 (strong), d1
  task automatic run_seg(real f, int pl, int d0, int d1, int nsamp);
    fo_turns = f;
    seg_start = ng;
    expv = f * 4294967296.0;
    pos   <= PW'(d0);
    pilot <= 2'(pl);
    src   <= src + 1'b1;       // each segment as if from another antenna
    seg_est = 0;
    for (int k0 = 0; k0 < nsamp; k0++) begin
      int n;
      real re, im, cr, ci;
      n = ng;
      re = 0.0; im = 0.0;
      for (int k = 0; k < 2; k++) begin
        int d, t, c, a, b;
        real g;
        d = k ? d1 : d0;
        g = k ? 60.0 : 250.0;
        if (n - d < 0) continue;
        t = (n - d) / OS;
        // wanted pilot and an interfering one
        c = pm(walsh(t % 256, PC[pl]));
        a = c * (sre(t) - sim(t));
        b = c * (sre(t) + sim(t));
        re += g * a;
        im += g * b;
        c = pm(walsh(t % 256, PC[(pl + 1) % 4]));
        re += 0.5 * g * c * (sre(t) - sim(t));
        im += 0.5 * g * c * (sre(t) + sim(t));
      end
      ph = ph + 2.0 * 3.14159265358979 * f;
      if (ph > 3.14159265358979) ph -= 2.0 * 3.14159265358979;
      if (ph < -3.14159265358979) ph += 2.0 * 3.14159265358979;
      ng++;
      cr = re * $cos(ph) - im * $sin(ph);
      ci = re * $sin(ph) + im * $cos(ph);
      in.valid <= 1'b1;
      in.sof   <= (n == 0);
      in.d.re  <= SW'($rtoi(cr));
      in.d.im  <= SW'($rtoi(ci));
      @(posedge clk);
    end
    checks++;
    if (seg_est < 1) begin
      failures++;
      $display("FAIL: no estimate in segment f=%f", f);
    end
  endtask

  initial begin
    in = '0; pos = '0; pilot = '0;
    build_code();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
        run_seg( 0.30 / 1024.0, 0, 37, 120, 1024 * 40);
    run_seg( 0.05 / 1024.0, 2, 90, 10, 1024 * 40);
    run_seg(-0.45 / 1024.0, 3, 5, 200, 1024 * 40);
    checks++;
    if (!swapped_seen) failures++;
    $display("estimates %0d", nest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // an estimate is checked when its 17 symbols lie within one segment
  always @(posedge clk) if (rst_n && fo_valid) begin
    nest++;
    seg_est++;
    if (ng - seg_start > 18 * 1024 + NPOS + 64) begin
      real e;
      e = real'(fo_step) - expv;
      checks++;
      if (e > 0.02 * (expv > 0 ? expv : -expv) || e < -0.02 * (expv > 0 ? expv : -expv)) begin
        failures++;
        $display("FAIL estimate %0d exp %f", fo_step, expv);
      end
    end
  end

  initial begin
    repeat (1024 * 130) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
