// Testbench of rake: four transmit antennas send QPSK data spread by the data
// Walsh code and the scrambling code over multipath channels to one receive
// antenna.  Each soft symbol of each finger is compared with the direct
// despreading sum over the symbol's chips at that finger's delay, computed
// here; the finger-set tag, the switch of the finger set at a symbol boundary
// and the output cycle are checked too.
module tb_rake;
  import umts_pkg::*;
  import tb_model_pkg::*;

  localparam int NS = 6000;
  localparam int SFL = 4, SF = 16, DCODE = 5;

  logic clk = 0, rst_n = 0;
  stream_t in;
  logic [PW-1:0] pos [NFING];
  logic [1:0] pos_id;
  logic pos_load;
  ycplx_t y [NFING];
  logic [1:0] y_id;
  logic y_valid;

  rake dut (.clk, .rst_n, .in, .x_init(18'h1), .data_code(9'(DCODE)), .sf_log2(4'(SFL)),
            .pos, .pos_id, .pos_load, .y, .y_id, .y_valid);

  always #5 clk = ~clk;

  int xr [NS], xi [NS];
  int checks = 0, failures = 0, cyc = 0, cyc0 = -1, nsym = 0, switched = 0;
  int pd [NTX][2] = '{'{3, 41}, '{10, 77}, '{0, 130}, '{25, 200}};
  int gr [NTX][2] = '{'{60, -20}, '{-45, 30}, '{50, 10}, '{-30, -25}};
  int gi [NTX][2] = '{'{15, 25}, '{40, -10}, '{-35, 20}, '{20, 15}};
  int set_a [NFING] = '{3, 41, 130, 255};
  int set_b [NFING] = '{77, 10, 200, 0};
  localparam int LOAD_B = 2100;        // sample index of the second load

  initial begin
    build_code();
    for (int n = 0; n < NS; n++) begin
      xr[n] = 0; xi[n] = 0;
      for (int i = 0; i < NTX; i++)
        for (int k = 0; k < 2; k++) begin
          int t, s, c, dr, di, a, b;
          if (n - pd[i][k] < 0) continue;
          t  = (n - pd[i][k]) / OS;
          s  = t / SF;
          dr = ((s * 7 + i * 3) % 5 < 2) ? -1 : 1;
          di = ((s * 3 + i) % 3 == 0) ? -1 : 1;
          c  = pm(walsh(t % SF, DCODE));
          // d * S * C
          a = c * (dr * sre(t) - di * sim(t));
          b = c * (dr * sim(t) + di * sre(t));
          xr[n] += gr[i][k] * a - gi[i][k] * b;
          xi[n] += gr[i][k] * b + gi[i][k] * a;
        end
    end
  end

  initial begin
    in = '0; pos_load = 0; pos_id = 0;
    foreach (pos[f]) pos[f] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    pos_load <= 1; pos_id <= 2'd1;
    foreach (pos[f]) pos[f] <= PW'(set_a[f]);
    @(posedge clk);
    pos_load <= 0;
    for (int n = 0; n < NS; n++) begin
      in.valid <= 1'b1;
      in.sof   <= (n == 0);
      in.d.re  <= SW'(xr[n]);
      in.d.im  <= SW'(xi[n]);
      pos_load <= (n == LOAD_B);
      if (n == LOAD_B) begin
        pos_id <= 2'd2;
        foreach (pos[f]) pos[f] <= PW'(set_b[f]);
      end
      @(posedge clk);
    end
    in.valid <= 1'b0;
    pos_load <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nsym < 20 || switched == 0) begin
      failures++;
      $display("FAIL: %0d symbols, switched %0d", nsym, switched);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in.valid && in.sof) cyc0 <= cyc;
    if (y_valid && rst_n) begin
      int s, first_n, last_n, expid;
      int ps [NFING];
      s = nsym;
      first_n = s * SF * OS + NPOS;
      last_n  = (s * SF + SF - 1) * OS + NPOS;
      expid = (first_n > LOAD_B) ? 2 : 1;
      if (expid == 2 && s > 0 && (s - 1) * SF * OS + NPOS <= LOAD_B) switched++;
      for (int f = 0; f < NFING; f++) ps[f] = (expid == 2) ? set_b[f] : set_a[f];
      checks++;
      if (int'(y_id) != expid) begin
        failures++;
        $display("FAIL sym %0d id %0d exp %0d", s, y_id, expid);
      end
      checks++;
      if (cyc - cyc0 != last_n + 1) begin
        failures++;
        $display("FAIL sym %0d latency %0d exp %0d", s, cyc - cyc0, last_n + 1);
      end
      for (int f = 0; f < NFING; f++) begin
        longint rr, ri;
        rr = 0; ri = 0;
        for (int t = s * SF; t < s * SF + SF; t++) begin
          int n, c, sr_, si_;
          n = t * OS + ps[f];
          c = pm(walsh(t % SF, DCODE));
          sr_ = c * sre(t);
          si_ = c * sim(t);
          rr += xr[n] * sr_ + xi[n] * si_;
          ri += xi[n] * sr_ - xr[n] * si_;
        end
        checks++;
        if (longint'(y[f].re) != rr || longint'(y[f].im) != ri) begin
          failures++;
          if (failures < 10) $display("FAIL sym %0d finger %0d: %0d,%0d exp %0d,%0d",
                                      s, f, y[f].re, y[f].im, rr, ri);
        end
      end
      nsym++;
    end
  end

  initial begin
    repeat (NS + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
