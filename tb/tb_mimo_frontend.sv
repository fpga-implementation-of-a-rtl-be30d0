// End-to-end testbench of mimo_frontend at its default parameters.
//
// Four transmit antennas send a continuous pilot ((1+j) on Walsh code 64*i,
// SF 256) and QPSK data (Walsh code 5, SF 16) under the same scrambling code.
// Each of the 16 transmit/receive pairs is a three-path channel with common
// path delays and its own complex gains.  The sum at each receive antenna is
// given a carrier offset, moved to a digital IF of a quarter of the sample
// rate and quantised to 12-bit real samples, one sample per clock.
//
// Scenario: the offset compensation starts switched off; once the offset
// estimate has been checked against the true offset it is switched on, and
// the input level is raised four-fold so the AGC has to turn its gain down
// after having turned it up.  For a stretch of time neither output FIFO is
// read, so both overflow and drop records.
//
// Checks: the estimated offset against the true one (within 3%), every finger
// set against the path delays, the rotation of the coefficients between two
// estimate periods with and without compensation, and the soft symbols
// against the transmitted data, weighted with the coefficient record of the
// same finger-set tag (the correlation must be positive for 95% of the
// symbols).  Every mechanism (estimates, finger loads and tag changes,
// coefficient records, soft symbols, offset estimates, compensation, AGC
// up/down, FIFO drops on both FIFOs, the swap branch of the arctangent) is
// counted and must have happened.
module tb_mimo_frontend;
  import umts_pkg::*;
  import tb_model_pkg::*;

  localparam int NS      = 40000;            // input samples
  localparam int SFL     = 4, SF = 1 << SFL;
  localparam int DCODE   = 5;
  localparam int PC [NTX] = '{0, 64, 128, 192};
  localparam int NPATH   = 3;
  localparam int PD [NPATH] = '{8, 56, 120}; // path delays in samples
  localparam real PMAG [NPATH] = '{1.0, 0.7, 0.5};
  localparam real FO     = 2500.0 / 15.36e6; // carrier offset, turns per sample
  localparam int N_ON    = 12288;            // compensation on, level x4
  localparam int BP0     = 20000, BP1 = 28000; // FIFOs not read
  localparam real A1     = 9.0;

  logic clk = 0, rst_n = 0;
  logic if_valid = 0, if_sof = 0;
  logic signed [SW-1:0] if_data [NRX];
  logic sym_rd = 1, coef_rd = 1, fo_enable = 0;
  sym_rec_t sym_data;
  coef_rec_t coef_data;
  logic sym_empty, coef_empty, sym_full, coef_full;
  logic [$clog2(64):0] sym_level;
  logic [$clog2(16):0] coef_level;
  logic signed [31:0] fo_step;
  logic fo_valid, f_load, fo_swapped_seen;
  logic [15:0] fo_sym_cnt, sym_drops, coef_drops;
  logic [PW-1:0] fpos [NFING];
  logic [NFING-1:0] fvalid;
  logic [1:0] fid;
  logic [13:0] agc_gain [NRX];
  logic [NRX-1:0] agc_up, agc_dn;

  mimo_frontend dut (
    .clk, .rst_n, .if_valid, .if_sof, .if_data, .if_step(32'h4000_0000),
    .agc_target(13'd600), .avg_syms(5'd1), .fo_pilot(2'd0), .fo_navg_log2(3'd2),
    .fo_enable, .data_code(9'(DCODE)), .sf_log2(4'(SFL)), .x_init(18'h1),
    .sym_rd, .sym_data, .sym_empty, .sym_level, .coef_rd, .coef_data, .coef_empty,
    .coef_level, .fo_step, .fo_valid, .fo_sym_cnt, .fpos, .fvalid, .fid, .f_load,
    .agc_gain, .agc_up, .agc_dn, .sym_drops, .coef_drops, .fo_swapped_seen,
    .sym_full, .coef_full
  );

  always #5 clk = ~clk;

  // ---- transmitted signal ------------------------------------------------
  localparam int NSYM = NS / (SF * OS) + 2;
  int dre [NTX][NSYM], dim [NTX][NSYM];
  real gre [NRX][NTX][NPATH], gim [NRX][NTX][NPATH];

  // baseband chip of transmit antenna i at chip t (pilot + data), times S
  function automatic void tx_chip(int i, int t, output real a, output real b);
    int c, s, xr, xi, pr, pi;
    c = pm(walsh(t, PC[i]));
    s = t / SF;
    // (1+j)c + d*cd, then times S = sre + j sim
    xr = c + dre[i][s] * pm(walsh(t, DCODE));
    xi = c + dim[i][s] * pm(walsh(t, DCODE));
    pr = xr * sre(t) - xi * sim(t);
    pi = xr * sim(t) + xi * sre(t);
    a = real'(pr);
    b = real'(pi);
  endfunction

  function automatic int sample(int r, int n, real amp);
    real xr, xi, ph;
    xr = 0.0; xi = 0.0;
    for (int i = 0; i < NTX; i++)
      for (int k = 0; k < NPATH; k++) begin
        real a, b;
        if (n - PD[k] < 0) continue;
        tx_chip(i, (n - PD[k]) / OS, a, b);
        xr += gre[r][i][k] * a - gim[r][i][k] * b;
        xi += gre[r][i][k] * b + gim[r][i][k] * a;
      end
    ph = 2.0 * 3.14159265358979 * (0.25 * real'(n % 4) + FO * real'(n));
    return int'(amp * (xr * $cos(ph) - xi * $sin(ph)));
  endfunction

  // ---- counters ----------------------------------------------------------
  int checks = 0, failures = 0;
  int n_est = 0, n_load = 0, n_tagchg = 0, n_coef = 0, n_sym = 0, n_fo = 0;
  int n_comp = 0, n_up = 0, n_dn = 0, n_symchk = 0, n_symok = 0, n_rot_off = 0, n_rot_on = 0;
  int n_in = 0;
  logic [1:0] last_fid = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (sample %0d)", what, n_in);
    end
  endtask

  // ---- stimulus ----------------------------------------------------------
  initial begin
    build_code();
    for (int i = 0; i < NTX; i++)
      for (int s = 0; s < NSYM; s++) begin
        dre[i][s] = $urandom_range(1) ? 1 : -1;
        dim[i][s] = $urandom_range(1) ? 1 : -1;
      end
    for (int r = 0; r < NRX; r++)
      for (int i = 0; i < NTX; i++)
        for (int k = 0; k < NPATH; k++) begin
          real th;
          th = 2.0 * 3.14159265358979 * real'($urandom_range(999)) / 1000.0;
          gre[r][i][k] = PMAG[k] * $cos(th);
          gim[r][i][k] = PMAG[k] * $sin(th);
        end
    for (int r = 0; r < NRX; r++) if_data[r] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NS; n++) begin
      real amp;
      amp = (n < N_ON) ? A1 : 4.0 * A1;
      if_valid <= 1;
      if_sof   <= (n == 0);
      for (int r = 0; r < NRX; r++) if_data[r] <= SW'(sample(r, n, amp));
      fo_enable <= (n >= N_ON);
      sym_rd  <= !(n >= BP0 && n < BP1);
      coef_rd <= !(n >= BP0 && n < BP1);
      n_in = n;
      @(posedge clk);
    end
    if_valid <= 0;
    repeat (20) @(posedge clk);

    check(n_est > 0, "no channel estimates");
    check(n_load > 2, "finger sets not loaded");
    check(n_tagchg > 2, "finger tag never changed");
    check(n_coef > 0, "no coefficient records");
    check(n_sym > 0, "no soft symbols");
    check(n_fo > 0, "no offset estimate");
    check(n_comp > 0, "compensation never applied");
    check(n_up > 0, "AGC gain never raised");
    check(n_dn > 0, "AGC gain never lowered");
    check(sym_drops > 0, "symbol FIFO never dropped");
    check(coef_drops > 0, "coefficient FIFO never dropped");
    check(fo_swapped_seen, "arctangent swap branch never used");
    check(n_rot_off > 0 && n_rot_on > 0, "coefficient rotation not measured");
    check(n_symchk > 100 && n_symok * 100 >= n_symchk * 95, "soft symbols disagree with data");
    $display("estimates %0d, finger loads %0d (tag changes %0d), coef records %0d, symbols %0d",
             n_est, n_load, n_tagchg, n_coef, n_sym);
    $display("offset estimates %0d, compensated samples %0d, AGC up %0d down %0d",
             n_fo, n_comp, n_up, n_dn);
    $display("drops sym %0d coef %0d, swap %0d, symbols checked %0d ok %0d",
             sym_drops, coef_drops, fo_swapped_seen, n_symchk, n_symok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- monitors ----------------------------------------------------------
  int mc = 0;                 // sample index after the matched filter
  bit mc_ok = 0;
  int sym_q [$];              // symbol index of every record written to the FIFO
  coef_rec_t cset [4][NFING]; // latest coefficient record per tag and finger
  bit cvalid [4][NFING];
  real last_ang [PW'(0):PW'(NPOS-1)];
  bit  have_ang [NPOS];

  function automatic real cabs(real a, real b); return $sqrt(a * a + b * b); endfunction

  always @(posedge clk) if (rst_n) begin
    // estimates, mechanisms
    if (dut.h_valid[0]) n_est++;
    if (fo_enable && fo_step != 0) n_comp++;
    n_up += $countones(agc_up);
    n_dn += $countones(agc_dn);
    if (fo_valid) begin
      real est;
      n_fo++;
      est = real'(dut.fo_est) / 4294967296.0;
      if (n_in > 6000 && n_in < N_ON) begin
        check(est > FO * 0.97 && est < FO * 1.03, "offset estimate");
        if (n_fo < 6) $display("offset estimate %f of %f turns/sample", est, FO);
      end
    end
    if (f_load) begin
      n_load++;
      if (fid != last_fid) n_tagchg++;
      last_fid = fid;
      if (n_in > 3000) begin
        for (int k = 0; k < NPATH; k++) begin
          bit hit = 0;
          for (int f = 0; f < NFING; f++)
            if (fvalid[f] && int'(fpos[f]) >= PD[k] - 1 && int'(fpos[f]) <= PD[k] + 4) hit = 1;
          check(hit, $sformatf("path at %0d has no finger", PD[k]));
        end
      end
    end
    // sample counter in the matched-filter domain
    if (dut.s_mf[0].valid) begin
      if (dut.s_mf[0].sof) begin mc = 0; mc_ok = 1; end
      else mc++;
    end
    if (dut.y_valid[0]) begin
      n_sym++;
      if (!sym_full || (sym_rd && !sym_empty))
        sym_q.push_back((mc - NPOS + SF * OS / 2) / (SF * OS) - 1);
    end
    // coefficient records
    if (coef_rd && !coef_empty) begin
      n_coef++;
      for (int f = 0; f < NFING; f++)
        if (coef_data.fmask[f]) begin
          cset[coef_data.id][f] = coef_data;
          cvalid[coef_data.id][f] = 1;
        end
      // rotation of the strongest-path coefficient between estimate periods
      begin
        real a, b, ang, d;
        int p;
        p = int'(coef_data.pos);
        a = real'(coef_data.h[0][0].re);
        b = real'(coef_data.h[0][0].im);
        ang = $atan2(b, a);
        if (have_ang[p] && cabs(a, b) > 1000.0 && p >= PD[0] - 1 && p <= PD[0] + 4) begin
          d = ang - last_ang[p];
          while (d > 3.14159265358979) d -= 2.0 * 3.14159265358979;
          while (d < -3.14159265358979) d += 2.0 * 3.14159265358979;
          if (n_in > 4000 && n_in < N_ON) begin
            n_rot_off++;
            check(d > 0.7 || d < -0.7, $sformatf("coefficients do not rotate without compensation %f", d));
          end else if (n_in > N_ON + 8000) begin
            n_rot_on++;
            check(d < 0.3 && d > -0.3, $sformatf("coefficients rotate with compensation %f", d));
          end
        end
        last_ang[p] = ang;
        have_ang[p] = 1;
      end
    end
    // soft symbols against data, weighted with the coefficients of the same tag
    if (sym_rd && !sym_empty) begin
      int s;
      s = (sym_q.size() > 0) ? sym_q.pop_front() : -1;
      if (s >= 0 && s < NSYM && n_in > N_ON + 8000) begin
        real m;
        bit any;
        m = 0.0; any = 0;
        for (int f = 0; f < NFING; f++)
          if (cvalid[sym_data.id][f]) begin
            any = 1;
            for (int r = 0; r < NRX; r++) begin
              real er, ei, yr, yi;
              er = 0.0; ei = 0.0;
              for (int i = 0; i < NTX; i++) begin
                real hr, hi;
                // remove the (1+j) of the pilot symbol: times (1-j)
                hr = real'(cset[sym_data.id][f].h[r][i].re) + real'(cset[sym_data.id][f].h[r][i].im);
                hi = real'(cset[sym_data.id][f].h[r][i].im) - real'(cset[sym_data.id][f].h[r][i].re);
                er += hr * dre[i][s] - hi * dim[i][s];
                ei += hr * dim[i][s] + hi * dre[i][s];
              end
              yr = real'(sym_data.y[r][f].re);
              yi = real'(sym_data.y[r][f].im);
              m += er * yr + ei * yi;
            end
          end
        if (any) begin
          n_symchk++;
          if (m > 0.0) n_symok++;
        end
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
