// Testbench of finger_assign: three rounds of NRX x NTX channel profiles with
// noise and a few strong paths are streamed in.  After each round the finger
// set is compared with a reference search (sum of |Re|+|Im| over all channels,
// local maxima, the four largest, ties to the earlier position), including the
// strongest receive antenna and the tag; during the following round the
// extracted coefficient records are compared with the stream at the previous
// set's positions.  A round with only two peaks checks the finger-valid flags.
module tb_finger_assign;
  import umts_pkg::*;

  logic clk = 0, rst_n = 0;
  hcplx_t h [NRX][NTX];
  logic h_valid = 0;
  logic [PW-1:0] h_pos;
  logic [PW-1:0] fpos [NFING];
  logic [NFING-1:0] fvalid;
  logic [1:0] fid;
  logic [$clog2(NRX)-1:0] best_rx;
  logic f_load;
  coef_rec_t coef;
  logic coef_valid;

  finger_assign dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hr [3][NPOS][NRX][NTX], hi [3][NPOS][NRX][NTX];
  longint pw [NPOS];
  int exp_pos [3][NFING], exp_n [3], exp_brx [3];
  int nrec = 0, nloads = 0, round_no = 0;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  task automatic build_round(int r);
    int npk;
    int pk [4];
    npk = (r == 1) ? 2 : 4;
    pk = (r == 0) ? '{17, 90, 91, 200} : (r == 1) ? '{5, 130, 0, 0} : '{0, 60, 128, 255};
    for (int p = 0; p < NPOS; p++)
      for (int j = 0; j < NRX; j++)
        for (int i = 0; i < NTX; i++) begin
          hr[r][p][j][i] = int'($urandom_range(40)) - 20;
          hi[r][p][j][i] = int'($urandom_range(40)) - 20;
          if (r == 1) begin hr[r][p][j][i] = 0; hi[r][p][j][i] = 0; end
        end
    for (int k = 0; k < npk; k++)
      for (int j = 0; j < NRX; j++)
        for (int i = 0; i < NTX; i++) begin
          hr[r][pk[k]][j][i] = (k + 1) * 3000 * (j == (k % NRX) ? 2 : 1) * ((i % 2) ? -1 : 1);
          hi[r][pk[k]][j][i] = 1000 * (k + 1);
        end
  endtask

  // reference search
  task automatic ref_round(int r);
    int cv [$];
    longint vals [$];
    exp_n[r] = 0;
    for (int p = 0; p < NPOS; p++) begin
      pw[p] = 0;
      for (int j = 0; j < NRX; j++)
        for (int i = 0; i < NTX; i++) pw[p] += iabs(hr[r][p][j][i]) + iabs(hi[r][p][j][i]);
    end
    for (int p = 0; p < NPOS; p++) begin
      longint l, rr;
      l  = (p == 0) ? 0 : pw[p-1];
      rr = (p == NPOS - 1) ? 0 : pw[p+1];
      if (pw[p] > l && pw[p] >= rr) cv.push_back(p);
    end
    // selection: largest first, earlier position first on ties
    for (int f = 0; f < NFING; f++) begin
      int best;
      best = -1;
      foreach (cv[k]) if (cv[k] >= 0 && (best < 0 || pw[cv[k]] > pw[cv[best]])) best = k;
      if (best >= 0) begin
        exp_pos[r][f] = cv[best];
        cv[best] = -1;
        exp_n[r]++;
      end
    end
    begin
      longint bp; int p;
      p = exp_pos[r][0];
      exp_brx[r] = 0; bp = -1;
      for (int j = 0; j < NRX; j++) begin
        longint s;
        s = 0;
        for (int i = 0; i < NTX; i++) s += iabs(hr[r][p][j][i]) + iabs(hi[r][p][j][i]);
        if (s > bp) begin bp = s; exp_brx[r] = j; end
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 3; r++) begin build_round(r); ref_round(r); end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < 3; r++) begin
      round_no = r;
      for (int p = 0; p < NPOS; p++) begin
        h_valid <= 1;
        h_pos   <= PW'(p);
        for (int j = 0; j < NRX; j++)
          for (int i = 0; i < NTX; i++) begin
            h[j][i].re <= HW'(hr[r][p][j][i]);
            h[j][i].im <= HW'(hi[r][p][j][i]);
          end
        @(posedge clk);
      end
      h_valid <= 0;
      repeat (20) @(posedge clk);
    end
    checks++;
    if (nloads != 3 || nrec != 4 + 2) begin
      failures++;
      $display("FAIL: loads %0d records %0d", nloads, nrec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (f_load) begin
      int r;
      r = nloads;
      checks++;
      if (fid != 2'(r + 1) || best_rx != 2'(exp_brx[r])) begin
        failures++;
        $display("FAIL round %0d: id %0d brx %0d exp %0d", r, fid, best_rx, exp_brx[r]);
      end
      for (int f = 0; f < NFING; f++) begin
        checks++;
        if (fvalid[f] != (f < exp_n[r]) || (f < exp_n[r] && int'(fpos[f]) != exp_pos[r][f])) begin
          failures++;
          $display("FAIL round %0d finger %0d: pos %0d v %0d exp %0d (n %0d)", r, f, fpos[f],
                   fvalid[f], exp_pos[r][f], exp_n[r]);
        end
      end
      nloads++;
    end
    if (coef_valid) begin
      int r, p;
      logic [NFING-1:0] m;
      r = round_no;          // records of round r belong to the set of round r-1
      p = int'(coef.pos);
      m = '0;
      for (int f = 0; f < exp_n[r-1]; f++) if (exp_pos[r-1][f] == p) m[f] = 1'b1;
      checks++;
      if (r == 0 || coef.id != 2'(r) || coef.fmask != m) begin
        failures++;
        $display("FAIL record pos %0d id %0d mask %b exp %b", p, coef.id, coef.fmask, m);
      end
      for (int j = 0; j < NRX; j++)
        for (int i = 0; i < NTX; i++) begin
          checks++;
          if (int'(coef.h[j][i].re) != hr[r][p][j][i] || int'(coef.h[j][i].im) != hi[r][p][j][i]) begin
            failures++;
            $display("FAIL record pos %0d coef %0d %0d", p, j, i);
          end
        end
      nrec++;
    end
  end

  initial begin
    repeat (4 * NPOS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
