// Testbench of ce_correlator: windows of random length (1..6 chunks) of random
// partial sums with random chunk signs are streamed position by position, with
// idle gaps.  At the last chunk of each window every position's accumulated
// value sum(sign*y) is compared with a model kept here, with its position and
// the one-cycle latency.
module tb_ce_correlator;
  import umts_pkg::*;
  localparam int NP = 64, YI = SW + 1 + $clog2(LCH);
  logic clk = 0, rst_n = 0;
  logic y_valid = 0, sign_neg = 0, first = 0, last = 0;
  logic signed [YI-1:0] y_re, y_im;
  logic [$clog2(NP)-1:0] y_pos, h_pos;
  hcplx_t h;
  logic h_valid;
  longint mr [NP], mi [NP];
  longint er, ei;
  int checks = 0, failures = 0, nwin = 0, nexp = 0;
  longint qp [$], qr [$], qi [$];   // expected outputs: position, re, im

  ce_correlator #(.NP(NP), .YW_IN(YI)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (y_valid) begin
      if (first) begin mr[y_pos] = 0; mi[y_pos] = 0; end
      mr[y_pos] += sign_neg ? -longint'(y_re) : longint'(y_re);
      mi[y_pos] += sign_neg ? -longint'(y_im) : longint'(y_im);
      if (last) begin
        qp.push_back(longint'(y_pos)); qr.push_back(mr[y_pos]); qi.push_back(mi[y_pos]);
        nexp++;
      end
    end
    if (h_valid) begin
      longint ep, ere, eim;
      checks++;
      if (qp.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        ep = qp.pop_front(); ere = qr.pop_front(); eim = qi.pop_front();
        if (longint'(h_pos) != ep || longint'(h.re) != ere || longint'(h.im) != eim) begin
          failures++;
          if (failures < 10) $display("FAIL pos %0d/%0d: %0d,%0d exp %0d,%0d", h_pos, ep,
                                      longint'(h.re), longint'(h.im), ere, eim);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int w = 0; w < 12; w++) begin
      int nch, gap;
      nch = $urandom_range(6, 1);
      for (int c = 0; c < nch; c++) begin
        bit sn;
        sn = $urandom_range(1);
        for (int p = 0; p < NP; p++) begin
          int a, b;
          a = int'($urandom_range(200000)) - 100000;
          b = int'($urandom_range(200000)) - 100000;
          y_valid <= 1; y_pos <= 6'(p); y_re <= YI'(a); y_im <= YI'(b);
          sign_neg <= sn; first <= (c == 0); last <= (c == nch - 1);
          @(posedge clk);
        end
        gap = $urandom_range(3);
        if (gap > 0) begin
          y_valid <= 0;
          repeat (gap) @(posedge clk);
        end
      end
      nwin++;
    end
    repeat (2) @(posedge clk);
    checks++;
    if (qp.size() != 0 || nexp != 12 * NP) begin
      failures++; $display("FAIL missing outputs: %0d expected, %0d left", nexp, qp.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12 * 6 * (NP + 4) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
