// Finger searcher and coefficient extraction for the RAKE receivers.
//
// The channel estimators of all NRX receive antennas deliver their NTX
// estimates position by position, in step.  For each position p this block
// forms the common power profile P(p) = sum over all NRX*NTX channels of
// |Re h| + |Im h| and, on the fly, keeps the NFING strongest local maxima
// (P(p-1) > P(p-2) and P(p-1) >= P(p); positions outside the window count as
// zero) in a list sorted by power.  Together with each peak it keeps the
// receive antenna with the largest power at that position.  One cycle after
// the last position the list becomes the new finger set: `fpos` (strongest
// first), `fvalid`, `best_rx`, a new 2-bit tag `fid` and the strobe `f_load`.
//
// At the same time the coefficients that belong to the finger set of the
// previous round are picked out of the estimate stream as they pass: when p
// equals the position of one or more fingers of the current set, a coef_rec_t
// with the set's tag, the finger mask, p and all NRX*NTX coefficients leaves on
// `coef`/`coef_valid`.  No estimates are stored.
//
// Latency: coefficients 1 cycle after the estimate; f_load 3 cycles after the
// estimate of position NPOS-1.
// The common profile, the four strongest peaks and the on-the-fly extraction
// with 2-bit tags follow the document; the local-maximum rule and the sorted
// insertion list are this design's choice.
module finger_assign
  import umts_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  hcplx_t               h [NRX][NTX],
  input  logic                 h_valid,
  input  logic [PW-1:0]        h_pos,
  output logic [PW-1:0]        fpos [NFING],
  output logic [NFING-1:0]     fvalid,
  output logic [1:0]           fid,
  output logic [$clog2(NRX)-1:0] best_rx,
  output logic                 f_load,
  output coef_rec_t            coef,
  output logic                 coef_valid
);
  localparam int PWR = HW + 1 + $clog2(NRX * NTX);
  localparam int RXW = $clog2(NRX);

  function automatic logic [HW:0] mag(input hcplx_t c);
    logic [HW-1:0] a, b;
    a = c.re[HW-1] ? HW'(-c.re) : HW'(c.re);
    b = c.im[HW-1] ? HW'(-c.im) : HW'(c.im);
    return {1'b0, a} + {1'b0, b};
  endfunction

  // ---- stage 1: power profile ---------------------------------------------
  logic [PWR-1:0] p_c;
  logic [PWR-1:0] prx_c [NRX];
  always_comb begin
    p_c = '0;
    for (int j = 0; j < NRX; j++) begin
      prx_c[j] = '0;
      for (int i = 0; i < NTX; i++) prx_c[j] = prx_c[j] + PWR'(mag(h[j][i]));
      p_c = p_c + prx_c[j];
    end
  end

  logic [RXW-1:0] brx_c;
  always_comb begin
    brx_c = '0;
    for (int j = 1; j < NRX; j++) if (prx_c[j] > prx_c[brx_c]) brx_c = RXW'(j);
  end

  logic           s1_v;
  logic [PW-1:0]  s1_pos;
  logic [PWR-1:0] s1_p;
  logic [RXW-1:0] s1_brx;

  // ---- stage 2: peak list ----------------------------------------------------
  logic [PWR-1:0] pv1, pv2;          // P(p-1), P(p-2)
  logic [RXW-1:0] bx1;
  logic [PW-1:0]  ps1;
  logic           flush;

  logic [PWR-1:0] lv [NFING], lv_c [NFING];
  logic [PW-1:0]  lp [NFING], lp_c [NFING];
  logic [RXW-1:0] lb [NFING], lb_c [NFING];

  // candidate evaluated this cycle
  logic           cand;
  logic [PWR-1:0] cval, nxt;
  always_comb begin
    nxt  = flush ? '0 : s1_p;
    cval = pv1;
    cand = 1'b0;
    if (flush) cand = (pv1 > pv2);
    else if (s1_v && s1_pos != '0) cand = (pv1 > pv2) && (pv1 >= nxt);
  end

  always_comb begin
    logic [PWR-1:0] bv [NFING];
    logic [PW-1:0]  bp [NFING];
    logic [RXW-1:0] bb [NFING];
    int k;
    for (int f = 0; f < NFING; f++) begin
      // a new round starts at position 0
      bv[f] = (s1_v && s1_pos == '0) ? '0 : lv[f];
      bp[f] = lp[f];
      bb[f] = lb[f];
    end
    k = NFING;
    for (int f = NFING - 1; f >= 0; f--) if (cval > bv[f]) k = f;
    for (int f = 0; f < NFING; f++) begin
      lv_c[f] = bv[f]; lp_c[f] = bp[f]; lb_c[f] = bb[f];
      if (cand) begin
        if (f == k) begin
          lv_c[f] = cval; lp_c[f] = ps1; lb_c[f] = bx1;
        end else if (f > k) begin
          lv_c[f] = bv[f-1]; lp_c[f] = bp[f-1]; lb_c[f] = bb[f-1];
        end
      end
    end
  end

  // ---- coefficient extraction ---------------------------------------------------
  logic [NFING-1:0] hit;
  logic have_set;
  always_comb begin
    for (int f = 0; f < NFING; f++) hit[f] = have_set && fvalid[f] && (fpos[f] == h_pos);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_pos <= '0; s1_p <= '0; s1_brx <= '0;
      pv1 <= '0; pv2 <= '0; bx1 <= '0; ps1 <= '0; flush <= 1'b0;
      fvalid <= '0; fid <= '0; best_rx <= '0; f_load <= 1'b0; have_set <= 1'b0;
      coef <= '0; coef_valid <= 1'b0;
      for (int f = 0; f < NFING; f++) begin
        lv[f] <= '0; lp[f] <= '0; lb[f] <= '0; fpos[f] <= '0;
      end
    end else begin
      f_load     <= 1'b0;
      coef_valid <= 1'b0;
      // stage 1
      s1_v <= h_valid;
      if (h_valid) begin
        s1_pos <= h_pos;
        s1_p   <= p_c;
        s1_brx <= brx_c;
        if (hit != '0) begin
          coef_valid <= 1'b1;
          coef.id    <= fid;
          coef.fmask <= hit;
          coef.pos   <= h_pos;
          for (int j = 0; j < NRX; j++)
            for (int i = 0; i < NTX; i++) coef.h[j][i] <= h[j][i];
        end
      end
      // stage 2
      flush <= s1_v && (s1_pos == PW'(NPOS - 1));
      if (s1_v || flush) begin
        lv <= lv_c; lp <= lp_c; lb <= lb_c;
      end
      if (s1_v) begin
        pv2 <= (s1_pos == '0) ? '0 : pv1;
        pv1 <= s1_p;
        ps1 <= s1_pos;
        bx1 <= s1_brx;
      end
      if (flush) begin
        for (int f = 0; f < NFING; f++) begin
          fpos[f]   <= lp_c[f];
          fvalid[f] <= (lv_c[f] != '0);
        end
        best_rx  <= lb_c[0];
        fid      <= fid + 1'b1;
        f_load   <= 1'b1;
        have_set <= 1'b1;
      end
    end
  end
endmodule
