// Reference models shared by the testbenches: UMTS downlink scrambling code
// built straight from its definition (two m-sequences, Gold sum, imaginary
// part = the same Gold sequence 131072 chips later), Walsh code bits, and a
// multipath transmitter model that produces baseband samples with rectangular
// chip pulses.
package tb_model_pkg;
  localparam int OS = 4;
  localparam int NCHIP = 38400;         // one radio frame: the code restarts every frame
  localparam int SHIFT = 131072;

  bit sc_i [NCHIP];
  bit sc_q [NCHIP];

  // build the code tables for code number 0
  function automatic void build_code();
    bit x [];
    bit y [];
    int n;
    n = SHIFT + NCHIP + 18;
    x = new[n];
    y = new[n];
    for (int k = 0; k < 18; k++) begin
      x[k] = (k == 0);
      y[k] = 1'b1;
    end
    for (int k = 0; k + 18 < n; k++) begin
      x[k+18] = x[k+7] ^ x[k];
      y[k+18] = y[k+10] ^ y[k+7] ^ y[k+5] ^ y[k];
    end
    for (int k = 0; k < NCHIP; k++) begin
      sc_i[k] = x[k] ^ y[k];
      sc_q[k] = x[k+SHIFT] ^ y[k+SHIFT];
    end
  endfunction

  function automatic int walsh(int t, int code);
    int v;
    v = t & code;
    return $countones(v) % 2;           // 0 -> +1, 1 -> -1
  endfunction

  function automatic int pm(bit b);
    return b ? -1 : 1;
  endfunction

  // scrambling chip as +/-1 pair (repeats every frame)
  function automatic int sre(int t); return pm(sc_i[t % NCHIP]); endfunction
  function automatic int sim(int t); return pm(sc_q[t % NCHIP]); endfunction
endpackage
