// 4x4 MIMO receiver front-end for a UMTS (WCDMA) downlink.
//
// Four transmit antennas send independent data streams with the same data
// channelization code, plus one continuous pilot each (pilot OVSF codes that
// differ only in their high-order code-number bits).  Per receive antenna the
// real digital-IF samples (OS = 4 samples per chip) pass through
//   ddc -> agc -> freq_comp -> rrc_filter
// and feed a hybrid FIR/correlator channel estimator (chan_est, all NTX
// channels at once) and a four-finger RAKE (rake).  finger_assign sums the
// |Re|+|Im| profiles of all 16 channels, picks the four strongest peaks as the
// finger set of the next period (new 2-bit tag) and extracts the coefficients
// of the current set as the estimates stream past.  foffset_est estimates the
// carrier offset feed-forward on the AGC output of the strongest antenna at
// the strongest path (re-chosen only when that path moves); its frequency word drives the compensation of all four
// antennas (`fo_enable`).  Soft-symbol records (all NRX x NFING fingers, tag)
// and coefficient records (tag, finger mask, position, NRX x NTX
// coefficients) leave through two FIFOs to the MIMO decoder.
//
// Timing: one sample per clock per antenna (all antennas in parallel, qualified
// by if_valid).  if_sof marks the first sample of a radio frame; it is the
// result of the cell search / synchronization, which is outside this block.
// The block structure follows the front-end description; the antennas run in
// parallel here rather than time-multiplexed on one datapath.
module mimo_frontend
  import umts_pkg::*;
#(
  parameter int SYM_DEPTH  = 64,
  parameter int COEF_DEPTH = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // digital IF input
  input  logic                    if_valid,
  input  logic                    if_sof,
  input  logic signed [SW-1:0]    if_data [NRX],
  // configuration
  input  logic [31:0]             if_step,       // IF frequency, 2^32 = sample rate
  input  logic [SW:0]             agc_target,    // mean |Re|+|Im| after the AGC
  input  logic [$clog2(MAXAVG):0] avg_syms,      // pilot symbols per channel estimate
  input  logic [$clog2(NTX)-1:0]  fo_pilot,      // pilot used for the offset estimate
  input  logic [2:0]              fo_navg_log2,  // log2 of phase differences averaged
  input  logic                    fo_enable,     // apply the offset estimate
  input  logic [8:0]              data_code,     // Walsh number of the data channel
  input  logic [3:0]              sf_log2,       // log2 spreading factor of the data
  input  logic [17:0]             x_init,        // scrambling-code start state
  // soft-symbol FIFO
  input  logic                    sym_rd,
  output sym_rec_t                sym_data,
  output logic                    sym_empty,
  output logic [$clog2(SYM_DEPTH):0] sym_level,
  // coefficient FIFO
  input  logic                    coef_rd,
  output coef_rec_t               coef_data,
  output logic                    coef_empty,
  output logic [$clog2(COEF_DEPTH):0] coef_level,
  // status
  output logic signed [31:0]      fo_step,
  output logic                    fo_valid,
  output logic [15:0]             fo_sym_cnt,    // pilot symbols evaluated
  output logic [PW-1:0]           fpos [NFING],
  output logic [NFING-1:0]        fvalid,
  output logic [1:0]              fid,
  output logic                    f_load,
  output logic [13:0]             agc_gain [NRX],
  output logic [NRX-1:0]          agc_up,
  output logic [NRX-1:0]          agc_dn,
  output logic [15:0]             sym_drops,
  output logic [15:0]             coef_drops,
  output logic                    fo_swapped_seen,
  output logic                    sym_full,
  output logic                    coef_full
);
  stream_t s_if [NRX], s_bb [NRX], s_agc [NRX], s_fc [NRX], s_mf [NRX];
  hcplx_t  h [NRX][NTX];
  logic [NRX-1:0] h_valid;
  logic [PW-1:0]  h_pos [NRX];
  ycplx_t  y [NRX][NFING];
  logic [1:0] y_id [NRX];
  logic [NRX-1:0] y_valid;
  logic [$clog2(NRX)-1:0] best_rx;
  logic signed [31:0] fo_est;
  coef_rec_t coef;
  logic coef_valid;

  assign fo_step = fo_enable ? fo_est : '0;

  for (genvar j = 0; j < NRX; j++) begin : g_rx
    assign s_if[j] = '{valid: if_valid, sof: if_sof, d: '{re: if_data[j], im: '0}};

    ddc u_ddc (.clk, .rst_n, .if_in(s_if[j]), .if_step, .out(s_bb[j]));

    agc u_agc (.clk, .rst_n, .in(s_bb[j]), .target(agc_target), .out(s_agc[j]),
               .gain(agc_gain[j]), .gain_up(agc_up[j]), .gain_dn(agc_dn[j]));

    freq_comp u_fc (.clk, .rst_n, .in(s_agc[j]), .fo_step, .out(s_fc[j]));

    rrc_filter u_rrc (.clk, .rst_n, .in(s_fc[j]), .out(s_mf[j]));

    chan_est u_ce (.clk, .rst_n, .in(s_mf[j]), .x_init, .avg_syms,
                   .h(h[j]), .h_valid(h_valid[j]), .h_pos(h_pos[j]));

    rake u_rake (.clk, .rst_n, .in(s_mf[j]), .x_init, .data_code, .sf_log2,
                 .pos(fpos), .pos_id(fid), .pos_load(f_load),
                 .y(y[j]), .y_id(y_id[j]), .y_valid(y_valid[j]));
  end

  finger_assign u_fa (.clk, .rst_n, .h, .h_valid(h_valid[0]), .h_pos(h_pos[0]),
                      .fpos, .fvalid, .fid, .best_rx, .f_load, .coef, .coef_valid);

  // Antenna for the offset estimate: the strongest antenna at the strongest
  // path, re-chosen only when the strongest path moves, so that the estimator
  // is not restarted by antennas of nearly equal power taking turns.
  logic [$clog2(NRX)-1:0] fo_rx;
  logic [PW-1:0] fo_rx_pos;
  logic fo_rx_ok;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fo_rx <= '0; fo_rx_pos <= '0; fo_rx_ok <= 1'b0;
    end else if (f_load && fvalid[0] && (!fo_rx_ok || fpos[0] != fo_rx_pos)) begin
      fo_rx <= best_rx; fo_rx_pos <= fpos[0]; fo_rx_ok <= 1'b1;
    end
  end

  foffset_est u_fo (.clk, .rst_n, .in(s_agc[fo_rx]), .x_init, .pos(fpos[0]),
                    .pilot(fo_pilot), .navg_log2(fo_navg_log2), .src(fo_rx),
                    .fo_step(fo_est), .fo_valid, .sym_cnt(fo_sym_cnt),
                    .swapped_seen(fo_swapped_seen));

  // soft-symbol records
  sym_rec_t srec;
  always_comb begin
    srec.id = y_id[0];
    for (int j = 0; j < NRX; j++)
      for (int f = 0; f < NFING; f++) srec.y[j][f] = y[j][f];
  end

  out_fifo #(.W($bits(sym_rec_t)), .DEPTH(SYM_DEPTH)) u_sym_fifo (
    .clk, .rst_n, .wr_en(y_valid[0]), .wr_data(srec), .rd_en(sym_rd),
    .rd_data(sym_data), .empty(sym_empty), .full(sym_full), .level(sym_level),
    .drops(sym_drops)
  );

  out_fifo #(.W($bits(coef_rec_t)), .DEPTH(COEF_DEPTH)) u_coef_fifo (
    .clk, .rst_n, .wr_en(coef_valid), .wr_data(coef), .rd_en(coef_rd),
    .rd_data(coef_data), .empty(coef_empty), .full(coef_full), .level(coef_level),
    .drops(coef_drops)
  );

  // all receive paths run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (h_valid == '0 || h_valid == '1) && (y_valid == '0 || y_valid == '1));
endmodule
