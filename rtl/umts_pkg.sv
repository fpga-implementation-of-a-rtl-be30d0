// Shared types and constants of the 4x4 MIMO UMTS receiver front-end.
//
// Samples travel between blocks as complex fixed-point pairs together with a
// valid strobe and a start-of-frame (sof) flag.  The sof flag marks the sample
// that carries sample phase 0 of chip 0 of a radio frame; every block delays it
// by exactly the latency it gives the signal, so each block can recover the
// local time reference from its own input stream.
//
// Spreading codes are carried as bits: a code bit 0 stands for +1 and a bit 1
// for -1, a complex chip is {q, i}.  Sizes set by the system (4x4 antennas, 4x
// oversampling, 256-chip pilot codes, 4 RAKE fingers, 2-bit finger-set tag)
// follow the front-end's description; word widths are this design's choice.
package umts_pkg;

  // system dimensions
  localparam int NRX        = 4;     // receive antennas
  localparam int NTX        = 4;     // transmit antennas (one pilot each)
  localparam int OS         = 4;     // samples per chip
  localparam int PILOT_LEN  = 256;   // chips per pilot symbol / pilot OVSF period
  localparam int NFING      = 4;     // RAKE fingers per receive antenna
  localparam int FRAME_CHIPS = 38400; // chips per UMTS radio frame

  // word widths (design choice)
  localparam int SW = 12;            // baseband sample width

  typedef struct packed {
    logic signed [SW-1:0] re;
    logic signed [SW-1:0] im;
  } cplx_t;

  // channel estimation (design choice: L = 64 chips covers the 40-chip
  // urban delay spread and is a power of two dividing the 256-chip pilot)
  localparam int LCH    = 64;          // chips per FIR / chunk (L)
  localparam int NPOS   = LCH * OS;    // channel positions at sample resolution
  localparam int PW     = $clog2(NPOS);
  localparam int MAXAVG = 16;          // max pilot symbols averaged per estimate
  localparam int HW     = SW + 1 + $clog2(PILOT_LEN) + $clog2(MAXAVG);

  // RAKE
  localparam int MAXSF  = 512;
  localparam int YW     = SW + 1 + $clog2(MAXSF);   // soft symbol width

  typedef struct packed {
    logic signed [HW-1:0] re;
    logic signed [HW-1:0] im;
  } hcplx_t;

  typedef struct packed {
    logic signed [YW-1:0] re;
    logic signed [YW-1:0] im;
  } ycplx_t;

  // record of one symbol period to the MIMO decoder: 2-bit finger-set tag
  // and the soft symbols of every finger of every receive antenna
  typedef struct packed {
    logic [1:0] id;
    ycplx_t [NRX-1:0][NFING-1:0] y;
  } sym_rec_t;

  // channel coefficients at one finger position: tag, fingers placed there,
  // position, and the NRX x NTX coefficients
  typedef struct packed {
    logic [1:0]       id;
    logic [NFING-1:0] fmask;
    logic [PW-1:0]    pos;
    hcplx_t [NRX-1:0][NTX-1:0] h;
  } coef_rec_t;

  typedef struct packed {
    logic  valid;
    logic  sof;
    cplx_t d;
  } stream_t;

  // complex binary chip: i = bit of the real part, q = bit of the imaginary part
  typedef struct packed {
    logic q;
    logic i;
  } chip_t;

  // Hadamard (OVSF) code bit of code number `code` at chip index `n`:
  // parity of the bitwise product of n and the code number (Walsh index).
  function automatic logic ovsf_bit(input logic [15:0] n, input logic [15:0] code);
    return ^(n & code);
  endfunction

  // saturate a wide signed value into SW bits
  function automatic logic signed [SW-1:0] sat_sw(input logic signed [31:0] v);
    localparam logic signed [31:0] MAXV = (32'sd1 <<< (SW-1)) - 1;
    localparam logic signed [31:0] MINV = -(32'sd1 <<< (SW-1));
    if (v > MAXV) return MAXV[SW-1:0];
    if (v < MINV) return MINV[SW-1:0];
    return v[SW-1:0];
  endfunction

endpackage
