// Shared constants, types and frame-structure helpers of the FBMC/OQAM
// transceiver. The numbers follow the system parameters of the prototype:
// a 256-point (I)FFT, 144 grid sub-carriers of which 137 are active, frames
// of 16 symbols, reference signals every 8 sub-carriers and every 4 symbols,
// and 8 clock cycles per base-rate sample (30.72 MHz clock, 3.84 MHz base
// rate). Positions of the reference signals inside that spacing (sub-carrier
// shift 3, symbol shift 1), the grid amplitude scale and the Zadoff-Chu root
// are choices of this design.
package fbmc_pkg;

  localparam int M          = 256;   // (I)FFT size
  localparam int NSC        = 144;   // grid sub-carriers (137 active + 7 edge zeros)
  localparam int NSYM       = 16;    // symbols per frame
  localparam int OSR        = 8;     // clocks per base-rate sample
  localparam int FB_TAPS    = 8;     // filter bank depth in symbols (RAM/LUT = M*FB_TAPS)
  localparam int RS_F_SP    = 8;     // reference signal spacing in sub-carriers
  localparam int RS_T_SP    = 4;     // reference signal spacing in symbols
  localparam int RS_F_SHIFT = 3;     // first reference sub-carrier
  localparam int RS_T_SHIFT = 1;     // first reference symbol
  localparam int RS_F_LAST  = 139;   // last reference sub-carrier
  localparam int DW         = 16;    // sample width
  localparam int UNIT       = 8192;  // grid value 1.0
  localparam int KW         = 8;     // sub-carrier index width
  localparam int LW         = 4;     // symbol index width

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef enum logic [1:0] {RE_ZERO, RE_SYNC, RE_PILOT, RE_DATA} re_kind_e;

  // Constellation, value = bits per symbol
  typedef enum logic [2:0] {QAM4 = 3'd2, QAM16 = 3'd4, QAM64 = 3'd6} qam_e;

  function automatic logic is_pilot(input int k, input int l);
    return (l % RS_T_SP == RS_T_SHIFT) && (k % RS_F_SP == RS_F_SHIFT) &&
           (k >= RS_F_SHIFT) && (k <= RS_F_LAST);
  endfunction

  // Zadoff-Chu index n carried by sub-carrier k of the sync symbol, or -1.
  // First Nyquist zone: k = n - 31 + NSC/2; second zone mirrors it.
  function automatic int sync_index(input int k);
    int n;
    n = k + 31 - NSC/2;
    if (n >= 0 && n <= 61) return n;
    n = -k - 32 + NSC/2;
    if (n >= 0 && n <= 30) return n;
    n = -k + 93 + NSC/2;
    if (n >= 31 && n <= 61) return n;
    return -1;
  endfunction

  function automatic re_kind_e re_kind(input int k, input int l);
    if (l == 0) return (sync_index(k) >= 0) ? RE_SYNC : RE_ZERO;
    if (k < RS_F_SHIFT || k > RS_F_LAST) return RE_ZERO;
    if (is_pilot(k, l)) return RE_PILOT;
    return RE_DATA;
  endfunction

  function automatic cplx_t cmul_q15(input cplx_t a, input cplx_t b);
    logic signed [2*DW:0] rr, ii;
    cplx_t r;
    rr = $signed(a.re) * $signed(b.re) - $signed(a.im) * $signed(b.im);
    ii = $signed(a.re) * $signed(b.im) + $signed(a.im) * $signed(b.re);
    r.re = sat16(rr >>> 15);
    r.im = sat16(ii >>> 15);
    return r;
  endfunction

  function automatic logic signed [DW-1:0] sat16(input logic signed [2*DW:0] v);
    if (v > 32767) return 16'sd32767;
    if (v < -32768) return -16'sd32768;
    return v[DW-1:0];
  endfunction

endpackage
