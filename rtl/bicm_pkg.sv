// bicm_pkg: constants, types and code-structure functions shared by the
// DVB-T2 style BICM-ID transmitter, channel emulator and iterative receiver.
//
// Frame size (64800), rate 4/5 (K = 51840), the 360-column periodicity of the
// parity-check matrix, the receiver parallelism of 90, the 15 iterations and
// all word widths come from the reference design: X 10 bits, Y 9 bits,
// rho 8 bits, equalized Y 9 bits, CSI 8 bits, LLR 8 bits, extrinsic 6 bits,
// SNR 7 bits, erasure rate 11 bits.
//
// Our own choices: the rotated QPSK point coordinates (29 degree rotation,
// as in DVB-T2), the fixed-point scales below, and the parity-check address
// function info_check(), which replaces the standard's address table (not
// reproduced here) by a formula with the same periodic IRA structure: info
// bit j of column group g is connected to checks (x(g,e) + j*q) mod (N-K),
// e = 0..2, x(g,e) = ((97g + 131e + 53ge + 7) mod 360)*q + ((g + e) mod q).
// The three x(g,e) lie in different residue classes mod q, so the 90 columns
// of one layer never touch the same check twice; the formula was checked to
// give no two equal columns and no 4-cycles among information columns.
// Parity bit i sits on checks i and i+1 (staircase).
package bicm_pkg;

  // ---------------- frame and code ----------------
  localparam int unsigned N_LDPC   = 64800;  // coded bits per frame
  localparam int unsigned K_LDPC   = 51840;  // information bits, rate 4/5
  localparam int unsigned GROUP    = 360;    // column-group periodicity
  localparam int unsigned PAR      = 90;     // receiver parallelism
  localparam int unsigned ITER_MAX = 15;     // layered iterations
  localparam int unsigned DV_MAX   = 3;      // edges per variable node
  localparam int unsigned NCOL_IL  = 8;      // bit interleaver columns

  // ---------------- word widths ----------------
  localparam int unsigned X_W    = 10;  // mapper output, 1.0 = 256
  localparam int unsigned Y_W    = 9;   // channel output, 1.0 = 64
  localparam int unsigned RHO_W  = 8;   // fading amplitude, 1.0 = 64
  localparam int unsigned YEQ_W  = 9;   // equalized sample, 1.0 = 64
  localparam int unsigned CSI_W  = 8;   // channel state, 1.0 = 64
  localparam int unsigned LLR_W  = 8;   // LLR, 1 unit = 1/4 natural LLR
  localparam int unsigned EXT_W  = 6;   // extrinsic from the decoder
  localparam int unsigned ECD_W  = 9;   // scaled squared distance
  localparam int unsigned MAG_W  = 7;   // check-node magnitude
  localparam int unsigned SNR_W  = 7;   // Es/N0 in 0.25 dB steps
  localparam int unsigned ERAS_W = 11;  // erasure probability / 2048
  localparam int unsigned LSC_W  = 12;  // LLR scale 2/sigma^2, 4 frac bits

  // ---------------- rotated QPSK (2 bits per cell) ----------------
  localparam int unsigned M_BITS = 2;
  localparam int unsigned N_PTS  = 4;
  // |coordinates| of QPSK rotated by 29 degrees: 0.2756 and 0.9613
  localparam int X_SMALL = 71;   // at 1.0 = 256
  localparam int X_LARGE = 246;
  localparam int Y_SMALL = 18;   // at 1.0 = 64
  localparam int Y_LARGE = 62;

  localparam int unsigned IDX_W = 17;  // variable-node index (N < 2^17 - 1)
  localparam logic [IDX_W-1:0] IDX_NONE = '1;

  // State of one check node for the three-minimum (MS3) check update:
  // the three smallest |T_mn| (ascending) with their variable-node indices,
  // alpha = XOR of the signs of all stored T_mn, par = XOR of the hard
  // decisions of its variable nodes (syndrome bit).
  typedef struct packed {
    logic [MAG_W-1:0] m0, m1, m2;
    logic [IDX_W-1:0] p0, p1, p2;
    logic             alpha;
    logic             par;
  } cn_t;

  localparam cn_t CN_INIT = '{m0: '1, m1: '1, m2: '1,
                              p0: IDX_NONE, p1: IDX_NONE, p2: IDX_NONE,
                              alpha: 1'b0, par: 1'b0};

  typedef logic [ECD_W-1:0] ecd_t;
  typedef ecd_t [N_PTS-1:0] ecd_vec_t;

  // Point p has label bits (b0 = p[0], b1 = p[1]); unrotated I = b0 ? -1 : +1,
  // Q = b1 ? -1 : +1 (Gray).
  function automatic int pt_i(input int p, input int a_sm, input int a_lg);
    case (p)
      0: return a_sm;
      1: return -a_lg;
      2: return a_lg;
      default: return -a_sm;
    endcase
  endfunction

  function automatic int pt_q(input int p, input int a_sm, input int a_lg);
    case (p)
      0: return a_lg;
      1: return a_sm;
      2: return -a_sm;
      default: return -a_lg;
    endcase
  endfunction

  // ---------------- code structure ----------------
  // Check node of edge e (0..2) of information column n.
  function automatic int unsigned info_check(input int unsigned n, input int unsigned e,
                                             input int unsigned nb, input int unsigned kb,
                                             input int unsigned grp);
    int unsigned q, g, j, x;
    q = (nb - kb) / grp;
    g = n / grp;
    j = n % grp;
    x = ((g * 97 + e * 131 + g * e * 53 + 7) % grp) * q + ((g + e) % q);
    return (x + j * q) % (nb - kb);
  endfunction

  // Block interleaver: written column by column (NR = N/NC rows), read row by row.
  function automatic int unsigned pi_fwd(input int unsigned n, input int unsigned nb,
                                         input int unsigned nc);
    return (n % (nb / nc)) * nc + n / (nb / nc);
  endfunction

  function automatic int unsigned pi_inv(input int unsigned i, input int unsigned nb,
                                         input int unsigned nc);
    return (i % nc) * (nb / nc) + i / nc;
  endfunction

  // ---------------- saturation helpers ----------------
  function automatic int sat(input int v, input int unsigned w);
    int hi, lo;
    hi = (1 <<< (w - 1)) - 1;
    lo = -(1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  function automatic int usat(input longint v, input int unsigned w);
    longint hi;
    hi = (longint'(1) <<< w) - 1;
    if (v > hi) return int'(hi);
    if (v < 0) return 0;
    return int'(v);
  endfunction

endpackage
