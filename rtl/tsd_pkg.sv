// tsd_pkg: sizes, number formats and shared helper functions of the
// soft-input soft-output tuple-search sphere detector with smart-sorting
// enumeration and quadrature metric computation (TSD-SSE-QMC).
//
// System sizes follow the detector's main configuration: 4x4 MIMO, 64-QAM,
// tuple size T = 8 and P = 5 interleaved detection paths. The number formats
// are this design's own choice:
//   * data (y', R, 1/r_ii, y''')  : DW-bit two's complement, FRAC fractional bits
//   * metrics                     : MW-bit unsigned, FRAC fractional bits,
//                                   saturating; the all-ones value means "infinite"
//   * a-priori values L_a         : LAW-bit two's complement, LA_FRAC fractional
//                                   bits, already weighted by N0 by the producer
//   * LLRs                        : LLRW-bit two's complement metric differences
// Constellation: each quadrature dimension uses the 8 levels 2k-7 (k = 0..7),
// Gray labelled with gray(k) = k ^ (k >> 1); bit j of a symbol (j = 0..2) is
// the real label read MSB first, bits 3..5 are the imaginary label.
package tsd_pkg;

  localparam int unsigned NT      = 4;   // transmit antennas = tree layers
  localparam int unsigned L       = 6;   // bits per symbol (64-QAM)
  localparam int unsigned LH      = L / 2; // bits per quadrature dimension
  localparam int unsigned SQ      = 8;   // sqrt(Q): levels per dimension
  localparam int unsigned KW      = 3;   // width of a level index
  localparam int unsigned NBITS   = NT * L; // bits per MIMO vector
  localparam int unsigned T_TUPLE = 8;   // tuple size T
  localparam int unsigned P_PATHS = 5;   // interleaved detection paths / stages
  localparam int unsigned PW      = 3;   // width of a path index
  localparam int unsigned LYW     = 2;   // width of a layer index

  localparam int unsigned DW      = 16;
  localparam int unsigned FRAC    = 8;
  localparam int unsigned MW      = 24;
  localparam int unsigned LAW     = 8;
  localparam int unsigned LA_FRAC = 4;
  localparam int unsigned LLRW    = 16;

  localparam logic [MW-1:0] M_INF = '1;

  typedef logic signed [DW-1:0] data_t;
  typedef logic [MW-1:0]        metric_t;
  typedef logic signed [LAW-1:0] la_t;
  typedef logic signed [LLRW-1:0] llr_t;
  typedef logic [KW-1:0]        lvl_t;

  typedef struct packed {
    data_t re;
    data_t im;
  } cplx_t;

  // Complex symbol given by its two level indices.
  typedef struct packed {
    lvl_t re;
    lvl_t im;
  } sym_t;

  // Everything one detection reads from the input vector memory:
  // y' = Q^H y, the upper triangle of R (diagonal real and positive) and the
  // reciprocals of the diagonal used for normalisation.
  typedef struct packed {
    cplx_t [NT-1:0]         y;
    cplx_t [NT-1:0][NT-1:0] r;     // r[i][j]; only j > i is used
    data_t [NT-1:0]         rdiag; // r_ii
    data_t [NT-1:0]         rinv;  // 1 / r_ii
  } det_in_t;

  typedef la_t  [NBITS-1:0] la_vec_t;
  typedef llr_t [NBITS-1:0] llr_vec_t;
  typedef logic [NBITS-1:0] bits_t;

  // Saturating metric addition; infinity stays infinity.
  function automatic metric_t m_add(metric_t a, metric_t b);
    logic [MW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[MW] ? M_INF : s[MW-1:0];
  endfunction

  // Clamp a non-negative wide value to a metric.
  function automatic metric_t m_sat(logic [63:0] v);
    return (v > 64'(M_INF)) ? M_INF : v[MW-1:0];
  endfunction

  // Clamp a signed wide value to the data format.
  function automatic data_t d_sat(logic signed [47:0] v);
    if (v > 48'sd32767)  return 16'sh7fff;
    if (v < -48'sd32768) return 16'sh8000;
    return v[DW-1:0];
  endfunction

  // Gray label of a level index.
  function automatic logic [LH-1:0] gray(lvl_t k);
    return k ^ (k >> 1);
  endfunction

  // Level value 2k-7 in the data format.
  function automatic data_t level(lvl_t k);
    return data_t'((int'(k) * 2 - 7) * (1 << FRAC));
  endfunction

  // All L bits of a symbol, index 0 = first real bit.
  function automatic logic [L-1:0] sym_bits(sym_t s);
    logic [L-1:0] b;
    logic [LH-1:0] gr, gi;
    gr = gray(s.re);
    gi = gray(s.im);
    for (int j = 0; j < LH; j++) begin
      b[j]      = gr[LH-1-j];
      b[LH + j] = gi[LH-1-j];
    end
    return b;
  endfunction

endpackage
