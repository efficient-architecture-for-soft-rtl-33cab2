// tsd_ref_pkg: reference model of the detector for the testbenches.
//
// It recomputes a detection the plain way: for every layer it enters it forms
// all 64 symbol metrics directly, sorts them, and walks the depth-first search
// through that full list (no stack, no controlled expansion). Equal metrics
// are ordered by the ranks of the symbol's imaginary and then real component,
// the fixed tie rule the enumeration hardware follows. Counter-hypotheses are found by brute force over all 64 leaf
// siblings. It also generates random channels, received vectors and
// a-priori values.
package tsd_ref_pkg;
  import tsd_pkg::*;

  localparam longint MINF = (64'd1 << MW) - 1;

  function automatic longint msat(longint v);
    return (v > MINF) ? MINF : v;
  endfunction

  function automatic longint dsat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint lv(int k);
    return longint'(2 * k - 7);
  endfunction

  // Bit j (0..2) of the Gray label of level k, MSB first.
  function automatic int gbit(int k, int j);
    int g;
    g = k ^ (k >> 1);
    return (g >> (2 - j)) & 1;
  endfunction

  // r_ii^2 * (y - lvl)^2 in the metric format
  function automatic longint eucl(longint yc, int k, longint rd);
    longint d, r2q;
    d   = yc - lv(k) * 256;
    r2q = (rd * rd) >>> 8;
    return msat(((d * d) * r2q) >>> 16);
  endfunction

  // a-priori penalty of one dimension (bits b0..b0+2 of the layer)
  function automatic longint apen(int k, longint la0, longint la1, longint la2);
    longint las [3];
    longint s;
    las = '{la0, la1, la2};
    s = 0;
    for (int j = 0; j < 3; j++) begin
      int b;
      b = gbit(k, j);
      if ((las[j] > 0 && b == 0) || (las[j] < 0 && b == 1))
        s += (las[j] < 0 ? -las[j] : las[j]) * 16;
    end
    return s;
  endfunction

  typedef struct {
    longint llr [NBITS];
    int     nodes;
    int     leaves;
    int     prunes;
    int     inserts;
  } ref_res_t;

  function automatic ref_res_t detect(det_in_t din, la_vec_t la, int tsize = T_TUPLE);
    ref_res_t res;
    int       xr [NT], xi [NT];
    longint   lup [NT];
    longint   lm  [NT][64];
    int       lr  [NT][64], li [NT][64];
    int       ptr [NT];
    longint   tup [];
    longint   tbl [NBITS][2];
    int       layer;
    bit       load;
    longint   y3r, y3i;
    longint   qr [8], qi [8], sk [64];
    int       rkr [8], rki [8];

    tup = new[tsize];
    foreach (tup[k]) tup[k] = MINF;
    foreach (tbl[b]) begin tbl[b][0] = MINF; tbl[b][1] = MINF; end
    foreach (xr[j]) begin xr[j] = 0; xi[j] = 0; lup[j] = 0; ptr[j] = 0; end
    res.nodes = 0; res.leaves = 0; res.prunes = 0; res.inserts = 0;
    layer = NT - 1;
    load  = 1;

    forever begin
      longint m, rr;
      bit     valid, ins;
      if (load) begin
        longint ar, ai, y2r, y2i, rd;
        // interference reduction and normalisation
        ar = longint'(din.y[layer].re);
        ai = longint'(din.y[layer].im);
        for (int j = layer + 1; j < NT; j++) begin
          longint cr, ci;
          cr = longint'(din.r[layer][j].re);
          ci = longint'(din.r[layer][j].im);
          ar -= cr * lv(xr[j]) - ci * lv(xi[j]);
          ai -= cr * lv(xi[j]) + ci * lv(xr[j]);
        end
        y2r = dsat(ar);
        y2i = dsat(ai);
        y3r = dsat((y2r * longint'(din.rinv[layer])) >>> 8);
        y3i = dsat((y2i * longint'(din.rinv[layer])) >>> 8);
        rd  = longint'(din.rdiag[layer]);
        // the 8 + 8 quadrature components and their ranks (equal values
        // ranked by level index)
        for (int k = 0; k < 8; k++) begin
          qr[k] = msat(eucl(y3r, k, rd) + apen(k, la[layer*L+0], la[layer*L+1], la[layer*L+2]));
          qi[k] = msat(eucl(y3i, k, rd) + apen(k, la[layer*L+3], la[layer*L+4], la[layer*L+5]));
        end
        for (int k = 0; k < 8; k++) begin
          rkr[k] = 0; rki[k] = 0;
          for (int j = 0; j < 8; j++) begin
            if (qr[j] < qr[k] || (qr[j] == qr[k] && j < k)) rkr[k]++;
            if (qi[j] < qi[k] || (qi[j] == qi[k] && j < k)) rki[k]++;
          end
        end
        // all 64 symbols sorted by (layer metric, imaginary rank, real rank)
        for (int n = 0; n < 64; n++) begin
          int kr, ki, p;
          longint lay, key;
          kr  = n / 8; ki = n % 8;
          lay = msat(qr[kr] + qi[ki]);
          key = (lay << 6) | longint'(rki[ki] * 8 + rkr[kr]);
          p = n;
          while (p > 0 && sk[p-1] > key) begin
            sk[p] = sk[p-1];
            lm[layer][p] = lm[layer][p-1];
            lr[layer][p] = lr[layer][p-1];
            li[layer][p] = li[layer][p-1];
            p--;
          end
          sk[p] = key;
          lm[layer][p] = msat(lay + lup[layer]); lr[layer][p] = kr; li[layer][p] = ki;
        end
        ptr[layer] = 0;
      end else begin
        ptr[layer]++;
      end
      res.nodes++;
      valid = ptr[layer] < 64;
      m  = valid ? lm[layer][ptr[layer]] : MINF;
      rr = tup[tsize-1];
      ins = valid && (m <= rr);
      if (!ins) res.prunes++;
      if (ins && layer == 0) begin
        int nr, ni;
        bit [NBITS-1:0] pb;
        res.leaves++;
        nr = lr[0][ptr[0]];
        ni = li[0][ptr[0]];
        if (m < rr) begin
          int p;
          res.inserts++;
          p = tsize - 1;
          while (p > 0 && tup[p-1] > m) begin tup[p] = tup[p-1]; p--; end
          tup[p] = m;
        end
        // bits of the upper layers
        pb = '0;
        for (int j = 1; j < NT; j++)
          for (int b = 0; b < 3; b++) begin
            pb[j*L + b]     = gbit(xr[j], b);
            pb[j*L + 3 + b] = gbit(xi[j], b);
          end
        // the leaf itself and, per bit, the best sibling with the bit flipped
        for (int c = -1; c < int'(L); c++) begin
          int cr, ci;
          longint cm;
          bit [NBITS-1:0] cb;
          if (c < 0) begin
            cr = nr; ci = ni; cm = m;
          end else begin
            cm = MINF + 1; cr = 0; ci = 0;
            for (int n = 0; n < 64; n++) begin
              int sr, si, bsib, bnode;
              sr = lr[0][n]; si = li[0][n];
              bsib  = (c < 3) ? gbit(sr, c) : gbit(si, c - 3);
              bnode = (c < 3) ? gbit(nr, c) : gbit(ni, c - 3);
              if (bsib != bnode && lm[0][n] < cm) begin
                cm = lm[0][n]; cr = sr; ci = si;
              end
            end
          end
          cb = pb;
          for (int b = 0; b < 3; b++) begin
            cb[b]     = gbit(cr, b);
            cb[3 + b] = gbit(ci, b);
          end
          for (int b = 0; b < NBITS; b++)
            if (cm < tbl[b][cb[b]]) tbl[b][cb[b]] = cm;
        end
        load = 0;
      end else if (ins) begin
        xr[layer] = lr[layer][ptr[layer]];
        xi[layer] = li[layer][ptr[layer]];
        lup[layer-1] = m;
        layer--;
        load = 1;
      end else if (layer == NT - 1) begin
        break;
      end else begin
        layer++;
        load = 0;
      end
    end
    for (int b = 0; b < NBITS; b++) begin
      longint d;
      d = tbl[b][0] - tbl[b][1];
      if (d > 32767) d = 32767;
      if (d < -32767) d = -32767;
      res.llr[b] = d;
    end
    return res;
  endfunction

  // Random 4x4 channel and received vector for the transmitted levels
  // txr/txi; noise amplitude in units of 1/256.
  function automatic det_in_t gen_input(int txr [NT], int txi [NT], int noise);
    det_in_t d;
    d = '0;
    for (int i = 0; i < NT; i++) begin
      longint yr, yi;
      int rd;
      rd = 128 + int'($urandom_range(0, 383));
      d.rdiag[i] = data_t'(rd);
      d.rinv[i]  = data_t'(65536 / rd);
      yr = longint'(rd) * lv(txr[i]);
      yi = longint'(rd) * lv(txi[i]);
      for (int j = i + 1; j < NT; j++) begin
        int cr, ci;
        cr = int'($urandom_range(0, 256)) - 128;
        ci = int'($urandom_range(0, 256)) - 128;
        d.r[i][j].re = data_t'(cr);
        d.r[i][j].im = data_t'(ci);
        yr += longint'(cr) * lv(txr[j]) - longint'(ci) * lv(txi[j]);
        yi += longint'(cr) * lv(txi[j]) + longint'(ci) * lv(txr[j]);
      end
      yr += longint'($urandom_range(0, 2 * noise)) - noise;
      yi += longint'($urandom_range(0, 2 * noise)) - noise;
      d.y[i].re = data_t'(yr);
      d.y[i].im = data_t'(yi);
    end
    return d;
  endfunction

  // A-priori values: magnitude up to amax, sign agreeing with the
  // transmitted bit with probability pct_right percent (amax = 0: none).
  function automatic la_vec_t gen_la(int txr [NT], int txi [NT], int amax, int pct_right);
    la_vec_t v;
    for (int i = 0; i < NT; i++)
      for (int j = 0; j < L; j++) begin
        int b, mag;
        bit right;
        b = (j < 3) ? gbit(txr[i], j) : gbit(txi[i], j - 3);
        mag = (amax == 0) ? 0 : int'($urandom_range(0, amax));
        right = ($urandom_range(0, 99) < pct_right);
        if ((b == 1) == right) v[i*L + j] = la_t'(mag);
        else                   v[i*L + j] = la_t'(-mag);
      end
    return v;
  endfunction

  function automatic int tx_bit(int txr [NT], int txi [NT], int b);
    int i, j;
    i = b / L; j = b % L;
    return (j < 3) ? gbit(txr[i], j) : gbit(txi[i], j - 3);
  endfunction

endpackage
