// socu: soft-output computation unit (candidate determination, candidate set
// update and LLR computation).
//
// Every time the search reaches a leaf that lies inside the sphere, the unit
//  1. forms L + 1 candidates from the leaf layer: the leaf node itself and,
//     for each of its L bits, the best leaf sibling with that bit flipped.
//     Because the quadrature components are sorted, that sibling is the first
//     entry of the flipped bit's dimension whose Gray label has the other bit
//     value, combined with the best entry of the other dimension; its metric
//     takes two additions (components, then lambda_1 of the upper layers).
//  2. updates, for each of the N_T*L bits and each bit value, the smallest
//     metric seen so far with that value (the hypothesis/counter-hypothesis
//     list), separately for every detection path.
//  3. computes max-log LLRs on request: LLR = min(bit = 0) - min(bit = 1),
//     clipped to +-LLR_CLIP (positive means bit 1 is likely).
// The document gives the function of these steps; the leaf flip rule above and
// the clipping level are this design's own choices.
//
// Timing: updates at the clock edge; llr_o for rd_path_i is combinational.
module socu
  import tsd_pkg::*;
#(
  parameter int unsigned P        = P_PATHS,
  parameter int unsigned LLR_CLIP = 32767
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear_i,
  input  logic [PW-1:0]     clr_path_i,
  input  logic              upd_i,
  input  logic [PW-1:0]     upd_path_i,
  input  bits_t             path_bits_i,  // bits of layers 1..NT-1 (layer 0 part ignored)
  input  sym_t              leaf_sym_i,   // leaf node
  input  metric_t           leaf_metric_i,// lambda_0 of the leaf node
  input  metric_t           lam_up_i,     // lambda_1
  input  metric_t [SQ-1:0]  comp_re_i,    // sorted leaf-layer components
  input  lvl_t    [SQ-1:0]  lvl_re_i,
  input  metric_t [SQ-1:0]  comp_im_i,
  input  lvl_t    [SQ-1:0]  lvl_im_i,
  input  logic [PW-1:0]     rd_path_i,
  output llr_vec_t          llr_o
);

  localparam int unsigned NC = L + 1;
  localparam logic signed [MW+1:0] CLIP = (MW+2)'(LLR_CLIP);

  typedef metric_t [NBITS-1:0][1:0] table_t;
  table_t tbl [P];

  // ---- 1. candidates ----
  metric_t [NC-1:0] c_m;
  bits_t   [NC-1:0] c_b;

  always_comb begin
    logic [L-1:0] nb;
    nb     = sym_bits(leaf_sym_i);
    c_m[0] = leaf_metric_i;
    c_b[0] = path_bits_i;
    c_b[0][L-1:0] = nb;
    for (int j = 0; j < L; j++) begin
      logic found;
      sym_t s;
      metric_t mr, mi;
      found = 1'b0;
      s  = '0;
      mr = M_INF;
      mi = M_INF;
      if (j < LH) begin
        s.im = lvl_im_i[0];
        mi   = comp_im_i[0];
        for (int p = 0; p < SQ; p++) begin
          logic [LH-1:0] g;
          g = gray(lvl_re_i[p]);
          if (!found && g[LH-1-j] != nb[j]) begin
            found = 1'b1;
            s.re  = lvl_re_i[p];
            mr    = comp_re_i[p];
          end
        end
      end else begin
        s.re = lvl_re_i[0];
        mr   = comp_re_i[0];
        for (int p = 0; p < SQ; p++) begin
          logic [LH-1:0] g;
          g = gray(lvl_im_i[p]);
          if (!found && g[L-1-j] != nb[j]) begin
            found = 1'b1;
            s.im  = lvl_im_i[p];
            mi    = comp_im_i[p];
          end
        end
      end
      c_m[j+1] = m_add(m_add(mr, mi), lam_up_i);
      c_b[j+1] = path_bits_i;
      c_b[j+1][L-1:0] = sym_bits(s);
    end
  end

  // ---- 2. candidate set update ----
  table_t upd_old, upd_new;
  always_comb begin
    upd_old = tbl[upd_path_i];
    upd_new = upd_old;
    for (int b = 0; b < NBITS; b++)
      for (int c = 0; c < NC; c++)
        if (c_m[c] < upd_new[b][c_b[c][b]])
          upd_new[b][c_b[c][b]] = c_m[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < P; p++) tbl[p] <= {(NBITS * 2){M_INF}};
    end else begin
      if (upd_i)   tbl[upd_path_i] <= upd_new;
      if (clear_i) tbl[clr_path_i] <= {(NBITS * 2){M_INF}};
    end
  end

  // ---- 3. LLR computation ----
  always_comb begin
    table_t t;
    t = tbl[rd_path_i];
    for (int b = 0; b < NBITS; b++) begin
      logic signed [MW+1:0] d;
      d = signed'({2'b00, t[b][0]}) - signed'({2'b00, t[b][1]});
      if (d > CLIP)
        llr_o[b] = llr_t'(LLR_CLIP);
      else if (d < -CLIP)
        llr_o[b] = -llr_t'(LLR_CLIP);
      else
        llr_o[b] = llr_t'(d);
    end
  end

endmodule
