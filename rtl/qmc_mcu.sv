// qmc_mcu: metric computation unit with quadrature metric computation (QMC).
//
// For one tree layer it computes, for each of the sqrt(Q) = 8 levels of each
// quadrature dimension, the metric component
//     lambda^R(k) = r_ii^2 * (Re{y'''} - lvl(k))^2 + a-priori^R(k)
//     lambda^I(k) = r_ii^2 * (Im{y'''} - lvl(k))^2 + a-priori^I(k)
// where the a-priori part is the sum of |L_a| over the bits of that dimension
// whose Gray label disagrees with the sign of L_a. Any symbol's layer metric is
// then lambda^R(kR) + lambda^I(kI). Each set of 8 components is sorted in
// ascending order by a fast_sorter, which also returns the level index that
// belongs to each sorted position.
//
// Structure: 2 x 8 parallel lanes, each with a subtractor, a squarer, a
// multiplier by r_ii^2 and an a-priori adder, followed by two 8-input
// sorters, as the unit is drawn in the architecture. The L_a inputs are taken
// as already weighted by N0, so no multiplier is spent on them.
//
// Timing: two pipeline stages (budget of 2 cycles): inputs accepted every
// cycle with valid_i; results appear with valid_o two cycles later. The tag
// travels with the data (the core uses it for the path index).
// The fast sorters' permutation outputs are left unused: the level index
// of each component travels as the sorters' payload instead.
module qmc_mcu
  import tsd_pkg::*;
#(
  parameter int unsigned TAGW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid_i,
  input  logic [TAGW-1:0]      tag_i,
  input  cplx_t                y_i,       // normalised, interference-reduced y'''
  input  data_t                rdiag_i,   // r_ii (positive)
  input  la_t   [L-1:0]        la_i,      // L_a of this layer's L bits
  output logic                 valid_o,
  output logic [TAGW-1:0]      tag_o,
  output metric_t [SQ-1:0]     comp_re_o, // sorted ascending
  output lvl_t    [SQ-1:0]     lvl_re_o,  // level index of each sorted entry
  output metric_t [SQ-1:0]     comp_im_o,
  output lvl_t    [SQ-1:0]     lvl_im_o
);

  // ---------------- stage 1: component computation ----------------
  metric_t [SQ-1:0] c_re, c_im;

  function automatic metric_t eucl(data_t yc, lvl_t k, logic [31:0] r2q);
    logic signed [63:0] d;
    logic [63:0] d2, prod;
    d    = 64'(yc) - 64'(level(k));
    d2   = unsigned'(d * d);
    prod = (d2 * 64'(r2q)) >> (2 * FRAC);
    return m_sat(prod);
  endfunction

  function automatic metric_t apriori(lvl_t k, la_t la0, la_t la1, la_t la2);
    logic [LH-1:0] g;
    la_t la [LH];
    metric_t s;
    g  = gray(k);
    la = '{la0, la1, la2};
    s  = '0;
    for (int j = 0; j < LH; j++) begin
      logic bitv;
      logic [LAW:0] mag;
      bitv = g[LH-1-j];
      mag  = la[j][LAW-1] ? (LAW+1)'(-la[j]) : (LAW+1)'(la[j]);
      if ((la[j] > 0 && !bitv) || (la[j] < 0 && bitv))
        s = s + (metric_t'(mag) << (FRAC - LA_FRAC));
    end
    return s;
  endfunction

  logic [31:0] r2q;  // r_ii^2 in the data format (FRAC fractional bits)
  always_comb begin
    logic signed [31:0] rd;
    rd  = 32'(rdiag_i);
    r2q = unsigned'(rd * rd) >> FRAC;
    for (int k = 0; k < SQ; k++) begin
      c_re[k] = m_add(eucl(y_i.re, lvl_t'(k), r2q), apriori(lvl_t'(k), la_i[0], la_i[1], la_i[2]));
      c_im[k] = m_add(eucl(y_i.im, lvl_t'(k), r2q), apriori(lvl_t'(k), la_i[3], la_i[4], la_i[5]));
    end
  end

  logic             v1;
  logic [TAGW-1:0]  tag1;
  metric_t [SQ-1:0] c_re1, c_im1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1    <= 1'b0;
      tag1  <= '0;
      c_re1 <= '0;
      c_im1 <= '0;
    end else begin
      v1    <= valid_i;
      tag1  <= tag_i;
      c_re1 <= c_re;
      c_im1 <= c_im;
    end
  end

  // ---------------- stage 2: sorting ----------------
  lvl_t [SQ-1:0] idx;
  always_comb for (int k = 0; k < SQ; k++) idx[k] = lvl_t'(k);

  metric_t [SQ-1:0] s_re, s_im;
  lvl_t    [SQ-1:0] l_re, l_im;
  logic    [SQ-1:0][KW-1:0] perm_re, perm_im;

  fast_sorter #(.N(SQ), .KW(MW), .PLW(KW)) u_sort_re (
    .key_i(c_re1), .pay_i(idx), .key_o(s_re), .pay_o(l_re), .perm_o(perm_re));
  fast_sorter #(.N(SQ), .KW(MW), .PLW(KW)) u_sort_im (
    .key_i(c_im1), .pay_i(idx), .key_o(s_im), .pay_o(l_im), .perm_o(perm_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o   <= 1'b0;
      tag_o     <= '0;
      comp_re_o <= '0;
      lvl_re_o  <= '0;
      comp_im_o <= '0;
      lvl_im_o  <= '0;
    end else begin
      valid_o   <= v1;
      tag_o     <= tag1;
      comp_re_o <= s_re;
      lvl_re_o  <= l_re;
      comp_im_o <= s_im;
      lvl_im_o  <= l_im;
    end
  end

endmodule
