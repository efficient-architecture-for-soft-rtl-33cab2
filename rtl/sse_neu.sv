// sse_neu: node enumeration unit with smart-sorting enumeration (SSE).
//
// Given the two sorted sets of quadrature metric components of a layer (from
// qmc_mcu), the unit lists the layer's 64 symbols in exact ascending order of
// their metric, one per NEXT request, without ever forming all 64 metrics.
// Think of the 8x8 matrix M[kI][kR] = lambda^R[kR] + lambda^I[kI] over sorted
// positions: it grows to the right and downwards. The unit keeps a stack of
// candidate cells, sorted by metric, whose first entry is the current node.
//   LOAD : stack := { (0,0) }   (the global minimum is the first node)
//   NEXT : remove the first entry (a,b) and add its right neighbour (a+1,b)
//          and its lower neighbour (a,b+1), each through one adder; then sort.
// Controlled expansion: a neighbour is added only when the other cell that
// precedes it (above for (a+1,b), left for (a,b+1)) has already been
// examined. The examined cells form a staircase, so a per-row count cnt[kI]
// of examined cells answers this from indices alone, with no metric compare.
// Each cell enters the stack exactly once and the stack never holds more than
// sqrt(Q) = 8 entries. A rejected neighbour is replaced by "infinite" and the
// 7 remaining entries plus the 2 new ones go into the 8 inputs of a fast_sorter
// (sqrt(Q) inputs, as for the metric components): at most 8 of the 9 can be
// valid, and when the last remaining entry is valid at most one candidate is,
// which then shares its slot with the other, empty candidate.
// The node's full partial metric adds the upper layers' metric lambda_(i+1).
//
// Equal metrics: the stack is sorted on (metric, kI, kR), kR and kI being
// positions in the sorted component lists. This order never puts a cell
// before the cells above it or to its left, so the enumeration is the same
// as sorting all 64 symbols by that key: ties are resolved by a fixed rule
// rather than by the history of the stack.
//
// Banks: the tree search returns to parent layers, so the enumeration state
// of every (detection path, layer) pair is kept in its own bank; the datapath
// is shared. Selecting banks by index is this design's own choice.
//
// Timing: the operation and its result are combinational within one cycle
// (budget of 1 cycle); the bank is updated at the clock edge. head_* shows the
// first stack entry of bank_i after the requested operation.
//
// Unused on purpose: the stack sorter's sorted keys and permutation outputs
// (its payload already carries each entry), and the metric of the removed
// head entry when forming neighbours (they are summed from the components).
module sse_neu
  import tsd_pkg::*;
#(
  parameter int unsigned NB  = P_PATHS * NT,  // number of state banks
  parameter int unsigned BW  = 5              // bank index width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_i,      // start a new layer in bank_i
  input  logic              next_i,      // advance to the next node of bank_i
  input  logic [BW-1:0]     bank_i,
  input  metric_t [SQ-1:0]  comp_re_i,   // sorted components for LOAD
  input  lvl_t    [SQ-1:0]  lvl_re_i,
  input  metric_t [SQ-1:0]  comp_im_i,
  input  lvl_t    [SQ-1:0]  lvl_im_i,
  input  metric_t           lam_up_i,    // lambda_(i+1) for LOAD
  output logic              head_valid_o,
  output metric_t           head_metric_o, // lambda_i of the current node
  output sym_t              head_sym_o,
  output metric_t [SQ-1:0]  comp_re_o,   // the bank's components (after op)
  output lvl_t    [SQ-1:0]  lvl_re_o,
  output metric_t [SQ-1:0]  comp_im_o,
  output lvl_t    [SQ-1:0]  lvl_im_o,
  output metric_t           lam_up_o
);

  typedef struct packed {
    logic    valid;
    metric_t m;      // lambda^R + lambda^I
    lvl_t    kr;     // sorted position in the real set
    lvl_t    ki;     // sorted position in the imaginary set
  } entry_t;

  localparam int unsigned EW = $bits(entry_t);
  localparam int unsigned SKW = 1 + MW + 2 * KW;   // sort key: empty flag, metric, kI, kR

  typedef struct packed {
    metric_t [SQ-1:0] cre;
    lvl_t    [SQ-1:0] lre;
    metric_t [SQ-1:0] cim;
    lvl_t    [SQ-1:0] lim;
    metric_t          lup;
    logic [SQ-1:0][KW:0] cnt;   // examined cells per row kI
    entry_t  [SQ-1:0] stk;      // sorted stack, entry 0 = current node
  } bank_t;

  bank_t banks [NB];
  bank_t cur, nxt;

  always_comb cur = banks[bank_i];

  // ---- expansion of the current node (two candidate adders) ----
  entry_t cand_a, cand_b;
  always_comb begin
    entry_t h;
    logic [KW:0] a, b;
    h = cur.stk[0];
    a = {1'b0, h.kr};
    b = {1'b0, h.ki};
    cand_a = '0;
    cand_b = '0;
    // right neighbour (a+1, b): needs (a+1, b-1) examined
    if (h.valid && a < (KW+1)'(SQ - 1) && (b == 0 || cur.cnt[h.ki - 1] > a + 1)) begin
      cand_a.valid = 1'b1;
      cand_a.kr    = h.kr + 1'b1;
      cand_a.ki    = h.ki;
      cand_a.m     = m_add(cur.cre[h.kr + 1'b1], cur.cim[h.ki]);
    end
    // lower neighbour (a, b+1): needs (a-1, b+1) examined
    if (h.valid && b < (KW+1)'(SQ - 1) && (a == 0 || cur.cnt[h.ki + 1'b1] >= a)) begin
      cand_b.valid = 1'b1;
      cand_b.kr    = h.kr;
      cand_b.ki    = h.ki + 1'b1;
      cand_b.m     = m_add(cur.cre[h.kr], cur.cim[h.ki + 1'b1]);
    end
  end

  // ---- stack sort: 7 remaining entries + 2 candidates in 8 slots ----
  // The valid cells never exceed 8, so when the last remaining entry is valid
  // at most one candidate is; that candidate then takes the last slot.
  logic [SQ-1:0][SKW-1:0] s_key, s_key_o;
  logic [SQ-1:0][EW-1:0]  s_pay, s_pay_o;
  logic [SQ-1:0][KW-1:0]  s_perm;
  entry_t                 slot6, slot7;

  always_comb begin
    if (cur.stk[SQ-1].valid) begin
      slot6 = cur.stk[SQ-1];
      slot7 = cand_a.valid ? cand_a : cand_b;
    end else begin
      slot6 = cand_a;
      slot7 = cand_b;
    end
    for (int e = 1; e < SQ - 1; e++) s_pay[e-1] = cur.stk[e];
    s_pay[SQ-2] = slot6;
    s_pay[SQ-1] = slot7;
    for (int e = 0; e < SQ; e++) begin
      entry_t t;
      t = entry_t'(s_pay[e]);
      s_key[e] = {~t.valid, t.m, t.ki, t.kr};
    end
  end

  a_stack_bound: assert property (@(posedge clk) disable iff (!rst_n)
    next_i && cur.stk[SQ-1].valid |-> !(cand_a.valid && cand_b.valid));

  fast_sorter #(.N(SQ), .KW(SKW), .PLW(EW)) u_stack_sort (
    .key_i(s_key), .pay_i(s_pay), .key_o(s_key_o), .pay_o(s_pay_o), .perm_o(s_perm));

  // ---- next state of the selected bank ----
  always_comb begin
    nxt = cur;
    if (load_i) begin
      nxt.cre = comp_re_i;
      nxt.lre = lvl_re_i;
      nxt.cim = comp_im_i;
      nxt.lim = lvl_im_i;
      nxt.lup = lam_up_i;
      nxt.cnt = '0;
      nxt.stk = '0;
      nxt.stk[0].valid = 1'b1;
      nxt.stk[0].m     = m_add(comp_re_i[0], comp_im_i[0]);
    end else if (next_i && cur.stk[0].valid) begin
      nxt.cnt[cur.stk[0].ki] = {1'b0, cur.stk[0].kr} + 1'b1;
      for (int e = 0; e < SQ; e++) nxt.stk[e] = entry_t'(s_pay_o[e]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NB; n++) banks[n] <= '0;
    end else if (load_i || next_i) begin
      banks[bank_i] <= nxt;
    end
  end

  // ---- node output: add the upper layers' metric ----
  always_comb begin
    head_valid_o  = nxt.stk[0].valid;
    head_metric_o = m_add(nxt.stk[0].m, nxt.lup);
    head_sym_o.re = nxt.lre[nxt.stk[0].kr];
    head_sym_o.im = nxt.lim[nxt.stk[0].ki];
    comp_re_o     = nxt.cre;
    lvl_re_o      = nxt.lre;
    comp_im_o     = nxt.cim;
    lvl_im_o      = nxt.lim;
    lam_up_o      = nxt.lup;
  end

endmodule
