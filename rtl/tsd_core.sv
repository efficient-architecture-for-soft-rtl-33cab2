// tsd_core: regularised tuple-search sphere detection loop with pipeline
// interleaving of five detection paths.
//
// Depth-first search over the N_T = 4 layer tree with exact smart-sorting
// enumeration. One loop iteration examines one tree node and always runs the
// same task sets, whatever the layer (regularisation):
//   phase 0-1 : qmc_mcu computes and sorts the quadrature metric components
//               of the layer being entered (from the IRU result)
//   phase 2   : sse_neu either starts that layer (LOAD, first node) or gives
//               the next sibling of the current layer (NEXT)
//   phase 3   : radius test, tuple update and soft-output update at a leaf,
//               tree layer update, and issue of the interference reduction
//   phase 3-4 : iru computes y''' of the next layer
// Layer update rule, with R the path's radius and lambda the node metric:
//   node invalid or lambda > R : prune; go up one layer (NEXT there), or, at
//                                the root layer, end the detection
//   lambda <= R and i > 0      : keep the node, descend (LOAD at i-1)
//   lambda <= R and i = 0      : leaf: update tuple and soft output, NEXT at 0
// Since the enumeration is exact (ascending), the first sibling beyond the
// radius ends the layer.
//
// Pipeline interleaving: a free-running counter ph = 0..4 selects the task
// set each path performs; path p is in phase (ph - p) mod 5, so in every
// cycle each of the five phases serves a different path and all units are
// shared. Every path keeps its own context (layer, chosen symbols, upper
// metrics, input data) and its own banks in sse_neu, radius_unit and socu.
// A new iteration of a path starts every 5 cycles.
//
// Path life cycle: IDLE --(phase 4, address granted, memory read issued)-->
// FETCH --(phase 0, input data captured)--> INIT --(phase 3, tuple and soft
// output cleared, IRU issued for the root layer)--> RUN --(root pruned)-->
// DONE --(phase 4, LLR vector written, next address requested)--> ...
// The flow of the loop and the 5-cycle interleaved schedule follow the
// document; the life cycle and handshakes are this design's own.
module tsd_core
  import tsd_pkg::*;
#(
  parameter int unsigned AW = 10,
  parameter int unsigned T  = T_TUPLE   // tuple size
) (
  input  logic             clk,
  input  logic             rst_n,
  // work distribution (address generation unit)
  output logic             req_o,
  input  logic             grant_i,
  input  logic [AW-1:0]    addr_i,
  // input and a-priori vector memories (shared read address)
  output logic             in_re_o,
  output logic [AW-1:0]    in_raddr_o,
  input  det_in_t          in_rdata_i,
  input  la_vec_t          la_rdata_i,
  // output vector memory
  output logic             out_we_o,
  output logic [AW-1:0]    out_waddr_o,
  output llr_vec_t         out_wdata_o,
  output logic             fin_o,
  // activity counters
  output logic [31:0]      stat_nodes_o,    // loop iterations (nodes examined)
  output logic [31:0]      stat_leaves_o,   // leaves inside the sphere
  output logic [31:0]      stat_prunes_o,   // pruned nodes / exhausted layers
  output logic [31:0]      stat_inserts_o,  // leaves that entered the tuple
  output logic [2:0]       active_o         // paths currently searching
);

  localparam int unsigned NP = P_PATHS;
  localparam int unsigned BW = 5;

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_INIT, S_RUN, S_DONE} pstate_e;
  typedef enum logic {M_LOAD, M_NEXT} mode_e;

  typedef struct packed {
    pstate_e                 st;
    mode_e                   mode;
    logic [LYW-1:0]          layer;
    logic [AW-1:0]           addr;
    sym_t    [NT-1:0]        x;       // chosen symbols
    metric_t [NT-1:0]        lup;     // lambda_(i+1) for each layer i
  } ctx_t;

  ctx_t    ctx  [NP];
  det_in_t din  [NP];
  la_vec_t la   [NP];

  // ---------------- phase counter and path of each phase ----------------
  logic [2:0] ph;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= '0;
    else        ph <= (ph == 3'(NP - 1)) ? '0 : ph + 1'b1;

  function automatic logic [PW-1:0] path_of(logic [2:0] phase_now, int unsigned k);
    int v;
    v = int'(phase_now) - int'(k);
    if (v < 0) v = v + NP;
    return PW'(v);
  endfunction

  logic [PW-1:0] p0, p2, p3, p4;
  always_comb begin
    p0 = path_of(ph, 0);
    p2 = path_of(ph, 2);
    p3 = path_of(ph, 3);
    p4 = path_of(ph, 4);
  end

  // ---------------- units ----------------
  // IRU (issued in phase 3, result in phase 0)
  logic            iru_v, iru_vo;
  logic [7:0]      iru_tag_o;
  logic [LYW-1:0]  iru_layer;
  sym_t [NT-1:0]   iru_x;
  cplx_t           iru_yo;

  iru #(.TAGW(8)) u_iru (
    .clk, .rst_n,
    .valid_i(iru_v), .tag_i(8'(p3)), .layer_i(iru_layer),
    .y_i(din[p3].y[iru_layer]), .r_row_i(din[p3].r[iru_layer]),
    .rinv_i(din[p3].rinv[iru_layer]), .x_i(iru_x),
    .valid_o(iru_vo), .tag_o(iru_tag_o), .y_o(iru_yo));

  // MCU (issued in phase 0, result in phase 2)
  logic             mcu_vo;
  logic [7:0]       mcu_tag_o;
  metric_t [SQ-1:0] mcu_cre, mcu_cim;
  lvl_t    [SQ-1:0] mcu_lre, mcu_lim;
  la_t     [L-1:0]  mcu_la;

  always_comb
    for (int j = 0; j < L; j++) mcu_la[j] = la[p0][int'(ctx[p0].layer) * L + j];

  qmc_mcu #(.TAGW(8)) u_mcu (
    .clk, .rst_n,
    .valid_i(iru_vo && ctx[p0].st == S_RUN), .tag_i(8'(p0)),
    .y_i(iru_yo), .rdiag_i(din[p0].rdiag[ctx[p0].layer]), .la_i(mcu_la),
    .valid_o(mcu_vo), .tag_o(mcu_tag_o),
    .comp_re_o(mcu_cre), .lvl_re_o(mcu_lre), .comp_im_o(mcu_cim), .lvl_im_o(mcu_lim));

  // The units carry the issuing path's index as a tag; a result must come
  // back exactly when its path reaches the phase that consumes it.
  // (rst_n is sampled here only to disable the checks during reset; lint
  // reports this as a synchronous use of the asynchronous reset.)
  a_iru_tag: assert property (@(posedge clk) disable iff (!rst_n)
                              iru_vo |-> iru_tag_o == 8'(p0));
  a_mcu_tag: assert property (@(posedge clk) disable iff (!rst_n)
                              mcu_vo |-> mcu_tag_o == 8'(p2));

  // NEU (phase 2)
  logic             neu_load, neu_next;
  logic             h_v;
  metric_t          h_m, h_lup;
  sym_t             h_s;
  metric_t [SQ-1:0] h_cre, h_cim;
  lvl_t    [SQ-1:0] h_lre, h_lim;

  always_comb begin
    neu_load = (ctx[p2].st == S_RUN) && (ctx[p2].mode == M_LOAD) && mcu_vo;
    neu_next = (ctx[p2].st == S_RUN) && (ctx[p2].mode == M_NEXT);
  end

  sse_neu #(.NB(NP * NT), .BW(BW)) u_neu (
    .clk, .rst_n,
    .load_i(neu_load), .next_i(neu_next),
    .bank_i(BW'(int'(p2) * NT + int'(ctx[p2].layer))),
    .comp_re_i(mcu_cre), .lvl_re_i(mcu_lre), .comp_im_i(mcu_cim), .lvl_im_i(mcu_lim),
    .lam_up_i(ctx[p2].lup[ctx[p2].layer]),
    .head_valid_o(h_v), .head_metric_o(h_m), .head_sym_o(h_s),
    .comp_re_o(h_cre), .lvl_re_o(h_lre), .comp_im_o(h_cim), .lvl_im_o(h_lim),
    .lam_up_o(h_lup));

  // phase 2 -> phase 3 register
  typedef struct packed {
    logic             v;
    metric_t          m;
    sym_t             s;
    metric_t          lup;
    metric_t [SQ-1:0] cre;
    lvl_t    [SQ-1:0] lre;
    metric_t [SQ-1:0] cim;
    lvl_t    [SQ-1:0] lim;
  } node_t;
  node_t nd;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) nd <= '0;
    else nd <= '{v: h_v, m: h_m, s: h_s, lup: h_lup,
                 cre: h_cre, lre: h_lre, cim: h_cim, lim: h_lim};

  // Radius unit and SOCU (phase 3 updates, phase 4 LLR read)
  metric_t radius;
  metric_t [T-1:0] tuple_unused;
  logic    run3, in_sphere, is_leaf, do_clear;
  bits_t   pbits;

  always_comb begin
    run3     = (ctx[p3].st == S_RUN);
    in_sphere   = nd.v && (nd.m <= radius);
    is_leaf  = (ctx[p3].layer == '0);
    do_clear = (ctx[p3].st == S_INIT);
    pbits    = '0;
    for (int j = 1; j < NT; j++) pbits[j*L +: L] = sym_bits(ctx[p3].x[j]);
  end

  radius_unit #(.T(T), .P(NP)) u_radius (
    .clk, .rst_n,
    .clear_i(do_clear), .clr_path_i(p3),
    .ins_i(run3 && in_sphere && is_leaf), .ins_path_i(p3), .ins_metric_i(nd.m),
    .rd_path_i(p3), .radius_o(radius), .tuple_o(tuple_unused));

  llr_vec_t llr;
  socu #(.P(NP)) u_socu (
    .clk, .rst_n,
    .clear_i(do_clear), .clr_path_i(p3),
    .upd_i(run3 && in_sphere && is_leaf), .upd_path_i(p3),
    .path_bits_i(pbits), .leaf_sym_i(nd.s), .leaf_metric_i(nd.m), .lam_up_i(nd.lup),
    .comp_re_i(nd.cre), .lvl_re_i(nd.lre), .comp_im_i(nd.cim), .lvl_im_i(nd.lim),
    .rd_path_i(p4), .llr_o(llr));

  // ---------------- phase 3: tree layer update and IRU issue ----------------
  ctx_t c3n;
  always_comb begin
    c3n       = ctx[p3];
    iru_v     = 1'b0;
    iru_layer = ctx[p3].layer;
    if (ctx[p3].st == S_INIT) begin
      c3n.st              = S_RUN;
      c3n.mode            = M_LOAD;
      c3n.layer           = LYW'(NT - 1);
      c3n.lup[NT-1]       = '0;
      iru_v               = 1'b1;
      iru_layer           = LYW'(NT - 1);
    end else if (run3) begin
      if (in_sphere && is_leaf) begin
        c3n.mode = M_NEXT;
      end else if (in_sphere) begin
        c3n.x[ctx[p3].layer]        = nd.s;
        c3n.lup[ctx[p3].layer - 1'b1] = nd.m;
        c3n.layer                   = ctx[p3].layer - 1'b1;
        c3n.mode                    = M_LOAD;
        iru_v                       = 1'b1;
        iru_layer                   = ctx[p3].layer - 1'b1;
      end else if (ctx[p3].layer == LYW'(NT - 1)) begin
        c3n.st = S_DONE;
      end else begin
        c3n.layer = ctx[p3].layer + 1'b1;
        c3n.mode  = M_NEXT;
      end
    end
    iru_x = c3n.x;
  end

  // ---------------- phase 4: result write-back and work request ----------------
  logic idle4, done4;
  always_comb begin
    idle4       = (ctx[p4].st == S_IDLE) || (ctx[p4].st == S_DONE);
    done4       = (ctx[p4].st == S_DONE);
    req_o       = idle4;
    in_re_o     = idle4 && grant_i;
    in_raddr_o  = addr_i;
    out_we_o    = done4;
    out_waddr_o = ctx[p4].addr;
    out_wdata_o = llr;
    fin_o       = done4;
  end

  // ---------------- context registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        ctx[p] <= '{st: S_IDLE, mode: M_LOAD, layer: '0, addr: '0, x: '0, lup: '0};
        din[p] <= '0;
        la[p]  <= '0;
      end
    end else begin
      // phase 0: capture fetched input data
      if (ctx[p0].st == S_FETCH) begin
        din[p0]    <= in_rdata_i;
        la[p0]     <= la_rdata_i;
        ctx[p0].st <= S_INIT;
      end
      // phase 3
      ctx[p3] <= c3n;
      // phase 4
      if (idle4) begin
        if (grant_i) begin
          ctx[p4].st   <= S_FETCH;
          ctx[p4].addr <= addr_i;
        end else begin
          ctx[p4].st   <= S_IDLE;
        end
      end
    end
  end

  // ---------------- counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_nodes_o   <= '0;
      stat_leaves_o  <= '0;
      stat_prunes_o  <= '0;
      stat_inserts_o <= '0;
    end else if (run3) begin
      stat_nodes_o <= stat_nodes_o + 1;
      if (in_sphere && is_leaf) stat_leaves_o <= stat_leaves_o + 1;
      if (!in_sphere)           stat_prunes_o <= stat_prunes_o + 1;
      if (in_sphere && is_leaf && nd.m < radius) stat_inserts_o <= stat_inserts_o + 1;
    end
  end

  always_comb begin
    active_o = '0;
    for (int p = 0; p < NP; p++)
      if (ctx[p].st == S_RUN || ctx[p].st == S_INIT || ctx[p].st == S_FETCH)
        active_o = active_o + 1'b1;
  end

endmodule
