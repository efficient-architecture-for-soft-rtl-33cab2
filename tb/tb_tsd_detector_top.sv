// tb_tsd_detector_top: end-to-end test of the detector at its default sizes.
//
// Generates random 4x4 channels, 64-QAM vectors with small noise and a-priori
// values of several qualities (none, mostly right, partly wrong), writes them
// into the vector memories, runs the detector and compares every LLR with the
// reference model (full 64-symbol sort per layer, brute-force
// counter-hypotheses). Also checks:
//   * LLR signs against the transmitted bits for the vectors without a-priori
//     values (noise is far below the decision distance, so every hard decision
//     must be right; wrong a-priori values may legitimately flip decisions);
//   * node, leaf, prune and tuple-insert counts against the reference;
//   * the 5-cycle loop: a single detection takes 5 cycles per examined node
//     plus a fixed start-up/write-back overhead;
//   * that five detections are in flight at once (pipeline interleaving), that
//     backtracking, pruning, leaves, tuple insertions and early radius-driven
//     termination all occur.
module tb_tsd_detector_top;
  import tsd_pkg::*;
  import tsd_ref_pkg::*;

  localparam int unsigned DEPTH = 768;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned CW    = AW + 1;
  localparam int NVEC = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          vin_we, vla_we, vout_re, start;
  logic [AW-1:0] vin_waddr, vla_waddr, vout_raddr, base;
  det_in_t       vin_wdata;
  la_vec_t       vla_wdata;
  llr_vec_t      vout_rdata;
  logic [CW-1:0] count;
  logic          busy, done;
  logic [31:0]   s_nodes, s_leaves, s_prunes, s_inserts;
  logic [2:0]    active;

  tsd_detector_top dut (
    .clk, .rst_n,
    .vin_we_i(vin_we), .vin_waddr_i(vin_waddr), .vin_wdata_i(vin_wdata),
    .vla_we_i(vla_we), .vla_waddr_i(vla_waddr), .vla_wdata_i(vla_wdata),
    .vout_re_i(vout_re), .vout_raddr_i(vout_raddr), .vout_rdata_o(vout_rdata),
    .start_i(start), .base_i(base), .count_i(count), .busy_o(busy), .done_o(done),
    .stat_nodes_o(s_nodes), .stat_leaves_o(s_leaves), .stat_prunes_o(s_prunes),
    .stat_inserts_o(s_inserts), .active_o(active));

  int checks = 0, failures = 0;
  int max_active = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (int'(active) > max_active) max_active = int'(active);

  // watchdog
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ref_res_t exp_res [NVEC];
  int       txr [NVEC][NT], txi [NVEC][NT];

  task automatic run(int b, int n, output int cycles);
    @(negedge clk);
    start = 1'b1; base = AW'(b); count = CW'(n);
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    int tot_nodes, tot_leaves, tot_prunes, tot_inserts, backtracks;
    vin_we = 0; vla_we = 0; vout_re = 0; start = 0;
    vin_waddr = '0; vla_waddr = '0; vout_raddr = '0; base = '0; count = '0;
    vin_wdata = '0; vla_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- build the vectors and their expected results ----
    for (int v = 0; v < NVEC; v++) begin
      int t_r [NT], t_i [NT];
      det_in_t d;
      la_vec_t a;
      for (int i = 0; i < NT; i++) begin
        t_r[i] = int'($urandom_range(0, 7));
        t_i[i] = int'($urandom_range(0, 7));
        txr[v][i] = t_r[i];
        txi[v][i] = t_i[i];
      end
      d = gen_input(t_r, t_i, 40);
      case (v % 3)
        0: a = gen_la(t_r, t_i, 0, 100);
        1: a = gen_la(t_r, t_i, 100, 90);
        default: a = gen_la(t_r, t_i, 40, 60);
      endcase
      exp_res[v] = detect(d, a);
      @(negedge clk);
      vin_we = 1; vin_waddr = AW'(v + 100); vin_wdata = d;
      vla_we = 1; vla_waddr = AW'(v + 100); vla_wdata = a;
    end
    @(negedge clk);
    vin_we = 0; vla_we = 0;

    // ---- one detection alone: 5 cycles per node ----
    run(100, 1, cyc);
    $display("single detection: %0d nodes (ref leaves %0d prunes %0d ins %0d), %0d cycles; dut nodes %0d leaves %0d prunes %0d ins %0d",
             exp_res[0].nodes, exp_res[0].leaves, exp_res[0].prunes, exp_res[0].inserts, cyc, s_nodes, s_leaves, s_prunes, s_inserts);
    check(cyc >= 5 * exp_res[0].nodes && cyc <= 5 * exp_res[0].nodes + 12,
          $sformatf("single detection took %0d cycles for %0d nodes", cyc, exp_res[0].nodes));
    check(int'(s_nodes) == exp_res[0].nodes, "node count of single detection");

    // ---- all vectors, interleaved ----
    run(100, NVEC, cyc);
    tot_nodes = 0; tot_leaves = 0; tot_prunes = 0; tot_inserts = 0;
    for (int v = 0; v < NVEC; v++) begin
      tot_nodes   += exp_res[v].nodes;
      tot_leaves  += exp_res[v].leaves;
      tot_prunes  += exp_res[v].prunes;
      tot_inserts += exp_res[v].inserts;
    end
    $display("batch: %0d nodes, %0d cycles, max active paths %0d",
             tot_nodes, cyc, max_active);
    check(int'(s_nodes)   == tot_nodes + exp_res[0].nodes,     "total node count");
    check(int'(s_leaves)  == tot_leaves + exp_res[0].leaves,   "total leaf count");
    check(int'(s_prunes)  == tot_prunes + exp_res[0].prunes,   "total prune count");
    check(int'(s_inserts) == tot_inserts + exp_res[0].inserts, "total tuple insert count");
    check(cyc < 5 * tot_nodes / 2, "interleaving gives more than twice the single-path rate");

    // ---- read back and compare ----
    for (int v = 0; v < NVEC; v++) begin
      @(negedge clk);
      vout_re = 1; vout_raddr = AW'(v + 100);
      @(negedge clk);
      vout_re = 0;
      for (int b = 0; b < NBITS; b++) begin
        check(longint'(signed'(vout_rdata[b])) == exp_res[v].llr[b],
              $sformatf("vec %0d bit %0d: llr %0d expected %0d", v, b, signed'(vout_rdata[b]), exp_res[v].llr[b]));
        if (v % 3 == 0)   // without a-priori values every hard decision must be right
          check((signed'(vout_rdata[b]) > 0) == (tx_bit(txr[v], txi[v], b) == 1),
                $sformatf("vec %0d bit %0d: hard decision wrong", v, b));
      end
    end

    // ---- mechanisms ----
    backtracks = tot_prunes - NVEC;    // prunes that were not the final one
    $display("mechanisms: interleaved paths=%0d leaves=%0d prunes=%0d backtracks=%0d inserts=%0d",
             max_active, tot_leaves, tot_prunes, backtracks, tot_inserts);
    check(max_active == P_PATHS, "five detection paths in flight at once");
    check(tot_leaves > 0, "leaves reached");
    check(backtracks > 0, "backtracking to parent layers happened");
    check(tot_inserts > NVEC * T_TUPLE, "radius shrank after the tuple was full");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
