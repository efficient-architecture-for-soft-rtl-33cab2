// tb_tsd_tuple_sweep: the detector at the tuple sizes of the throughput study
// (T = 1, 2, 4, 16, 32, 64, 256, 512; T = 8 is the default and is covered by
// the end-to-end test), in the non-iterative case (no a-priori values).
//
// One detector per tuple size, all fed the same random vectors through shared
// host write ports and started together. Each one's LLRs are compared bit-exactly
// with the reference model run at the same T, and its node count with the
// reference. Also checked: the node count never falls as T grows (a larger
// tuple keeps a larger radius), and every detector finishes within 5 cycles
// per node. The cycles and the resulting bits per cycle are printed for each T.
module tb_tsd_tuple_sweep;
  import tsd_pkg::*;
  import tsd_ref_pkg::*;

  localparam int NT_SIZES = 8;
  localparam int unsigned TS [NT_SIZES] = '{1, 2, 4, 16, 32, 64, 256, 512};
  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW = $clog2(DEPTH), CW = AW + 1;
  localparam int NV = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          vin_we = 0, vla_we = 0, vout_re = 0, start = 0;
  logic [AW-1:0] vin_waddr = '0, vla_waddr = '0, vout_raddr = '0;
  det_in_t       vin_wdata = '0;
  la_vec_t       vla_wdata = '0;
  llr_vec_t      vout_rdata [NT_SIZES];
  logic          busy [NT_SIZES], done [NT_SIZES];
  logic [31:0]   s_nodes [NT_SIZES];

  for (genvar g = 0; g < NT_SIZES; g++) begin : g_det
    logic [31:0] s_leaves, s_prunes, s_inserts;
    logic [2:0]  active;
    tsd_detector_top #(.DEPTH(DEPTH), .T(TS[g])) dut (
      .clk, .rst_n,
      .vin_we_i(vin_we), .vin_waddr_i(vin_waddr), .vin_wdata_i(vin_wdata),
      .vla_we_i(vla_we), .vla_waddr_i(vla_waddr), .vla_wdata_i(vla_wdata),
      .vout_re_i(vout_re), .vout_raddr_i(vout_raddr), .vout_rdata_o(vout_rdata[g]),
      .start_i(start), .base_i(AW'(0)), .count_i(CW'(NV)), .busy_o(busy[g]), .done_o(done[g]),
      .stat_nodes_o(s_nodes[g]), .stat_leaves_o(s_leaves), .stat_prunes_o(s_prunes),
      .stat_inserts_o(s_inserts), .active_o(active));
  end

  int checks = 0, failures = 0;
  int cycles [NT_SIZES];
  bit finished [NT_SIZES];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ref_res_t exp_res [NT_SIZES][NV];

  initial begin
    int cyc, prev_nodes;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NV; v++) begin
      int t_r [NT], t_i [NT];
      det_in_t d;
      la_vec_t a;
      for (int i = 0; i < NT; i++) begin
        t_r[i] = int'($urandom_range(0, 7));
        t_i[i] = int'($urandom_range(0, 7));
      end
      d = gen_input(t_r, t_i, 120);
      a = gen_la(t_r, t_i, 0, 100);
      for (int g = 0; g < NT_SIZES; g++) exp_res[g][v] = detect(d, a, int'(TS[g]));
      @(negedge clk);
      vin_we = 1; vin_waddr = AW'(v); vin_wdata = d;
      vla_we = 1; vla_waddr = AW'(v); vla_wdata = a;
    end
    @(negedge clk);
    vin_we = 0; vla_we = 0;

    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    foreach (finished[g]) finished[g] = 0;
    while (1) begin
      bit all;
      all = 1;
      for (int g = 0; g < NT_SIZES; g++) begin
        if (done[g] && !finished[g]) begin finished[g] = 1; cycles[g] = cyc; end
        all &= finished[g];
      end
      if (all) break;
      @(negedge clk);
      cyc++;
    end

    prev_nodes = 0;
    for (int g = 0; g < NT_SIZES; g++) begin
      int tn;
      tn = 0;
      for (int v = 0; v < NV; v++) tn += exp_res[g][v].nodes;
      $display("T = %0d: %0d nodes, %0d cycles, %0d bits per 1000 cycles", TS[g], tn, cycles[g],
               (NV * NBITS * 1000) / cycles[g]);
      check(int'(s_nodes[g]) == tn, $sformatf("T=%0d node count %0d expected %0d", TS[g], s_nodes[g], tn));
      check(tn >= prev_nodes, $sformatf("T=%0d node count below that of the smaller tuple", TS[g]));
      check(cycles[g] <= 5 * tn + 20, $sformatf("T=%0d took %0d cycles for %0d nodes", TS[g], cycles[g], tn));
      prev_nodes = tn;
    end

    for (int v = 0; v < NV; v++) begin
      @(negedge clk);
      vout_re = 1; vout_raddr = AW'(v);
      @(negedge clk);
      vout_re = 0;
      for (int g = 0; g < NT_SIZES; g++)
        for (int b = 0; b < NBITS; b++)
          check(longint'(signed'(vout_rdata[g][b])) == exp_res[g][v].llr[b],
                $sformatf("T=%0d vec %0d bit %0d: llr %0d expected %0d", TS[g], v, b,
                          signed'(vout_rdata[g][b]), exp_res[g][v].llr[b]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
