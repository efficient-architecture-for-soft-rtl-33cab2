// tb_tsd_core: detection core with behavioural memories and work hand-out.
// 20 random vectors (with and without a-priori values) are served to the core
// as its paths ask for work; every LLR vector written back is compared with the
// reference model, as are the node and leaf counts. Also checked: a path that
// finishes asks for the next vector in the same cycle as it writes its result
// (no idle slot while work remains), results go to the right addresses, and
// all five paths are busy at once.
module tb_tsd_core;
  import tsd_pkg::*;
  import tsd_ref_pkg::*;
  localparam int AW = 10, NV = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_o, grant_i, in_re_o, out_we_o, fin_o;
  logic [AW-1:0] addr_i, in_raddr_o, out_waddr_o;
  det_in_t in_rdata_i;
  la_vec_t la_rdata_i;
  llr_vec_t out_wdata_o;
  logic [31:0] stat_nodes_o, stat_leaves_o, stat_prunes_o, stat_inserts_o;
  logic [2:0] active_o;
  int checks = 0, failures = 0;

  tsd_core #(.AW(AW)) dut (.*);

  det_in_t  din [NV];
  la_vec_t  las [NV];
  ref_res_t res [NV];
  bit       written [NV];
  int       next_job = 0, done_cnt = 0, max_active = 0;

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // work hand-out and memories
  always_comb begin
    grant_i = req_o && (next_job < NV);
    addr_i  = AW'(next_job + 40);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_re_o) begin
        in_rdata_i <= din[int'(in_raddr_o) - 40];
        la_rdata_i <= las[int'(in_raddr_o) - 40];
      end
      if (grant_i) next_job <= next_job + 1;
      if (fin_o) check(grant_i || next_job >= NV, "finished path did not take new work at once");
      if (out_we_o) begin
        int v;
        v = int'(out_waddr_o) - 40;
        check(v >= 0 && v < NV && !written[v], $sformatf("write to address %0d", out_waddr_o));
        if (v >= 0 && v < NV) begin
          written[v] = 1;
          for (int b = 0; b < NBITS; b++)
            check(longint'(signed'(out_wdata_o[b])) == res[v].llr[b],
                  $sformatf("vector %0d bit %0d: %0d expected %0d", v, b, signed'(out_wdata_o[b]), res[v].llr[b]));
        end
        done_cnt++;
      end
      if (int'(active_o) > max_active) max_active = int'(active_o);
    end
  end

  initial begin
    int tn, tl;
    in_rdata_i = '0; la_rdata_i = '0;
    for (int v = 0; v < NV; v++) begin
      int tr [NT], ti [NT];
      for (int i = 0; i < NT; i++) begin
        tr[i] = int'($urandom_range(0, 7));
        ti[i] = int'($urandom_range(0, 7));
      end
      din[v] = gen_input(tr, ti, 60);
      las[v] = (v % 2) ? gen_la(tr, ti, 80, 85) : gen_la(tr, ti, 0, 100);
      res[v] = detect(din[v], las[v]);
      written[v] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (done_cnt < NV) @(negedge clk);
    repeat (10) @(negedge clk);
    tn = 0; tl = 0;
    for (int v = 0; v < NV; v++) begin tn += res[v].nodes; tl += res[v].leaves; end
    check(int'(stat_nodes_o) == tn, $sformatf("nodes %0d expected %0d", stat_nodes_o, tn));
    check(int'(stat_leaves_o) == tl, $sformatf("leaves %0d expected %0d", stat_leaves_o, tl));
    check(max_active == P_PATHS, "all five paths busy at once");
    check(active_o == 0, "all paths idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
