// tb_socu: soft-output unit. Random leaf events (sorted leaf-layer components,
// a leaf node, upper-layer bits and metric) are applied to random paths, with
// occasional clears. A behavioural model keeps, per path, bit and bit value,
// the smallest metric among the leaf and, for every bit of the leaf symbol,
// the best of all 64 leaf siblings having that bit flipped (found by brute
// force). The LLRs of a random path are compared after every event, which also
// covers clipping (a bit value never seen gives +-32767).
module tb_socu;
  import tsd_pkg::*;
  import tsd_ref_pkg::*;
  localparam int P = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear_i, upd_i;
  logic [PW-1:0] clr_path_i, upd_path_i, rd_path_i;
  bits_t path_bits_i;
  sym_t leaf_sym_i;
  metric_t leaf_metric_i, lam_up_i;
  metric_t [SQ-1:0] comp_re_i, comp_im_i;
  lvl_t [SQ-1:0] lvl_re_i, lvl_im_i;
  llr_vec_t llr_o;
  int checks = 0, failures = 0;
  longint tbl [P][NBITS][2];

  socu #(.P(P)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sbit(int lr, int li, int j);
    return (j < 3) ? gbit(lr, j) : gbit(li, j - 3);
  endfunction

  initial begin
    int clips = 0;
    clear_i = 0; upd_i = 0; clr_path_i = 0; upd_path_i = 0; rd_path_i = 0;
    path_bits_i = '0; leaf_sym_i = '0; leaf_metric_i = '0; lam_up_i = '0;
    comp_re_i = '0; comp_im_i = '0; lvl_re_i = '0; lvl_im_i = '0;
    foreach (tbl[p, b]) begin tbl[p][b][0] = MINF; tbl[p][b][1] = MINF; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      int p;
      p = int'($urandom_range(0, P - 1));
      @(negedge clk);
      if ($urandom_range(0, 29) == 0) begin
        clear_i = 1; clr_path_i = PW'(p);
        foreach (tbl[p][b]) begin tbl[p][b][0] = MINF; tbl[p][b][1] = MINF; end
      end else begin
        longint cr [SQ], ci [SQ], lup;
        int pr [SQ], pi [SQ], a, c;
        bits_t pb;
        for (int k = 0; k < SQ; k++) begin pr[k] = k; pi[k] = k; end
        pr.shuffle(); pi.shuffle();
        cr[0] = longint'($urandom_range(0, 500));
        ci[0] = longint'($urandom_range(0, 500));
        for (int k = 1; k < SQ; k++) begin
          cr[k] = cr[k-1] + 1 + longint'($urandom_range(0, 2000));
          ci[k] = ci[k-1] + 1 + longint'($urandom_range(0, 2000));
        end
        lup = longint'($urandom_range(0, 3000));
        a = int'($urandom_range(0, 2));
        c = int'($urandom_range(0, 2));
        for (int w = 0; w < NBITS; w++) pb[w] = 1'($urandom_range(0, 1));
        for (int k = 0; k < SQ; k++) begin
          comp_re_i[k] = metric_t'(cr[k]); comp_im_i[k] = metric_t'(ci[k]);
          lvl_re_i[k] = lvl_t'(pr[k]);     lvl_im_i[k] = lvl_t'(pi[k]);
        end
        lam_up_i = metric_t'(lup);
        leaf_sym_i.re = lvl_t'(pr[a]);
        leaf_sym_i.im = lvl_t'(pi[c]);
        leaf_metric_i = metric_t'(cr[a] + ci[c] + lup);
        path_bits_i = pb;
        upd_i = 1; upd_path_i = PW'(p);
        // model: the leaf and its best flipped siblings
        for (int j = -1; j < int'(L); j++) begin
          longint cm;
          int br, bi;
          bits_t cb;
          if (j < 0) begin
            cm = cr[a] + ci[c] + lup; br = pr[a]; bi = pi[c];
          end else begin
            cm = MINF + 1; br = 0; bi = 0;
            for (int u = 0; u < SQ; u++)
              for (int v = 0; v < SQ; v++)
                if (sbit(pr[u], pi[v], j) != sbit(pr[a], pi[c], j) && cr[u] + ci[v] + lup < cm) begin
                  cm = cr[u] + ci[v] + lup; br = pr[u]; bi = pi[v];
                end
          end
          cb = pb;
          for (int q = 0; q < int'(L); q++) cb[q] = 1'(sbit(br, bi, q));
          for (int w = 0; w < NBITS; w++)
            if (cm < tbl[p][w][cb[w]]) tbl[p][w][cb[w]] = cm;
        end
      end
      @(negedge clk);
      clear_i = 0; upd_i = 0;
      rd_path_i = PW'($urandom_range(0, P - 1));
      #1;
      for (int w = 0; w < NBITS; w++) begin
        longint d;
        d = tbl[rd_path_i][w][0] - tbl[rd_path_i][w][1];
        if (d > 32767) d = 32767;
        if (d < -32767) d = -32767;
        if (d == 32767 || d == -32767) clips++;
        checks++;
        if (longint'(signed'(llr_o[w])) != d) begin
          failures++;
          if (failures < 10) $display("FAIL path %0d bit %0d: %0d expected %0d", rd_path_i, w, signed'(llr_o[w]), d);
        end
      end
    end
    checks++;
    if (clips == 0) begin failures++; $display("FAIL clipping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
