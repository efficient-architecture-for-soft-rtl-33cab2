// tb_sse_neu: node enumeration unit.
//  1. The 4x4 example of the smart-sorting enumeration (components about
//     0.05, 0.43, 1.26, 2.38 and 0.06, 0.42, 1.27, 2.36, given here to four
//     decimals so that every sum rounds to the example's two-decimal value,
//     padded with large values to 8x8): the first 11 nodes must come out in ascending order
//     ending with 2.53 at sorted position (2,2), followed by 2.79 (1,3) and
//     2.80 (3,1).
//  2. Random sorted components: LOAD then 63 NEXT must give all 64 symbols
//     exactly once, in non-decreasing metric order, each with metric
//     lambda^R + lambda^I + lambda_(i+1); then the unit reports no node.
//  3. Two banks enumerated alternately must not disturb each other.
module tb_sse_neu;
  import tsd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load_i, next_i;
  logic [4:0] bank_i;
  metric_t [SQ-1:0] comp_re_i, comp_im_i, comp_re_o, comp_im_o;
  lvl_t [SQ-1:0] lvl_re_i, lvl_im_i, lvl_re_o, lvl_im_o;
  metric_t lam_up_i, lam_up_o, head_metric_o;
  logic head_valid_o;
  sym_t head_sym_o;
  int checks = 0, failures = 0;

  sse_neu #(.NB(20), .BW(5)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", s); end
  endtask

  // one operation; returns the node shown after it
  task automatic op(bit ld, bit nx, int bank, output bit v, output longint m, output sym_t s);
    @(negedge clk);
    load_i = ld; next_i = nx; bank_i = 5'(bank);
    #1;
    v = head_valid_o; m = longint'(head_metric_o); s = head_sym_o;
    @(negedge clk);
    load_i = 0; next_i = 0;
  endtask

  // per-bank test data
  longint cr [2][SQ], ci [2][SQ];
  int     lr [2][SQ], li [2][SQ];
  longint lup [2];

  task automatic make_random(int b);
    int perm_r [SQ], perm_i [SQ];
    for (int k = 0; k < SQ; k++) begin perm_r[k] = k; perm_i[k] = k; end
    perm_r.shuffle(); perm_i.shuffle();
    cr[b][0] = longint'($urandom_range(0, 300));
    ci[b][0] = longint'($urandom_range(0, 300));
    for (int k = 1; k < SQ; k++) begin
      cr[b][k] = cr[b][k-1] + longint'($urandom_range(0, 900));
      ci[b][k] = ci[b][k-1] + longint'($urandom_range(0, 900));
    end
    for (int k = 0; k < SQ; k++) begin lr[b][k] = perm_r[k]; li[b][k] = perm_i[k]; end
    lup[b] = longint'($urandom_range(0, 5000));
  endtask

  task automatic drive_load(int b);
    for (int k = 0; k < SQ; k++) begin
      comp_re_i[k] = metric_t'(cr[b][k]); comp_im_i[k] = metric_t'(ci[b][k]);
      lvl_re_i[k]  = lvl_t'(lr[b][k]);    lvl_im_i[k]  = lvl_t'(li[b][k]);
    end
    lam_up_i = metric_t'(lup[b]);
  endtask

  // metric of a symbol (given by levels) in bank b
  function automatic longint sym_metric(int b, sym_t s);
    longint a, c;
    a = -1; c = -1;
    for (int k = 0; k < SQ; k++) begin
      if (lr[b][k] == int'(s.re)) a = cr[b][k];
      if (li[b][k] == int'(s.im)) c = ci[b][k];
    end
    return a + c + lup[b];
  endfunction

  initial begin
    bit v; longint m; sym_t s;
    load_i = 0; next_i = 0; bank_i = 0; comp_re_i = '0; comp_im_i = '0;
    lvl_re_i = '0; lvl_im_i = '0; lam_up_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- 1. the 4x4 example ----
    begin
      longint er [SQ], ei [SQ];
      longint seq [13];
      int     spr [13], spi [13];
      // components in 1/10000, chosen so that they and all matrix entries
      // round to the printed two-decimal values
      er = '{549, 4310, 12560, 23820, 100000, 100001, 100002, 100003};
      ei = '{550, 4220, 12695, 23620, 100000, 100001, 100002, 100003};
      seq = '{11, 48, 49, 85, 131, 132, 168, 170, 242, 244, 253, 279, 280};
      spr = '{0, 0, 1, 1, 2, 0, 2, 1, 0, 3, 2, 1, 3};
      spi = '{0, 1, 0, 1, 0, 2, 1, 2, 3, 0, 2, 3, 1};
      for (int k = 0; k < SQ; k++) begin
        cr[0][k] = er[k]; ci[0][k] = ei[k]; lr[0][k] = k; li[0][k] = k;
      end
      lup[0] = 0;
      drive_load(0);
      for (int n = 0; n < 13; n++) begin
        op(n == 0, n != 0, 3, v, m, s);
        check(v && (m + 50) / 100 == seq[n] && int'(s.re) == spr[n] && int'(s.im) == spi[n],
              $sformatf("example node %0d: %0d at (%0d,%0d), expected %0d at (%0d,%0d)",
                        n, m, s.re, s.im, seq[n], spr[n], spi[n]));
      end
    end

    // ---- 2./3. random, two banks alternately ----
    for (int t = 0; t < 40; t++) begin
      bit     seen [2][64];
      longint last [2];
      int     bk [2];
      bk[0] = int'($urandom_range(0, 9));
      bk[1] = bk[0] + 10;
      for (int b = 0; b < 2; b++) begin
        make_random(b);
        for (int n = 0; n < 64; n++) seen[b][n] = 0;
        last[b] = -1;
      end
      for (int n = 0; n < 65; n++) begin
        for (int b = 0; b < 2; b++) begin
          if (n == 0) drive_load(b);
          op(n == 0, n != 0, bk[b], v, m, s);
          if (n < 64) begin
            int id;
            id = int'(s.re) * 8 + int'(s.im);
            check(v, $sformatf("node %0d missing", n));
            check(!seen[b][id], $sformatf("symbol %0d repeated", id));
            check(m >= last[b], $sformatf("order broken at node %0d: %0d after %0d", n, m, last[b]));
            check(m == sym_metric(b, s), $sformatf("metric of node %0d: %0d expected %0d", n, m, sym_metric(b, s)));
            seen[b][id] = 1;
            last[b] = m;
          end else begin
            check(!v, "node reported after all 64 symbols");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
