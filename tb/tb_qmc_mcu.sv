// tb_qmc_mcu: random normalised received values, channel gains and a-priori
// values are streamed into the metric computation unit, one per cycle. For
// each input the 8 real and 8 imaginary components are recomputed from the
// formula (r_ii^2 * distance^2 + a-priori penalty), sorted, and compared with
// the unit's sorted output and level indices, which must appear exactly two
// cycles after the input (checked through the tag).
module tb_qmc_mcu;
  import tsd_pkg::*;
  import tsd_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid_i, valid_o;
  logic [7:0] tag_i, tag_o;
  cplx_t y_i;
  data_t rdiag_i;
  la_t [L-1:0] la_i;
  metric_t [SQ-1:0] comp_re_o, comp_im_o;
  lvl_t [SQ-1:0] lvl_re_o, lvl_im_o;
  int checks = 0, failures = 0;

  qmc_mcu #(.TAGW(8)) dut (.*);

  longint exp_m [256][2][SQ];
  int     exp_l [256][2][SQ];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected sorted components for one input
  task automatic expect_for(int tag, cplx_t y, data_t rd, la_t [L-1:0] la);
    for (int d = 0; d < 2; d++) begin
      longint m [SQ];
      int     id [SQ];
      for (int k = 0; k < SQ; k++) begin
        longint yc;
        yc = (d == 0) ? longint'(y.re) : longint'(y.im);
        m[k]  = msat(eucl(yc, k, longint'(rd)) +
                     apen(k, la[3*d], la[3*d+1], la[3*d+2]));
        id[k] = k;
      end
      for (int a = 0; a < SQ; a++)
        for (int b = a + 1; b < SQ; b++)
          if (m[id[b]] < m[id[a]] || (m[id[b]] == m[id[a]] && id[b] < id[a])) begin
            int t; t = id[a]; id[a] = id[b]; id[b] = t;
          end
      for (int k = 0; k < SQ; k++) begin
        exp_m[tag][d][k] = m[id[k]];
        exp_l[tag][d][k] = id[k];
      end
    end
  endtask

  int sent = 0, got = 0;
  int sent_cycle [256];
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && valid_o) begin
    int t;
    t = int'(tag_o);
    checks++;
    if (cyc - sent_cycle[t] != 2) begin
      failures++;
      $display("FAIL latency %0d", cyc - sent_cycle[t]);
    end
    for (int k = 0; k < SQ; k++) begin
      checks++;
      if (longint'(comp_re_o[k]) != exp_m[t][0][k] || int'(lvl_re_o[k]) != exp_l[t][0][k] ||
          longint'(comp_im_o[k]) != exp_m[t][1][k] || int'(lvl_im_o[k]) != exp_l[t][1][k]) begin
        failures++;
        if (failures < 10)
          $display("FAIL tag %0d pos %0d: re %0d/%0d exp %0d/%0d, im %0d/%0d exp %0d/%0d", t, k,
                   comp_re_o[k], lvl_re_o[k], exp_m[t][0][k], exp_l[t][0][k],
                   comp_im_o[k], lvl_im_o[k], exp_m[t][1][k], exp_l[t][1][k]);
      end
    end
    got++;
  end

  initial begin
    valid_i = 0; tag_i = 0; y_i = '0; rdiag_i = '0; la_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      valid_i = ($urandom_range(0, 3) != 0);
      if (valid_i) begin
        y_i.re  = data_t'(int'($urandom_range(0, 5000)) - 2500);
        y_i.im  = data_t'(int'($urandom_range(0, 5000)) - 2500);
        rdiag_i = data_t'($urandom_range(64, 768));
        for (int j = 0; j < L; j++)
          la_i[j] = (n % 3 == 0) ? '0 : la_t'(int'($urandom_range(0, 255)) - 128);
        tag_i = 8'(sent);
        expect_for(sent % 256, y_i, rdiag_i, la_i);
        sent_cycle[sent % 256] = cyc;
        sent++;
      end
    end
    @(negedge clk);
    valid_i = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (got != sent) begin failures++; $display("FAIL %0d results for %0d inputs", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
