// tb_iru: random rows of R, received values, chosen symbols and layers are
// streamed into the interference reduction unit; each result is compared with
// y''' = (y'_i - sum_{j>i} r_ij x_j) / r_ii computed from the formula (with the
// same rounding of the reciprocal), two cycles after the input.
module tb_iru;
  import tsd_pkg::*;
  import tsd_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid_i, valid_o;
  logic [7:0] tag_i, tag_o;
  logic [LYW-1:0] layer_i;
  cplx_t y_i, y_o;
  cplx_t [NT-1:0] r_row_i;
  data_t rinv_i;
  sym_t [NT-1:0] x_i;
  int checks = 0, failures = 0;
  longint exp_re [256], exp_im [256];
  int sent_cycle [256];
  int cyc = 0, sent = 0, got = 0;
  always @(posedge clk) cyc++;

  iru #(.TAGW(8)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && valid_o) begin
    int t;
    t = int'(tag_o);
    checks++;
    if (cyc - sent_cycle[t] != 2 || longint'(y_o.re) != exp_re[t] || longint'(y_o.im) != exp_im[t]) begin
      failures++;
      if (failures < 10) $display("FAIL tag %0d: %0d,%0d expected %0d,%0d (latency %0d)",
                                  t, y_o.re, y_o.im, exp_re[t], exp_im[t], cyc - sent_cycle[t]);
    end
    got++;
  end

  initial begin
    valid_i = 0; tag_i = 0; layer_i = 0; y_i = '0; r_row_i = '0; rinv_i = '0; x_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      valid_i = ($urandom_range(0, 3) != 0);
      if (valid_i) begin
        longint ar, ai, rd;
        int ly;
        ly = int'($urandom_range(0, NT - 1));
        layer_i = LYW'(ly);
        y_i.re = data_t'(int'($urandom_range(0, 16000)) - 8000);
        y_i.im = data_t'(int'($urandom_range(0, 16000)) - 8000);
        rd = longint'($urandom_range(64, 1024));
        rinv_i = data_t'(65536 / rd);
        ar = longint'(y_i.re);
        ai = longint'(y_i.im);
        for (int j = 0; j < NT; j++) begin
          r_row_i[j].re = data_t'(int'($urandom_range(0, 512)) - 256);
          r_row_i[j].im = data_t'(int'($urandom_range(0, 512)) - 256);
          x_i[j].re = lvl_t'($urandom_range(0, 7));
          x_i[j].im = lvl_t'($urandom_range(0, 7));
          if (j > ly) begin
            // (a + jb)(c + jd) with c, d the symbol levels
            ar -= longint'(r_row_i[j].re) * lv(int'(x_i[j].re)) - longint'(r_row_i[j].im) * lv(int'(x_i[j].im));
            ai -= longint'(r_row_i[j].re) * lv(int'(x_i[j].im)) + longint'(r_row_i[j].im) * lv(int'(x_i[j].re));
          end
        end
        exp_re[sent % 256] = dsat((dsat(ar) * longint'(rinv_i)) >>> 8);
        exp_im[sent % 256] = dsat((dsat(ai) * longint'(rinv_i)) >>> 8);
        tag_i = 8'(sent);
        sent_cycle[sent % 256] = cyc;
        sent++;
      end
    end
    @(negedge clk);
    valid_i = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (got != sent) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
