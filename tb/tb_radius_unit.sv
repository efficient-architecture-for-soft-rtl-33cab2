// tb_radius_unit: random inserts and clears on the five path lists, compared
// with a behavioural sorted list per path; checks the radius (largest entry),
// the whole tuple, that the radius stays infinite until T leaves arrived, and
// that the paths do not disturb each other.
module tb_radius_unit;
  import tsd_pkg::*;
  localparam int T = 8, P = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear_i, ins_i;
  logic [PW-1:0] clr_path_i, ins_path_i, rd_path_i;
  metric_t ins_metric_i, radius_o;
  metric_t [T-1:0] tuple_o;
  int checks = 0, failures = 0;
  longint model [P][T];

  radius_unit #(.T(T), .P(P)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int p);
    rd_path_i = PW'(p);
    #1;
    for (int k = 0; k < T; k++) begin
      checks++;
      if (longint'(tuple_o[k]) != model[p][k]) begin
        failures++;
        if (failures < 10) $display("FAIL path %0d entry %0d: %0d expected %0d", p, k, tuple_o[k], model[p][k]);
      end
    end
    checks++;
    if (longint'(radius_o) != model[p][T-1]) failures++;
  endtask

  initial begin
    clear_i = 0; ins_i = 0; clr_path_i = 0; ins_path_i = 0; rd_path_i = 0; ins_metric_i = 0;
    foreach (model[p, k]) model[p][k] = longint'(M_INF);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // first T-1 inserts leave the radius infinite
    for (int k = 0; k < T - 1; k++) begin
      @(negedge clk);
      ins_i = 1; ins_path_i = 0; ins_metric_i = metric_t'(1000 - k * 7);
      @(negedge clk);
      ins_i = 0;
      begin
        int q; longint m;
        m = 1000 - k * 7; q = T - 1;
        while (q > 0 && model[0][q-1] > m) begin model[0][q] = model[0][q-1]; q--; end
        model[0][q] = m;
      end
      compare(0);
      checks++;
      if (radius_o != M_INF) failures++;
    end
    for (int t = 0; t < 3000; t++) begin
      int p;
      p = int'($urandom_range(0, P - 1));
      @(negedge clk);
      if ($urandom_range(0, 49) == 0) begin
        clear_i = 1; clr_path_i = PW'(p);
        foreach (model[p][k]) model[p][k] = longint'(M_INF);
      end else begin
        longint m;
        m = longint'($urandom_range(0, 5000));
        ins_i = 1; ins_path_i = PW'(p); ins_metric_i = metric_t'(m);
        if (m < model[p][T-1]) begin
          int q;
          q = T - 1;
          while (q > 0 && model[p][q-1] > m) begin model[p][q] = model[p][q-1]; q--; end
          model[p][q] = m;
        end
      end
      @(negedge clk);
      clear_i = 0; ins_i = 0;
      compare(int'($urandom_range(0, P - 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
