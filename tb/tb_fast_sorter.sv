// tb_fast_sorter: random vectors (with deliberate duplicate keys) through the
// 8-input sorter; the result is checked against a simple selection sort, and
// every payload must travel with its key (ties: lower input index first).
module tb_fast_sorter;
  localparam int N = 8, KW = 10, PLW = 4;
  logic [N-1:0][KW-1:0]  key_i, key_o;
  logic [N-1:0][PLW-1:0] pay_i, pay_o;
  logic [N-1:0][2:0]     perm_o;
  int checks = 0, failures = 0;

  fast_sorter #(.N(N), .KW(KW), .PLW(PLW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int k [N], idx [N];
      for (int n = 0; n < N; n++) begin
        k[n]   = (t % 2) ? int'($urandom_range(0, 7)) : int'($urandom_range(0, 1023));
        idx[n] = n;
        key_i[n] = KW'(k[n]);
        pay_i[n] = PLW'(n + 3);
      end
      // stable selection of the expected order
      for (int a = 0; a < N; a++)
        for (int b = a + 1; b < N; b++)
          if (k[idx[b]] < k[idx[a]] || (k[idx[b]] == k[idx[a]] && idx[b] < idx[a])) begin
            int tmp;
            tmp = idx[a]; idx[a] = idx[b]; idx[b] = tmp;
          end
      #1;
      for (int p = 0; p < N; p++) begin
        checks++;
        if (int'(key_o[p]) != k[idx[p]] || int'(pay_o[p]) != idx[p] + 3 || int'(perm_o[p]) != idx[p]) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d pos %0d: key %0d pay %0d perm %0d, expected key %0d from %0d",
                     t, p, key_o[p], pay_o[p], perm_o[p], k[idx[p]], idx[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
