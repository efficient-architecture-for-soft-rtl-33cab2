// tb_addr_gen: runs with several base addresses and lengths; requests arrive
// at random cycles and detections finish at random cycles. Checks that the
// addresses come out consecutively from base, exactly count of them, that no
// grant happens after the last one, and that done pulses once when the last
// finished detection is reported (and not earlier).
module tb_addr_gen;
  localparam int AW = 10, CW = 11;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start_i, req_i, grant_o, fin_i, busy_o, done_o;
  logic [AW-1:0] base_i, addr_o;
  logic [CW-1:0] count_i;
  int checks = 0, failures = 0;

  addr_gen #(.AW(AW), .CW(CW)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    start_i = 0; req_i = 0; fin_i = 0; base_i = 0; count_i = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      int b, n, granted, finished, outstanding, dones;
      bit g;
      b = int'($urandom_range(0, 600));
      n = int'($urandom_range(1, 100));
      @(negedge clk);
      start_i = 1; base_i = AW'(b); count_i = CW'(n);
      @(negedge clk);
      start_i = 0;
      check(busy_o, "busy after start");
      granted = 0; finished = 0; outstanding = 0; dones = 0;
      while (finished < n) begin
        req_i = ($urandom_range(0, 2) == 0);
        fin_i = (outstanding > 0) && ($urandom_range(0, 3) == 0);
        #1;
        g = grant_o;
        if (grant_o) begin
          check(int'(addr_o) == b + granted, $sformatf("address %0d expected %0d", addr_o, b + granted));
          granted++;
        end
        check(!(req_i && !grant_o && granted < n), "request refused while addresses remain");
        @(negedge clk);
        if (g) outstanding++;
        if (fin_i) begin outstanding--; finished++; end
        if (done_o) dones++;
      end
      req_i = 0; fin_i = 0;
      check(granted == n, "number of grants");
      @(negedge clk);
      if (done_o) dones++;
      check(dones == 1, $sformatf("done pulses %0d", dones));
      check(!busy_o, "idle at end");
      req_i = 1; #1;
      check(!grant_o, "no grant when idle");
      @(negedge clk); req_i = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
