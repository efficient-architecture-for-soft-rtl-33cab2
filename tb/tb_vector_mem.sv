// tb_vector_mem: writes random words at random addresses of a 768-word
// memory, reads them back and checks the data and the one-cycle read latency;
// a read and a write in the same cycle must return the old word.
module tb_vector_mem;
  localparam int W = 192, D = 768, AW = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we_i, re_i;
  logic [AW-1:0] waddr_i, raddr_i;
  logic [W-1:0] wdata_i, rdata_o;
  logic [W-1:0] model [D];
  bit written [D];
  int checks = 0, failures = 0;

  vector_mem #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    we_i = 0; re_i = 0; waddr_i = 0; raddr_i = 0; wdata_i = 0;
    for (int t = 0; t < 2000; t++) begin
      int a;
      a = int'($urandom_range(0, D - 1));
      @(negedge clk);
      we_i = 1; waddr_i = AW'(a); wdata_i = rnd();
      model[a] = wdata_i; written[a] = 1;
    end
    @(negedge clk);
    we_i = 0;
    for (int t = 0; t < 2000; t++) begin
      int a;
      logic [W-1:0] exp_old;
      do a = int'($urandom_range(0, D - 1)); while (!written[a]);
      exp_old = model[a];
      @(negedge clk);
      re_i = 1; raddr_i = AW'(a);
      // same-cycle write to the same word: the read must see the old word
      if (t % 4 == 0) begin
        we_i = 1; waddr_i = AW'(a); wdata_i = rnd(); model[a] = wdata_i;
      end
      @(negedge clk);
      re_i = 0; we_i = 0;
      checks++;
      if (rdata_o !== exp_old) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
