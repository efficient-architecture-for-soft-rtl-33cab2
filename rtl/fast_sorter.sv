// fast_sorter: fully parallel one-shot sorter for N keys with a payload each.
//
// Every key is compared with every other key by a bank of N*N comparators.
// The flag b[n][m] is set when key n must be placed before key m, so the sum
// of column m is the output position of key m. N one-hot multiplexers then
// move keys and payloads to their positions. Output position 0 holds the
// smallest key (ascending order, as the enumeration needs).
//
// Ties are broken by input position (the lower input index goes first), which
// keeps all positions distinct; this tie rule is this design's own choice.
// The flag b[n][m] is read as "z_n is smaller than z_m" so that the column
// sum counts smaller keys and yields an ascending order.
//
// Purely combinational: outputs follow the inputs in the same cycle.
// perm[p] gives the input index that landed at output position p.
module fast_sorter #(
  parameter int unsigned N   = 8,   // number of keys (sqrt(Q) for 64-QAM)
  parameter int unsigned KW  = 24,  // key width
  parameter int unsigned PLW = 6    // payload width
) (
  input  logic [N-1:0][KW-1:0]         key_i,
  input  logic [N-1:0][PLW-1:0]        pay_i,
  output logic [N-1:0][KW-1:0]         key_o,
  output logic [N-1:0][PLW-1:0]        pay_o,
  output logic [N-1:0][$clog2(N)-1:0]  perm_o
);
  localparam int unsigned IW = $clog2(N);

  logic [N-1:0][N-1:0]  b;    // b[n][m]: key n goes before key m
  logic [N-1:0][IW-1:0] pos;  // output position of key m

  always_comb begin
    for (int n = 0; n < N; n++)
      for (int m = 0; m < N; m++)
        b[n][m] = (n != m) &&
                  ((key_i[n] < key_i[m]) || ((key_i[n] == key_i[m]) && (n < m)));
  end

  // Column accumulators.
  always_comb begin
    for (int m = 0; m < N; m++) begin
      logic [IW:0] acc;
      acc = '0;
      for (int n = 0; n < N; n++) acc = acc + (IW+1)'(b[n][m]);
      pos[m] = acc[IW-1:0];
    end
  end

  // Output multiplexers: position p takes the key whose index equals p.
  always_comb begin
    for (int p = 0; p < N; p++) begin
      key_o[p]  = '0;
      pay_o[p]  = '0;
      perm_o[p] = '0;
      for (int m = 0; m < N; m++) begin
        if (pos[m] == IW'(p)) begin
          key_o[p]  = key_o[p]  | key_i[m];
          pay_o[p]  = pay_o[p]  | pay_i[m];
          perm_o[p] = perm_o[p] | IW'(m);
        end
      end
    end
  end

endmodule
