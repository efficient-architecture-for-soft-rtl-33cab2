// radius_unit: tuple and radius update of the tuple-search sphere detector.
//
// Each detection path owns a list of the T best leaf metrics found so far,
// kept in ascending order. The sphere radius is the largest entry of the
// list, R = lambda_0(c_(T-1)); it stays "infinite" until T leaves are found.
// A leaf metric smaller than R is inserted at its place by a parallel
// compare-and-shift (every entry compares itself with the new metric), and
// the old largest entry drops out.
//
// Interface: clear_i empties the list of clr_path_i; ins_i inserts ins_metric_i
// into the list of ins_path_i (ignored unless smaller than that path's R).
// radius_o and tuple_o show the list of rd_path_i combinationally, as it was
// before the clock edge. Updates take effect at the clock edge.
module radius_unit
  import tsd_pkg::*;
#(
  parameter int unsigned T = T_TUPLE,  // tuple size
  parameter int unsigned P = P_PATHS   // detection paths
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear_i,
  input  logic [PW-1:0]    clr_path_i,
  input  logic             ins_i,
  input  logic [PW-1:0]    ins_path_i,
  input  metric_t          ins_metric_i,
  input  logic [PW-1:0]    rd_path_i,
  output metric_t          radius_o,
  output metric_t [T-1:0]  tuple_o
);

  metric_t [T-1:0] tup [P];
  metric_t [T-1:0] ins_old, ins_new;

  always_comb begin
    ins_old = tup[ins_path_i];
    for (int k = 0; k < T; k++) begin
      if (ins_metric_i >= ins_old[k])
        ins_new[k] = ins_old[k];
      else if (k == 0 || ins_metric_i >= ins_old[k-1])
        ins_new[k] = ins_metric_i;
      else
        ins_new[k] = ins_old[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < P; p++) tup[p] <= {T{M_INF}};
    end else begin
      if (ins_i)   tup[ins_path_i] <= ins_new;
      if (clear_i) tup[clr_path_i] <= {T{M_INF}};
    end
  end

  always_comb begin
    tuple_o  = tup[rd_path_i];
    radius_o = tuple_o[T-1];
  end

endmodule
