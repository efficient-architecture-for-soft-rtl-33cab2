// tsd_detector_top: soft-input soft-output MIMO detector data path
// (TSD-SSE-QMC), 4x4 MIMO, 64-QAM, tuple size T = 8 (parameter T).
//
// Contents: the input vector memory (received vector y' = Q^H y together with
// the triangular channel matrix R and the reciprocals of its diagonal), the
// a-priori vector memory (N_T*L = 24 L_a values per vector), the output vector
// memory (24 LLRs per vector), the address generation unit and the detection
// core with its five interleaved detection paths. No scalar memory, cache or
// register file is present: the quadrature metric computation needs no
// precomputed distances.
//
// Use: write the vectors through the host write ports, pulse start_i with
// base_i/count_i, wait for done_o, then read the LLR vectors through the host
// read port (one cycle read latency). Each vector is detected independently;
// up to five are in flight at once, and a free path takes the next vector
// immediately. Each detection path examines one tree node every 5 cycles.
module tsd_detector_top
  import tsd_pkg::*;
#(
  parameter int unsigned DEPTH = 768,           // vectors per memory
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned CW    = AW + 1,
  parameter int unsigned T     = T_TUPLE          // tuple size
) (
  input  logic          clk,
  input  logic          rst_n,
  // host access: input vector memory
  input  logic          vin_we_i,
  input  logic [AW-1:0] vin_waddr_i,
  input  det_in_t       vin_wdata_i,
  // host access: a-priori vector memory
  input  logic          vla_we_i,
  input  logic [AW-1:0] vla_waddr_i,
  input  la_vec_t       vla_wdata_i,
  // host access: output vector memory
  input  logic          vout_re_i,
  input  logic [AW-1:0] vout_raddr_i,
  output llr_vec_t      vout_rdata_o,
  // run control
  input  logic          start_i,
  input  logic [AW-1:0] base_i,
  input  logic [CW-1:0] count_i,
  output logic          busy_o,
  output logic          done_o,
  // activity counters
  output logic [31:0]   stat_nodes_o,
  output logic [31:0]   stat_leaves_o,
  output logic [31:0]   stat_prunes_o,
  output logic [31:0]   stat_inserts_o,
  output logic [2:0]    active_o
);

  logic          req, grant, fin;
  logic [AW-1:0] job_addr;
  logic          in_re;
  logic [AW-1:0] in_raddr;
  det_in_t       in_rdata;
  la_vec_t       la_rdata;
  logic          out_we;
  logic [AW-1:0] out_waddr;
  llr_vec_t      out_wdata;

  addr_gen #(.AW(AW), .CW(CW)) u_agu (
    .clk, .rst_n, .start_i, .base_i, .count_i,
    .req_i(req), .grant_o(grant), .addr_o(job_addr),
    .fin_i(fin), .busy_o, .done_o);

  vector_mem #(.WIDTH($bits(det_in_t)), .DEPTH(DEPTH), .AW(AW)) u_vmemi (
    .clk, .we_i(vin_we_i), .waddr_i(vin_waddr_i), .wdata_i(vin_wdata_i),
    .re_i(in_re), .raddr_i(in_raddr), .rdata_o(in_rdata));

  vector_mem #(.WIDTH($bits(la_vec_t)), .DEPTH(DEPTH), .AW(AW)) u_vlamem (
    .clk, .we_i(vla_we_i), .waddr_i(vla_waddr_i), .wdata_i(vla_wdata_i),
    .re_i(in_re), .raddr_i(in_raddr), .rdata_o(la_rdata));

  vector_mem #(.WIDTH($bits(llr_vec_t)), .DEPTH(DEPTH), .AW(AW)) u_vmemo (
    .clk, .we_i(out_we), .waddr_i(out_waddr), .wdata_i(out_wdata),
    .re_i(vout_re_i), .raddr_i(vout_raddr_i), .rdata_o(vout_rdata_o));

  tsd_core #(.AW(AW), .T(T)) u_core (
    .clk, .rst_n,
    .req_o(req), .grant_i(grant), .addr_i(job_addr),
    .in_re_o(in_re), .in_raddr_o(in_raddr), .in_rdata_i(in_rdata), .la_rdata_i(la_rdata),
    .out_we_o(out_we), .out_waddr_o(out_waddr), .out_wdata_o(out_wdata), .fin_o(fin),
    .stat_nodes_o, .stat_leaves_o, .stat_prunes_o, .stat_inserts_o, .active_o);

endmodule
