// vector_mem: vector data memory of the detector (used for the input vector
// memory, the a-priori vector memory and the output LLR vector memory).
//
// One word holds one whole vector, so a detection path reads or writes all its
// data in a single access. One synchronous write port and one synchronous read
// port (read data valid the cycle after the address). The depth default, 768
// words, is one code block of the evaluated setup: 9216 information bits at
// rate 1/2 give 18432 coded bits, i.e. 768 vectors of N_T*L = 24 bits; the
// document gives no memory depth, so this is a derived choice.
// Contents are not reset (a memory array); read only what has been written.
module vector_mem #(
  parameter int unsigned WIDTH = 192,
  parameter int unsigned DEPTH = 768,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we_i,
  input  logic [AW-1:0]    waddr_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic             re_i,
  input  logic [AW-1:0]    raddr_i,
  output logic [WIDTH-1:0] rdata_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    if (re_i) rdata_o <= mem[raddr_i];
  end

endmodule
