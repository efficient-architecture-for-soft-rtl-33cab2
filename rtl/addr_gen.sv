// addr_gen: address generation unit of the detector.
//
// A run covers count_i consecutive vectors starting at base_i. Whenever a
// detection path is free it asks for work (req_i); the unit answers at once
// with the next vector address (grant_o, addr_o) until all vectors of the run
// have been handed out, so a new detection starts as soon as a path is free.
// It counts finished detections (fin_i) and raises done_o for one cycle when
// the last one has finished. busy_o is high from start_i until then.
// The document names the unit only; this behaviour is this design's own.
module addr_gen #(
  parameter int unsigned AW = 10,
  parameter int unsigned CW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic [AW-1:0] base_i,
  input  logic [CW-1:0] count_i,
  input  logic          req_i,
  output logic          grant_o,
  output logic [AW-1:0] addr_o,
  input  logic          fin_i,
  output logic          busy_o,
  output logic          done_o
);

  logic [AW-1:0] next_addr;
  logic [CW-1:0] issued, finished, total;

  assign grant_o = busy_o && req_i && (issued != total);
  assign addr_o  = next_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_addr <= '0;
      issued    <= '0;
      finished  <= '0;
      total     <= '0;
      busy_o    <= 1'b0;
      done_o    <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start_i && !busy_o) begin
        next_addr <= base_i;
        issued    <= '0;
        finished  <= '0;
        total     <= count_i;
        busy_o    <= (count_i != '0);
        done_o    <= (count_i == '0);
      end else if (busy_o) begin
        if (grant_o) begin
          next_addr <= next_addr + 1'b1;
          issued    <= issued + 1'b1;
        end
        if (fin_i) begin
          finished <= finished + 1'b1;
          if (finished + 1'b1 == total) begin
            busy_o <= 1'b0;
            done_o <= 1'b1;
          end
        end
      end
    end
  end

endmodule
