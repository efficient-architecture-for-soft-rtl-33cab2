// iru: interference reduction unit.
//
// For the layer i the tree search is about to enter, it removes the
// contribution of the already chosen symbols of the upper layers and
// normalises by the diagonal element:
//     y''_i  = y'_i - sum_{j > i} r_ij * x_j
//     y'''_i = y''_i * (1 / r_ii)
// The reciprocal 1/r_ii is supplied with the channel data (it comes from the
// channel preprocessing, like R itself), so no divider is needed; this is
// this design's own choice. Symbols are given by their level indices and are
// turned into the integer levels 2k-7, so the products r_ij * x_j need only
// small multipliers.
//
// Timing: two pipeline stages (time budget of 2 cycles): stage 1 forms y'',
// stage 2 the normalised y'''. valid_i/tag_i travel with the data.
module iru
  import tsd_pkg::*;
#(
  parameter int unsigned TAGW = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_i,
  input  logic [TAGW-1:0] tag_i,
  input  logic [LYW-1:0]  layer_i,    // layer i to be entered
  input  cplx_t           y_i,        // y'_i
  input  cplx_t [NT-1:0]  r_row_i,    // r_ij, j = 0..NT-1 (only j > i used)
  input  data_t           rinv_i,     // 1 / r_ii
  input  sym_t  [NT-1:0]  x_i,        // chosen symbols of the upper layers
  output logic            valid_o,
  output logic [TAGW-1:0] tag_o,
  output cplx_t           y_o         // y'''_i
);

  function automatic logic signed [47:0] lv(lvl_t k);
    return 48'(signed'(int'(k) * 2 - 7));
  endfunction

  // ---- stage 1: interference cancellation ----
  logic signed [47:0] acc_re, acc_im;
  always_comb begin
    acc_re = 48'(y_i.re);
    acc_im = 48'(y_i.im);
    for (int j = 0; j < NT; j++) begin
      if (j > int'(layer_i)) begin
        acc_re = acc_re - (48'(r_row_i[j].re) * lv(x_i[j].re) - 48'(r_row_i[j].im) * lv(x_i[j].im));
        acc_im = acc_im - (48'(r_row_i[j].re) * lv(x_i[j].im) + 48'(r_row_i[j].im) * lv(x_i[j].re));
      end
    end
  end

  logic            v1;
  logic [TAGW-1:0] tag1;
  cplx_t           y2;    // y''
  data_t           rinv1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1    <= 1'b0;
      tag1  <= '0;
      y2    <= '0;
      rinv1 <= '0;
    end else begin
      v1     <= valid_i;
      tag1   <= tag_i;
      y2.re  <= d_sat(acc_re);
      y2.im  <= d_sat(acc_im);
      rinv1  <= rinv_i;
    end
  end

  // ---- stage 2: normalisation ----
  logic signed [47:0] n_re, n_im;
  always_comb begin
    n_re = (48'(y2.re) * 48'(rinv1)) >>> FRAC;
    n_im = (48'(y2.im) * 48'(rinv1)) >>> FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      tag_o   <= '0;
      y_o     <= '0;
    end else begin
      valid_o <= v1;
      tag_o   <= tag1;
      y_o.re  <= d_sat(n_re);
      y_o.im  <= d_sat(n_im);
    end
  end

endmodule
