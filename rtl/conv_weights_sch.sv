// conv_weights_sch: kernel and bias selector of convolutions 3 and 4.
//
// For the filter chosen by select_i, wgt_o[c][r] is row r of the 3x3 kernel
// applied to input channel c (c = 0..3), and bias_o is the filter's bias.
// The output is combinational from select_i; selects beyond the layer's
// filter count return the last filter. LAYER picks the coefficient set
// (3: four filters, 4: two filters). The trained coefficients of these layers
// are not available: the values come from the placeholder generator in
// cnn_pkg and are held here as a constant table.
module conv_weights_sch
  import cnn_pkg::*;
#(
  parameter int LAYER  = 3,
  parameter int N_FILT = (LAYER == 3) ? 4 : 2
) (
  input  logic [1:0] select_i,
  output line_t      wgt_o [4][3],
  output data_t      bias_o
);

  line_t w_tbl [4][4][3];   // [filter][channel][row], constant
  data_t b_tbl [4];

  for (genvar f = 0; f < 4; f++) begin : g_f
    localparam int FS = (f < N_FILT) ? f : N_FILT - 1;
    localparam data_t B = gen_bias(LAYER, FS);
    assign b_tbl[f] = B;
    for (genvar c = 0; c < 4; c++) begin : g_c
      for (genvar r = 0; r < 3; r++) begin : g_r
        localparam line_t W = gen_line(LAYER, FS, c, r);
        assign w_tbl[f][c][r] = W;
      end
    end
  end

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 3; r++)
        wgt_o[c][r] = w_tbl[select_i][c][r];
    bias_o = b_tbl[select_i];
  end

endmodule
