// conv2d_x4: one output pixel of one filter over four input channels.
//
// A pulse on start_i starts four conv_3x3 units at once, one per input
// channel: channel c takes its window from pix_i[c] and its kernel from
// wgt_i[c] (rows 0..2, corresponding to the f1<c>_pix_line / f1<c>_wgt_line
// ports of the original block). When they finish, the four 16-bit partial
// results are summed and saturated to 16 bits (one clock), then a relu adds
// f1_bias_i and clamps negatives (one clock). done_o pulses with result_o
// valid 11 clocks after start_i; result_o holds until the next result.
//
// The window, kernels and bias must stay stable from start_i to done_o.
// Four multipliers in all, as in the original design's convolutions 3 and 4;
// the saturating channel sum is this design's choice.
module conv2d_x4
  import cnn_pkg::*;
(
  input  logic  sys_clk_i,
  input  logic  reset_i,
  input  logic  start_i,
  input  line_t pix_i [4][3],
  input  line_t wgt_i [4][3],
  input  data_t f1_bias_i,
  output logic  done_o,
  output data_t result_o
);

  logic [3:0] cdone;
  data_t      cres [4];
  logic       sum_done;
  data_t      sum_q;

  for (genvar c = 0; c < 4; c++) begin : g_ch
    conv_3x3 u_conv (
      .sys_clk_i, .reset_i, .start_i,
      .pix_line1_i(pix_i[c][0]), .pix_line2_i(pix_i[c][1]), .pix_line3_i(pix_i[c][2]),
      .wgt_line1_i(wgt_i[c][0]), .wgt_line2_i(wgt_i[c][1]), .wgt_line3_i(wgt_i[c][2]),
      .done_o(cdone[c]), .result_o(cres[c])
    );
  end

  always_ff @(posedge sys_clk_i) begin
    if (reset_i) begin
      sum_done <= 1'b0;
      sum_q    <= '0;
    end else begin
      sum_done <= cdone[0];
      if (cdone[0]) begin
        logic signed [DATA_W+1:0] s;
        s = (DATA_W+2)'(cres[0]) + (DATA_W+2)'(cres[1])
          + (DATA_W+2)'(cres[2]) + (DATA_W+2)'(cres[3]);
        if (s > 18'sd32767)       sum_q <= data_t'(16'sh7fff);
        else if (s < -18'sd32768) sum_q <= data_t'(16'sh8000);
        else                      sum_q <= data_t'(s[DATA_W-1:0]);
      end
    end
  end

  relu u_relu (
    .SYS_CLK_I(sys_clk_i), .RESETN_I(!reset_i),
    .done_i(sum_done), .result_i(sum_q), .bias_i(f1_bias_i),
    .done_o, .result_o
  );

  a_lockstep: assert property (@(posedge sys_clk_i) disable iff (reset_i)
                               cdone == {4{cdone[0]}});

endmodule
