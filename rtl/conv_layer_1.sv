// conv_layer_1: convolution 1, 28x28x1 input -> 26x26x2 output.
//
// A pulse on eof_i (input image complete) starts the layer. One read_lsram
// scans the 676 windows of the input RAM; for each window two conv_3x3 units
// (one per filter, two multipliers in all) compute the dot products with the
// trained first-layer kernels, and two relu units add each filter's bias and
// clamp negatives. Each output pixel pair is written to the two output RAMs
// (DATA0_O for filter 1, DATA1_O for filter 2) at the window's row-major
// address, ram_wr_en_o high for one clock. eof_o pulses one clock after the
// last write.
//
// Per window: 10 clocks of reads, 9 clocks of multiply-accumulate, 1 clock
// of ReLU, about 21 clocks; the frame takes about 14,200 clocks. The structure
// (one window reader, 2 convolution units, 2 ReLUs, constant coefficients)
// and the coefficients follow the original design; the write sequencing is
// this design's choice.
//
// The reader's line_end/frame_end strobes and the second ReLU's done flag
// are left unused: both filters run in lockstep, so one done flag suffices.
module conv_layer_1
  import cnn_pkg::*;
(
  input  logic              sys_clk_i,
  input  logic              reset_i,
  input  logic              eof_i,
  input  data_t             RAM_DATA_I,
  output logic              eof_o,
  output logic              ram_read_en_o,
  output logic              ram_wr_en_o,
  output logic [ADDR_W-1:0] ram_read_addr_o,
  output logic [ADDR_W-1:0] ram_wr_addr_o,
  output data_t             DATA0_O,
  output data_t             DATA1_O
);

  localparam int N_OUT_PIX = 26 * 26;

  line_t l1, l2, l3;
  logic  conv_start, frame_end, line_end;
  logic  [1:0] conv_done;
  data_t conv_res [2];
  logic  [1:0] relu_done;
  data_t relu_res [2];

  read_lsram #(.IN_W(28)) u_read (
    .sys_clk_i, .reset_i, .eof_i,
    .conv_done_i (conv_done[0]),
    .ram_data_i  (RAM_DATA_I),
    .line_end_o  (line_end),
    .frame_end_o (frame_end),
    .conv_start_o(conv_start),
    .ram_read_en_o,
    .ram_addr_o  (ram_read_addr_o),
    .line1_o(l1), .line2_o(l2), .line3_o(l3)
  );

  for (genvar f = 0; f < 2; f++) begin : g_filt
    conv_3x3 u_conv (
      .sys_clk_i, .reset_i,
      .start_i    (conv_start),
      .pix_line1_i(l1), .pix_line2_i(l2), .pix_line3_i(l3),
      .wgt_line1_i(CONV1_W[f][0]), .wgt_line2_i(CONV1_W[f][1]),
      .wgt_line3_i(CONV1_W[f][2]),
      .done_o     (conv_done[f]),
      .result_o   (conv_res[f])
    );
    relu u_relu (
      .SYS_CLK_I(sys_clk_i), .RESETN_I(!reset_i),
      .done_i   (conv_done[f]), .result_i(conv_res[f]), .bias_i(CONV1_B[f]),
      .done_o   (relu_done[f]), .result_o(relu_res[f])
    );
  end

  assign ram_wr_en_o = relu_done[0];
  assign DATA0_O     = relu_res[0];
  assign DATA1_O     = relu_res[1];

  always_ff @(posedge sys_clk_i) begin
    if (reset_i || eof_i) begin
      ram_wr_addr_o <= '0;
      eof_o         <= 1'b0;
    end else begin
      eof_o <= ram_wr_en_o && (int'(ram_wr_addr_o) == N_OUT_PIX - 1);
      if (ram_wr_en_o) ram_wr_addr_o <= ram_wr_addr_o + 1'b1;
    end
  end

  // Both filters run in lockstep.
  a_lockstep: assert property (@(posedge sys_clk_i) disable iff (reset_i)
                               conv_done[0] == conv_done[1]);

endmodule
