// conv_layer_2: convolution 2, 13x13x2 input -> 11x11x4 output.
//
// A pulse on eof_i starts the layer. Two read_lsram units, one per input
// channel RAM, scan the 121 windows in lockstep. Eight conv_3x3 units (one
// per filter and input channel, eight multipliers) compute all partial dot
// products of a window in parallel; four adders sum the two channels of each
// filter and four relu units add the filter bias and clamp. The four results
// are written to the four output RAMs (DATA0_O..DATA3_O) at the window's
// row-major address with ram_wr_en_o high for one clock; eof_o pulses one
// clock after the last write.
//
// Per window about 22 clocks; the frame takes about 2,700 clocks. The
// structure (8 convolution units, 4 adders, 4 ReLUs, two window readers,
// constant coefficients) follows the original design. Its trained
// coefficients are not available: the kernels and biases come from the
// placeholder generator in cnn_pkg (layer 2).
//
// Only the first reader's read enable and the first ReLU's done flag are
// used, since all units run in lockstep; line_end/frame_end are not needed.
module conv_layer_2
  import cnn_pkg::*;
(
  input  logic              sys_clk_i,
  input  logic              reset_i,
  input  logic              eof_i,
  input  data_t             RAM_DATA0_I,
  input  data_t             RAM_DATA1_I,
  output logic              eof_o,
  output logic              ram_read_en_o,
  output logic              ram_wr_en_o,
  output logic [ADDR_W-1:0] ram_read_addr_o,
  output logic [ADDR_W-1:0] ram_write_addr_o,
  output data_t             DATA0_O,
  output data_t             DATA1_O,
  output data_t             DATA2_O,
  output data_t             DATA3_O
);

  localparam int IN_W      = 13;
  localparam int N_OUT_PIX = (IN_W - 2) * (IN_W - 2);

  line_t             lines [2][3];
  logic [1:0]        conv_start, frame_end, line_end, rd_en;
  logic [ADDR_W-1:0] rd_addr [2];
  data_t             ram_data [2];
  logic              conv_done [4][2];
  data_t             conv_res  [4][2];
  logic [3:0]        add_done, relu_done;
  data_t             add_res [4];
  data_t             relu_res [4];

  assign ram_data[0] = RAM_DATA0_I;
  assign ram_data[1] = RAM_DATA1_I;

  for (genvar ch = 0; ch < 2; ch++) begin : g_read
    read_lsram #(.IN_W(IN_W)) u_read (
      .sys_clk_i, .reset_i, .eof_i,
      .conv_done_i  (conv_done[0][0]),
      .ram_data_i   (ram_data[ch]),
      .line_end_o   (line_end[ch]),
      .frame_end_o  (frame_end[ch]),
      .conv_start_o (conv_start[ch]),
      .ram_read_en_o(rd_en[ch]),
      .ram_addr_o   (rd_addr[ch]),
      .line1_o(lines[ch][0]), .line2_o(lines[ch][1]), .line3_o(lines[ch][2])
    );
  end

  // The readers run in lockstep; the first one drives the shared address.
  assign ram_read_en_o   = rd_en[0];
  assign ram_read_addr_o = rd_addr[0];

  for (genvar f = 0; f < 4; f++) begin : g_filt
    localparam data_t BIAS = gen_bias(2, f);
    for (genvar ch = 0; ch < 2; ch++) begin : g_ch
      localparam line_t W0 = gen_line(2, f, ch, 0);
      localparam line_t W1 = gen_line(2, f, ch, 1);
      localparam line_t W2 = gen_line(2, f, ch, 2);
      conv_3x3 u_conv (
        .sys_clk_i, .reset_i,
        .start_i    (conv_start[0]),
        .pix_line1_i(lines[ch][0]), .pix_line2_i(lines[ch][1]),
        .pix_line3_i(lines[ch][2]),
        .wgt_line1_i(W0), .wgt_line2_i(W1), .wgt_line3_i(W2),
        .done_o     (conv_done[f][ch]),
        .result_o   (conv_res[f][ch])
      );
    end
    adder u_add (
      .sys_clk_i, .reset_i,
      .done_i(conv_done[f][0]), .a_i(conv_res[f][0]), .b_i(conv_res[f][1]),
      .done_o(add_done[f]), .result_o(add_res[f])
    );
    relu u_relu (
      .SYS_CLK_I(sys_clk_i), .RESETN_I(!reset_i),
      .done_i   (add_done[f]), .result_i(add_res[f]), .bias_i(BIAS),
      .done_o   (relu_done[f]), .result_o(relu_res[f])
    );
  end

  assign ram_wr_en_o = relu_done[0];
  assign DATA0_O     = relu_res[0];
  assign DATA1_O     = relu_res[1];
  assign DATA2_O     = relu_res[2];
  assign DATA3_O     = relu_res[3];

  always_ff @(posedge sys_clk_i) begin
    if (reset_i || eof_i) begin
      ram_write_addr_o <= '0;
      eof_o            <= 1'b0;
    end else begin
      eof_o <= ram_wr_en_o && (int'(ram_write_addr_o) == N_OUT_PIX - 1);
      if (ram_wr_en_o) ram_write_addr_o <= ram_write_addr_o + 1'b1;
    end
  end

  a_lockstep: assert property (@(posedge sys_clk_i) disable iff (reset_i)
                               (rd_addr[0] == rd_addr[1]) && (conv_start[0] == conv_start[1]));

endmodule
