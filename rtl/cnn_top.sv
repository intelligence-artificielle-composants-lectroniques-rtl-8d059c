// cnn_top: handwritten-digit recogniser, a small convolutional network
// evaluated layer by layer out of on-chip RAM.
//
// Network (input 28x28x1 pixels):
//   conv 1  3x3, 2 filters, ReLU         -> 26x26x2   2 multipliers
//   max pool 2x2, stride 2               -> 13x13x2
//   conv 2  3x3, 4 filters, ReLU         -> 11x11x4   8 multipliers
//   conv 3  3x3, 4 filters, ReLU         ->  9x9x4    4 multipliers
//   conv 4  3x3, 2 filters, ReLU         ->  7x7x2    4 multipliers
//   fully connected 98 -> 10             -> scores    2 multipliers
//   argmax                               -> digit
// Every feature-map channel lives in its own 1K x 16 RAM (ram_dual_port):
// 1 input + 2 + 2 + 4 + 4 + 2 feature maps + 2 FC weight RAMs = 17 RAMs and
// 20 multipliers, the resource budget of the original design. Each layer
// reads its input RAMs, writes its output RAMs and pulses an end-of-frame
// strobe that starts the next layer, so one image is processed at a time.
//
// Interface: the camera byte stream (cam_*) feeds image_input; when its 784th
// pixel is written the chain runs by itself. The FC weights come from a
// processor through the wgt_* ports: wgt_frame_rdy_i opens a weight frame,
// wgt_valid_i[c] writes wgt_data_i into weight RAM c at the next address,
// wgt_eof_i closes the frame; the FC layer starts only once both RAMs are
// closed. digit_valid_o pulses when the ten scores on digit_o are valid and
// result_valid_o one clock later with the recognised digit on
// digit_recog_result_o. A frame takes about 25,000 clocks from the last
// camera byte. Reset (reset_i) is synchronous and active high; blocks that
// use an active-low reset get its inverse. RAM contents are not reset.
//
// The FC layer's 16-bit RAM addresses are cut to the 10 bits of a 1K RAM.
module cnn_top
  import cnn_pkg::*;
(
  input  logic        sys_clk_i,
  input  logic        reset_i,
  input  logic        cam_valid_i,
  input  logic [7:0]  cam_byte_i,
  input  logic        cam_sof_i,
  input  logic [1:0]  wgt_valid_i,
  input  logic        wgt_frame_rdy_i,
  input  logic        wgt_eof_i,
  input  data_t       wgt_data_i,
  output data_t       digit_o [10],
  output logic        digit_valid_o,
  output logic [3:0]  digit_recog_result_o,
  output logic        result_valid_o,
  output logic [5:0]  layer_done_o     // end-of-frame strobes, input..conv4
);

  logic resetn;
  assign resetn = !reset_i;

  // ---------------------------------------------------------------- input
  logic              in_we, in_eof;
  logic [ADDR_W-1:0] in_waddr;
  data_t             in_wdata;

  image_input u_input (
    .sys_clk_i, .reset_i, .cam_valid_i, .cam_byte_i, .cam_sof_i,
    .ram_wr_en_o(in_we), .ram_wr_addr_o(in_waddr), .ram_wr_data_o(in_wdata),
    .eof_o(in_eof)
  );

  logic              c1_re, c1_we, c1_eof;
  logic [ADDR_W-1:0] c1_raddr, c1_waddr;
  data_t             c1_rdata;
  data_t             c1_wdata [2];

  ram_dual_port u_ram_in (
    .clk(sys_clk_i), .we_a(in_we), .we_b(c1_re), .addr_a(in_waddr),
    .addr_b(c1_raddr), .data_a(in_wdata), .q_b(c1_rdata)
  );

  // ---------------------------------------------------------------- conv 1
  conv_layer_1 u_conv1 (
    .sys_clk_i, .reset_i, .eof_i(in_eof), .RAM_DATA_I(c1_rdata),
    .eof_o(c1_eof), .ram_read_en_o(c1_re), .ram_wr_en_o(c1_we),
    .ram_read_addr_o(c1_raddr), .ram_wr_addr_o(c1_waddr),
    .DATA0_O(c1_wdata[0]), .DATA1_O(c1_wdata[1])
  );

  logic              mp_re, mp_we, mp_eof;
  logic [ADDR_W-1:0] mp_raddr, mp_waddr;
  data_t             mp_rdata [2];
  data_t             mp_wdata [2];

  for (genvar c = 0; c < 2; c++) begin : g_ram_c1
    ram_dual_port u_ram (
      .clk(sys_clk_i), .we_a(c1_we), .we_b(mp_re), .addr_a(c1_waddr),
      .addr_b(mp_raddr), .data_a(c1_wdata[c]), .q_b(mp_rdata[c])
    );
  end

  // ------------------------------------------------------------- max pool
  maxpool_layer u_pool (
    .sys_clk_i, .reset_i, .eof_i(c1_eof),
    .RAM_DATA0_I(mp_rdata[0]), .RAM_DATA1_I(mp_rdata[1]),
    .eof_o(mp_eof), .ram_read_en_o(mp_re), .ram_wr_en_o(mp_we),
    .ram_wr_addr_o(mp_waddr), .DATA0_O(mp_wdata[0]), .DATA1_O(mp_wdata[1]),
    .ram_read_addr_o_0(mp_raddr)
  );

  logic              c2_re, c2_we, c2_eof;
  logic [ADDR_W-1:0] c2_raddr, c2_waddr;
  data_t             c2_rdata [2];
  data_t             c2_wdata [4];

  for (genvar c = 0; c < 2; c++) begin : g_ram_mp
    ram_dual_port u_ram (
      .clk(sys_clk_i), .we_a(mp_we), .we_b(c2_re), .addr_a(mp_waddr),
      .addr_b(c2_raddr), .data_a(mp_wdata[c]), .q_b(c2_rdata[c])
    );
  end

  // ---------------------------------------------------------------- conv 2
  conv_layer_2 u_conv2 (
    .sys_clk_i, .reset_i, .eof_i(mp_eof),
    .RAM_DATA0_I(c2_rdata[0]), .RAM_DATA1_I(c2_rdata[1]),
    .eof_o(c2_eof), .ram_read_en_o(c2_re), .ram_wr_en_o(c2_we),
    .ram_read_addr_o(c2_raddr), .ram_write_addr_o(c2_waddr),
    .DATA0_O(c2_wdata[0]), .DATA1_O(c2_wdata[1]),
    .DATA2_O(c2_wdata[2]), .DATA3_O(c2_wdata[3])
  );

  logic              c3_re, c3_we, c3_eof;
  logic [ADDR_W-1:0] c3_raddr, c3_waddr;
  data_t             c3_rdata [4];
  data_t             c3_wdata [4];

  for (genvar c = 0; c < 4; c++) begin : g_ram_c2
    ram_dual_port u_ram (
      .clk(sys_clk_i), .we_a(c2_we), .we_b(c3_re), .addr_a(c2_waddr),
      .addr_b(c3_raddr), .data_a(c2_wdata[c]), .q_b(c3_rdata[c])
    );
  end

  // ---------------------------------------------------------------- conv 3
  conv_layer_34 #(.LAYER(3)) u_conv3 (
    .sys_clk_i, .reset_i, .eof_i(c2_eof), .RAM_DATA_I(c3_rdata),
    .eof_o(c3_eof), .ram_read_en_o(c3_re), .ram_wr_en_o(c3_we),
    .ram_read_addr_o(c3_raddr), .ram_wr_addr_o(c3_waddr), .DATA_O(c3_wdata)
  );

  logic              c4_re, c4_we, c4_eof;
  logic [ADDR_W-1:0] c4_raddr, c4_waddr;
  data_t             c4_rdata [4];
  data_t             c4_wdata [2];

  for (genvar c = 0; c < 4; c++) begin : g_ram_c3
    ram_dual_port u_ram (
      .clk(sys_clk_i), .we_a(c3_we), .we_b(c4_re), .addr_a(c3_waddr),
      .addr_b(c4_raddr), .data_a(c3_wdata[c]), .q_b(c4_rdata[c])
    );
  end

  // ---------------------------------------------------------------- conv 4
  conv_layer_34 #(.LAYER(4)) u_conv4 (
    .sys_clk_i, .reset_i, .eof_i(c3_eof), .RAM_DATA_I(c4_rdata),
    .eof_o(c4_eof), .ram_read_en_o(c4_re), .ram_wr_en_o(c4_we),
    .ram_read_addr_o(c4_raddr), .ram_wr_addr_o(c4_waddr), .DATA_O(c4_wdata)
  );

  // ------------------------------------------------------ fully connected
  logic              fc_wre, fc_dre;
  logic [15:0]       fc_waddr, fc_daddr;
  data_t             fc_w [2];
  data_t             fc_d [2];
  logic [1:0]        wl_we, wl_done;
  data_t             wl_data [2];
  logic [15:0]       wl_addr [2];

  for (genvar c = 0; c < 2; c++) begin : g_fc_ram
    ram_dual_port u_ram_data (
      .clk(sys_clk_i), .we_a(c4_we), .we_b(fc_dre), .addr_a(c4_waddr),
      .addr_b(fc_daddr[ADDR_W-1:0]), .data_a(c4_wdata[c]), .q_b(fc_d[c])
    );
    write_lsram_weight u_wload (
      .RESETN_I(resetn), .SYS_CLK_I(sys_clk_i),
      .DATA_VALID_I(wgt_valid_i[c]), .UART_FRAME_RDY_I(wgt_frame_rdy_i),
      .EOF_I(wgt_eof_i), .DATA_I(wgt_data_i),
      .RAM_WR_EN_O(wl_we[c]), .DATA_O(wl_data[c]), .RAM_ADDRESS_O(wl_addr[c]),
      .RAM_WR_DONE_O(wl_done[c])
    );
    ram_dual_port u_ram_wgt (
      .clk(sys_clk_i), .we_a(wl_we[c]), .we_b(fc_wre),
      .addr_a(wl_addr[c][ADDR_W-1:0]), .addr_b(fc_waddr[ADDR_W-1:0]),
      .data_a(wl_data[c]), .q_b(fc_w[c])
    );
  end

  fc_layer u_fc (
    .sys_clk_i, .reset_i,
    .write_ram_done_i(&wl_done),
    .conv_done_i     (c4_eof),
    .ram_weight_i_0(fc_w[0]), .ram_data_i_0(fc_d[0]),
    .ram_weight_i_1(fc_w[1]), .ram_data_i_1(fc_d[1]),
    .one_digit_done_o    (digit_valid_o),
    .ram_weight_read_en_o(fc_wre),
    .ram_data_read_en_o  (fc_dre),
    .digit_o,
    .ram_weight_addr_o   (fc_waddr),
    .ram_data_addr_o     (fc_daddr)
  );

  // ---------------------------------------------------------------- argmax
  max_comp u_max (
    .RESETN_I(resetn), .SYS_CLK_I(sys_clk_i),
    .DATA_VALID_I(digit_valid_o), .DATA_IN_I(digit_o),
    .DATA_OUT_O(digit_recog_result_o), .DATA_VALID_O(result_valid_o)
  );

  assign layer_done_o = {c4_eof, c3_eof, c2_eof, mp_eof, c1_eof, in_eof};

endmodule
