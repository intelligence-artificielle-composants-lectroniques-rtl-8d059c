// conv_layer_34: convolution layer with four input channels whose filters
// are computed one after the other; LAYER = 3 gives convolution 3
// (11x11x4 -> 9x9x4), LAYER = 4 gives convolution 4 (9x9x4 -> 7x7x2).
//
// A pulse on eof_i starts the layer. Four read_lsram units, one per input
// channel RAM, fetch each 3x3 window in lockstep. conv_scheduler then runs
// the single conv2d_x4 (four multipliers) once per filter, switching the
// kernels and bias through conv_weights_sch with its mux_select_o. When all
// filters of the window are done, the N_OUT results are written together to
// the output RAMs (DATA_O[f] to RAM f) at the window's row-major address,
// with ram_wr_en_o high for one clock, and the readers move on. eof_o pulses
// one clock after the last write.
//
// Timing per window: 10 clocks of reads, then 12 clocks per filter and a few
// clocks of handshakes: 64 clocks (layer 3) and 38 clocks (layer 4); about
// 5,200 and 1,900 clocks per frame. The time-multiplexed structure (one CONV2D_x4, a sequencer and a
// weight selector, 4 MACC blocks per layer) follows the original design.
//
// Only the first reader's read enable is used (all four readers run in
// lockstep); the readers' line_end/frame_end strobes are not needed.
module conv_layer_34
  import cnn_pkg::*;
#(
  parameter int LAYER = 3,
  parameter int IN_W  = (LAYER == 3) ? 11 : 9,
  parameter int N_OUT = (LAYER == 3) ? 4 : 2
) (
  input  logic              sys_clk_i,
  input  logic              reset_i,
  input  logic              eof_i,
  input  data_t             RAM_DATA_I [4],
  output logic              eof_o,
  output logic              ram_read_en_o,
  output logic              ram_wr_en_o,
  output logic [ADDR_W-1:0] ram_read_addr_o,
  output logic [ADDR_W-1:0] ram_wr_addr_o,
  output data_t             DATA_O [N_OUT]
);

  localparam int N_OUT_PIX = (IN_W - 2) * (IN_W - 2);

  line_t             pix [4][3];
  line_t             wgt [4][3];
  data_t             bias;
  logic [3:0]        win_ready, frame_end, line_end, rd_en;
  logic [ADDR_W-1:0] rd_addr [4];
  logic              conv_start, conv_done, window_done;
  data_t             conv_res;
  logic [1:0]        sel;

  for (genvar c = 0; c < 4; c++) begin : g_read
    read_lsram #(.IN_W(IN_W)) u_read (
      .sys_clk_i, .reset_i, .eof_i,
      .conv_done_i  (window_done),
      .ram_data_i   (RAM_DATA_I[c]),
      .line_end_o   (line_end[c]),
      .frame_end_o  (frame_end[c]),
      .conv_start_o (win_ready[c]),
      .ram_read_en_o(rd_en[c]),
      .ram_addr_o   (rd_addr[c]),
      .line1_o(pix[c][0]), .line2_o(pix[c][1]), .line3_o(pix[c][2])
    );
  end

  assign ram_read_en_o   = rd_en[0];
  assign ram_read_addr_o = rd_addr[0];

  conv_weights_sch #(.LAYER(LAYER), .N_FILT(N_OUT)) u_wsch (
    .select_i(sel), .wgt_o(wgt), .bias_o(bias)
  );

  conv_scheduler #(.N_FILT(N_OUT)) u_sched (
    .sys_clk_i, .reset_i,
    .start_i       (win_ready[0]),
    .convdone_i    (conv_done),
    .conv_result_i (conv_res),
    .start_o       (conv_start),
    .convdone2ram_o(window_done),
    .mux_select_o  (sel),
    .f_result_o    (DATA_O)
  );

  conv2d_x4 u_conv (
    .sys_clk_i, .reset_i,
    .start_i  (conv_start),
    .pix_i    (pix),
    .wgt_i    (wgt),
    .f1_bias_i(bias),
    .done_o   (conv_done),
    .result_o (conv_res)
  );

  assign ram_wr_en_o = window_done;

  always_ff @(posedge sys_clk_i) begin
    if (reset_i || eof_i) begin
      ram_wr_addr_o <= '0;
      eof_o         <= 1'b0;
    end else begin
      eof_o <= ram_wr_en_o && (int'(ram_wr_addr_o) == N_OUT_PIX - 1);
      if (ram_wr_en_o) ram_wr_addr_o <= ram_wr_addr_o + 1'b1;
    end
  end

  a_lockstep: assert property (@(posedge sys_clk_i) disable iff (reset_i)
                               win_ready == {4{win_ready[0]}});

endmodule
