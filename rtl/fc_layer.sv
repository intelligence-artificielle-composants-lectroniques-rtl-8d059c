// fc_layer: fully connected layer, 98 inputs -> 10 digit scores.
//
// The two 7x7 output channels of convolution 4 sit in two data RAMs; the 980
// weights sit in two weight RAMs of 490 words each (channel c's weight RAM
// holds, for digit d and input i, the weight at address d*49 + i). Two
// read_before_fcl sequencers, started together by conv_done_i once
// write_ram_done_i is high, read one data word and one weight of each
// channel per clock; the first one drives the shared RAM addresses and
// enables. The fcl core multiplies and accumulates both pairs per clock,
// adds the digit's 8-bit bias from cnn_pkg and stores the score.
// one_digit_done_o pulses for one clock when all ten scores on digit_o are
// valid.
//
// Timing: about 515 clocks from conv_done_i (with the weights loaded) to
// one_digit_done_o. The structure (two readers, one core with two
// multipliers, biases built in, weights in RAM) follows the original design.
// The trained biases are not available: they come from cnn_pkg::fc_bias.
module fc_layer
  import cnn_pkg::*;
(
  input  logic        sys_clk_i,
  input  logic        reset_i,
  input  logic        write_ram_done_i,
  input  logic        conv_done_i,
  input  data_t       ram_weight_i_0,
  input  data_t       ram_data_i_0,
  input  data_t       ram_weight_i_1,
  input  data_t       ram_data_i_1,
  output logic        one_digit_done_o,
  output logic        ram_weight_read_en_o,
  output logic        ram_data_read_en_o,
  output data_t       digit_o [10],
  output logic [15:0] ram_weight_addr_o,
  output logic [15:0] ram_data_addr_o
);

  logic              start [2];
  logic              digit_done [2];
  logic [3:0]        wnum [2];
  data_t             wgt [2];
  data_t             dat [2];
  logic              wr_en [2], dr_en [2];
  logic [15:0]       waddr [2], daddr [2];
  data_t             ram_w [2], ram_d [2];
  logic signed [7:0] bias [10];

  assign ram_w[0] = ram_weight_i_0;
  assign ram_w[1] = ram_weight_i_1;
  assign ram_d[0] = ram_data_i_0;
  assign ram_d[1] = ram_data_i_1;

  for (genvar d = 0; d < 10; d++) begin : g_bias
    localparam logic signed [7:0] B = fc_bias(d);
    assign bias[d] = B;
  end

  for (genvar c = 0; c < 2; c++) begin : g_rd
    read_before_fcl u_rd (
      .sys_clk_i, .reset_i, .write_ram_done_i, .conv_done_i,
      .ram_weight_i        (ram_w[c]),
      .ram_data_i          (ram_d[c]),
      .conv_start_o        (start[c]),
      .one_digit_done_o    (digit_done[c]),
      .ram_weight_read_en_o(wr_en[c]),
      .ram_data_read_en_o  (dr_en[c]),
      .weight_num_o        (wnum[c]),
      .ram_weight_addr_o   (waddr[c]),
      .ram_data_addr_o     (daddr[c]),
      .weight_o            (wgt[c]),
      .data_o              (dat[c])
    );
  end

  assign ram_weight_read_en_o = wr_en[0];
  assign ram_data_read_en_o   = dr_en[0];
  assign ram_weight_addr_o    = waddr[0];
  assign ram_data_addr_o      = daddr[0];

  fcl u_fcl (
    .sys_clk_i, .reset_i,
    .start_i         (start[0]),
    .one_digit_done_i(digit_done[0]),
    .dataset1_i      (dat[0]),
    .dataset2_i      (dat[1]),
    .weightset1_i    (wgt[0]),
    .weightset2_i    (wgt[1]),
    .weightnum_i     (wnum[0]),
    .bias_i          (bias),
    .mul_done_o      (one_digit_done_o),
    .digit_o
  );

  a_lockstep: assert property (@(posedge sys_clk_i) disable iff (reset_i)
                               (start[0] == start[1]) && (waddr[0] == waddr[1]));

endmodule
