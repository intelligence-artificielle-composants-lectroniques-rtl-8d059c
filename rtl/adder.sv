// adder: sums the two per-channel partial results of one convolution-2
// filter (the layer has two input channels, each convolved by its own
// conv_3x3). On a clock edge with done_i high, result_o takes the saturating
// sum a_i + b_i and done_o pulses for one clock. result_o holds between
// pulses. Latency: one clock. The original design names this block and places
// four of them between the convolutions and the ReLUs; the saturation and the
// one-clock register are this design's choices.
module adder
  import cnn_pkg::*;
(
  input  logic  sys_clk_i,
  input  logic  reset_i,
  input  logic  done_i,
  input  data_t a_i,
  input  data_t b_i,
  output logic  done_o,
  output data_t result_o
);

  always_ff @(posedge sys_clk_i) begin
    if (reset_i) begin
      done_o   <= 1'b0;
      result_o <= '0;
    end else begin
      done_o <= done_i;
      if (done_i) result_o <= add_sat(a_i, b_i);
    end
  end

endmodule
