// fcl: arithmetic core of the fully connected layer, two multiply-accumulates
// per clock.
//
// Each clock with start_i high adds dataset1_i * weightset1_i +
// dataset2_i * weightset2_i to a 41-bit accumulator (one product per input
// channel, two multipliers in all). On one_digit_done_i the accumulator is
// shifted right by FRAC_W and saturated to 16 bits, the 8-bit bias of digit
// weightnum_i (sign-extended, same scale as the output) is added with
// saturation, the sum is stored as digit_o[weightnum_i] and the accumulator is
// cleared. When digit 9 is stored, mul_done_o pulses for one clock; the ten
// scores then hold until the next image. No rectification is applied to the
// scores. The block's ports and two multipliers follow the original design;
// the scaling and the saturation are this design's choices.
module fcl
  import cnn_pkg::*;
#(
  parameter int N_DIG = 10
) (
  input  logic              sys_clk_i,
  input  logic              reset_i,
  input  logic              start_i,
  input  logic              one_digit_done_i,
  input  data_t             dataset1_i,
  input  data_t             dataset2_i,
  input  data_t             weightset1_i,
  input  data_t             weightset2_i,
  input  logic [3:0]        weightnum_i,
  input  logic signed [7:0] bias_i [N_DIG],
  output logic              mul_done_o,
  output data_t             digit_o [N_DIG]
);

  acc_t acc;

  always_ff @(posedge sys_clk_i) begin
    if (reset_i) begin
      acc        <= '0;
      mul_done_o <= 1'b0;
      for (int k = 0; k < N_DIG; k++) digit_o[k] <= '0;
    end else begin
      mul_done_o <= 1'b0;
      if (one_digit_done_i) begin
        if (int'(weightnum_i) < N_DIG)
          digit_o[weightnum_i] <= add_sat(scale_sat(acc),
                                          data_t'(bias_i[weightnum_i]));
        acc        <= '0;
        mul_done_o <= (int'(weightnum_i) == N_DIG - 1);
      end else if (start_i) begin
        acc <= acc + acc_t'(dataset1_i * weightset1_i)
                   + acc_t'(dataset2_i * weightset2_i);
      end
    end
  end

  a_no_overlap: assert property (@(posedge sys_clk_i) disable iff (reset_i)
                                 !(start_i && one_digit_done_i));

endmodule
