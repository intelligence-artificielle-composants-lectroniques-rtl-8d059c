// relu: bias addition and rectification at the output of a convolution.
//
// On each rising edge the unit registers result_i + bias_i (16-bit two's
// complement addition that wraps, as in the original design) and delays
// done_i by one clock to done_o. result_o is the registered sum, or zero when
// its sign bit is set. Reset is asynchronous and active low (RESETN_I), as in
// the original block; it clears done_o and the sum. Latency: one clock.
module relu
  import cnn_pkg::*;
(
  input  logic  SYS_CLK_I,
  input  logic  RESETN_I,
  input  logic  done_i,
  input  data_t result_i,
  input  data_t bias_i,
  output logic  done_o,
  output data_t result_o
);

  data_t s_result;

  always_ff @(posedge SYS_CLK_I or negedge RESETN_I) begin
    if (!RESETN_I) begin
      done_o   <= 1'b0;
      s_result <= '0;
    end else begin
      done_o   <= done_i;
      s_result <= result_i + bias_i;
    end
  end

  assign result_o = s_result[DATA_W-1] ? '0 : s_result;

endmodule
