// max_comp: recognised digit, the index of the largest of the ten FC scores.
//
// On a clock edge with DATA_VALID_I high, DATA_OUT_O takes the index of the
// largest signed value among DATA_IN_I[0..9] (the lowest index on a tie) and
// DATA_VALID_O pulses for one clock; DATA_OUT_O holds until the next valid
// set. The comparison is a linear chain of nine compare-selects evaluated in
// one clock. Reset is asynchronous and active low. The block and its role
// follow the original design; DATA_VALID_O and the tie rule are this
// design's choices.
module max_comp
  import cnn_pkg::*;
#(
  parameter int N = 10
) (
  input  logic       RESETN_I,
  input  logic       SYS_CLK_I,
  input  logic       DATA_VALID_I,
  input  data_t      DATA_IN_I [N],
  output logic [3:0] DATA_OUT_O,
  output logic       DATA_VALID_O
);

  logic [3:0] idx;

  always_comb begin
    data_t best;
    best = DATA_IN_I[0];
    idx  = '0;
    for (int k = 1; k < N; k++)
      if (DATA_IN_I[k] > best) begin
        best = DATA_IN_I[k];
        idx  = 4'(k);
      end
  end

  always_ff @(posedge SYS_CLK_I or negedge RESETN_I) begin
    if (!RESETN_I) begin
      DATA_OUT_O   <= '0;
      DATA_VALID_O <= 1'b0;
    end else begin
      DATA_VALID_O <= DATA_VALID_I;
      if (DATA_VALID_I) DATA_OUT_O <= idx;
    end
  end

endmodule
