// conv_scheduler: sequencer that computes N_FILT filters of a window on a
// single conv2d_x4.
//
// A pulse on start_i (window ready) sets mux_select_o to 0 and pulses
// start_o. Each time the convolution reports convdone_i, conv_result_i is
// stored as the result of filter mux_select_o; the selector then advances
// and start_o pulses again on the next clock, so the weight selector has
// switched the kernels before the convolution restarts. After filter
// N_FILT-1, convdone2ram_o pulses for one clock with all filter results held
// on f_result_o[0..N_FILT-1] (f1_result_o..fN_result_o of the original
// block) until the next window.
//
// Timing: start_o follows start_i or convdone_i by one clock. With conv2d_x4
// (11 clocks) a window of N_FILT filters takes 12 x N_FILT clocks. The
// original design uses this block with four filters (convolution 3) and in a
// two-filter form (convolution 4); here both are N_FILT. The handshake
// details are this design's choice.
module conv_scheduler
  import cnn_pkg::*;
#(
  parameter int N_FILT = 4
) (
  input  logic       sys_clk_i,
  input  logic       reset_i,
  input  logic       start_i,
  input  logic       convdone_i,
  input  data_t      conv_result_i,
  output logic       start_o,
  output logic       convdone2ram_o,
  output logic [1:0] mux_select_o,
  output data_t      f_result_o [N_FILT]
);

  logic busy;

  always_ff @(posedge sys_clk_i) begin
    if (reset_i) begin
      busy           <= 1'b0;
      start_o        <= 1'b0;
      convdone2ram_o <= 1'b0;
      mux_select_o   <= '0;
      for (int i = 0; i < N_FILT; i++) f_result_o[i] <= '0;
    end else begin
      start_o        <= 1'b0;
      convdone2ram_o <= 1'b0;
      if (!busy) begin
        if (start_i) begin
          busy         <= 1'b1;
          mux_select_o <= '0;
          start_o      <= 1'b1;
        end
      end else if (convdone_i) begin
        for (int i = 0; i < N_FILT; i++)
          if (int'(mux_select_o) == i) f_result_o[i] <= conv_result_i;
        if (int'(mux_select_o) == N_FILT - 1) begin
          busy           <= 1'b0;
          convdone2ram_o <= 1'b1;
        end else begin
          mux_select_o <= mux_select_o + 2'd1;
          start_o      <= 1'b1;
        end
      end
    end
  end

  initial assert (N_FILT >= 1 && N_FILT <= 4) else $error("N_FILT must be 1..4");

endmodule
