// conv_3x3: one 3x3 convolution window on one multiplier.
//
// A pulse on start_i begins the dot product of the nine pixels in
// pix_line1..3_i with the nine coefficients in wgt_line1..3_i (each line holds
// three signed 16-bit words, leftmost column in bits [47:32]). One product is
// added to a 41-bit accumulator per clock, so the unit maps onto a single
// 18x18 multiply-accumulate block, as in the original design where each
// convolution uses one MACC. After the ninth product, done_o pulses for one
// cycle and result_o holds the sum shifted right by FRAC_W and saturated to
// 16 bits until the next result.
//
// Timing: done_o is high 9 clocks after the clock edge that saw start_i. The
// pixel and weight lines are read during those 9 clocks and must stay stable;
// the window readers and weight selectors that drive them do so. A start_i
// while busy is ignored. The accumulator width follows the design notes
// (2 x pixel bits + 9); the serial order and the output scaling are this
// design's choices.
module conv_3x3
  import cnn_pkg::*;
(
  input  logic  sys_clk_i,
  input  logic  reset_i,
  input  logic  start_i,
  input  line_t pix_line1_i,
  input  line_t pix_line2_i,
  input  line_t pix_line3_i,
  input  line_t wgt_line1_i,
  input  line_t wgt_line2_i,
  input  line_t wgt_line3_i,
  output logic  done_o,
  output data_t result_o
);

  logic       busy;
  logic [3:0] k;          // tap index 0..8, row-major
  acc_t       acc;
  data_t      pix, wgt;
  acc_t       sum;

  // Select tap k: row k/3, column k%3 (column 0 in the top 16 bits).
  always_comb begin
    line_t pl, wl;
    unique case (k)
      4'd0, 4'd1, 4'd2: begin pl = pix_line1_i; wl = wgt_line1_i; end
      4'd3, 4'd4, 4'd5: begin pl = pix_line2_i; wl = wgt_line2_i; end
      default:          begin pl = pix_line3_i; wl = wgt_line3_i; end
    endcase
    unique case (k)
      4'd0, 4'd3, 4'd6: begin pix = pl[47:32]; wgt = wl[47:32]; end
      4'd1, 4'd4, 4'd7: begin pix = pl[31:16]; wgt = wl[31:16]; end
      default:          begin pix = pl[15:0];  wgt = wl[15:0];  end
    endcase
    sum = acc + acc_t'(pix * wgt);
  end

  always_ff @(posedge sys_clk_i) begin
    if (reset_i) begin
      busy     <= 1'b0;
      k        <= '0;
      acc      <= '0;
      done_o   <= 1'b0;
      result_o <= '0;
    end else begin
      done_o <= 1'b0;
      if (!busy) begin
        if (start_i) begin
          busy <= 1'b1;
          k    <= '0;
          acc  <= '0;
        end
      end else if (k == 4'd8) begin
        busy     <= 1'b0;
        done_o   <= 1'b1;
        result_o <= scale_sat(sum);
      end else begin
        acc <= sum;
        k   <= k + 4'd1;
      end
    end
  end

endmodule
