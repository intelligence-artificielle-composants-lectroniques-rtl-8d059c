// read_lsram: window reader of a convolution layer.
//
// The input feature map of one channel is stored row-major in a RAM
// (address = row * IN_W + column). A pulse on eof_i starts a scan of every
// 3x3 window of the map, left to right and top to bottom, giving
// (IN_W-2) x (IN_W-2) windows. For each window the reader issues nine reads,
// one per clock (ram_read_en_o with ram_addr_o, data expected on ram_data_i
// one clock later), packs the nine pixels into line1_o..line3_o (three 16-bit
// pixels per line, leftmost column in bits [47:32]) and pulses conv_start_o.
// It then holds the lines until conv_done_i, moves to the next window,
// pulsing line_end_o when it leaves the last window of a row and frame_end_o
// when the last window of the map is done.
//
// Timing: conv_start_o comes 10 clocks after the window's first read. Several
// readers fed with the same eof_i and conv_done_i run in lockstep, so a layer
// with several input channels uses one reader per channel RAM and one
// address. The original design names the block and its ports; the nine-read
// fetch per window is this design's choice.
module read_lsram
  import cnn_pkg::*;
#(
  parameter int IN_W = 28
) (
  input  logic              sys_clk_i,
  input  logic              reset_i,
  input  logic              eof_i,
  input  logic              conv_done_i,
  input  data_t             ram_data_i,
  output logic              line_end_o,
  output logic              frame_end_o,
  output logic              conv_start_o,
  output logic              ram_read_en_o,
  output logic [ADDR_W-1:0] ram_addr_o,
  output line_t             line1_o,
  output line_t             line2_o,
  output line_t             line3_o
);

  localparam int OUT_W = IN_W - 2;

  typedef enum logic [1:0] {IDLE, FETCH, DRAIN, WAIT} state_t;
  state_t state;

  logic [ADDR_W-1:0] row, col;     // top-left corner of the window
  logic [3:0]        k;            // tap being read
  logic              cap_v;        // ram_data_i holds tap cap_k this clock
  logic [3:0]        cap_k;
  data_t             win [9];

  always_comb begin
    logic [1:0] dr, dc;
    dr = 2'(k / 4'd3);
    dc = 2'(k % 4'd3);
    ram_read_en_o = (state == FETCH);
    ram_addr_o    = ADDR_W'((int'(row) + int'(dr)) * IN_W + int'(col) + int'(dc));
  end

  assign line1_o = {win[0], win[1], win[2]};
  assign line2_o = {win[3], win[4], win[5]};
  assign line3_o = {win[6], win[7], win[8]};

  always_ff @(posedge sys_clk_i) begin
    if (reset_i) begin
      state        <= IDLE;
      row          <= '0;
      col          <= '0;
      k            <= '0;
      cap_v        <= 1'b0;
      cap_k        <= '0;
      conv_start_o <= 1'b0;
      line_end_o   <= 1'b0;
      frame_end_o  <= 1'b0;
      for (int i = 0; i < 9; i++) win[i] <= '0;
    end else begin
      conv_start_o <= 1'b0;
      line_end_o   <= 1'b0;
      frame_end_o  <= 1'b0;
      cap_v        <= (state == FETCH);
      cap_k        <= k;
      if (cap_v) win[cap_k] <= ram_data_i;
      unique case (state)
        IDLE: if (eof_i) begin
          row   <= '0;
          col   <= '0;
          k     <= '0;
          state <= FETCH;
        end
        FETCH: begin
          if (k == 4'd8) state <= DRAIN;
          else           k     <= k + 4'd1;
        end
        DRAIN: begin                 // last tap arrives this clock
          conv_start_o <= 1'b1;
          state        <= WAIT;
        end
        WAIT: if (conv_done_i) begin
          k <= '0;
          if (int'(col) == OUT_W - 1) begin
            line_end_o <= 1'b1;
            col        <= '0;
            if (int'(row) == OUT_W - 1) begin
              frame_end_o <= 1'b1;
              state       <= IDLE;
            end else begin
              row   <= row + 1'b1;
              state <= FETCH;
            end
          end else begin
            col   <= col + 1'b1;
            state <= FETCH;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
