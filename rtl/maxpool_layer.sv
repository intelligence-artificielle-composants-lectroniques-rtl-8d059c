// maxpool_layer: 2x2 max pooling with stride 2, 26x26x2 -> 13x13x2.
//
// A pulse on eof_i starts the layer. For each output position (r, c) the
// unit reads the four pixels at rows 2r..2r+1 and columns 2c..2c+1 from both
// channel RAMs at once (one shared address, ram_read_addr_o_0, read data one
// clock later on RAM_DATA0_I / RAM_DATA1_I), keeps the signed maximum of each
// channel and writes the two maxima at address r*13+c with ram_wr_en_o high
// for one clock. eof_o pulses one clock after the last write.
//
// Timing: 6 clocks per output position, about 1,000 clocks per frame. The
// pool size, stride and map sizes follow the original design; the read order
// and the sequencing are this design's choices.
module maxpool_layer
  import cnn_pkg::*;
#(
  parameter int IN_W = 26
) (
  input  logic              sys_clk_i,
  input  logic              reset_i,
  input  logic              eof_i,
  input  data_t             RAM_DATA0_I,
  input  data_t             RAM_DATA1_I,
  output logic              eof_o,
  output logic              ram_read_en_o,
  output logic              ram_wr_en_o,
  output logic [ADDR_W-1:0] ram_wr_addr_o,
  output data_t             DATA0_O,
  output data_t             DATA1_O,
  output logic [ADDR_W-1:0] ram_read_addr_o_0
);

  localparam int OUT_W = IN_W / 2;

  typedef enum logic [1:0] {IDLE, READ, LAST, WRITE} state_t;
  state_t state;

  logic [ADDR_W-1:0] r, c;
  logic [1:0]        k;      // tap being read
  logic              cap_v, cap_first;
  data_t             m0, m1;

  assign ram_read_en_o     = (state == READ);
  assign ram_read_addr_o_0 = ADDR_W'((2 * int'(r) + int'(k[1])) * IN_W
                                     + 2 * int'(c) + int'(k[0]));

  always_ff @(posedge sys_clk_i) begin
    if (reset_i) begin
      state         <= IDLE;
      r             <= '0;
      c             <= '0;
      k             <= '0;
      cap_v         <= 1'b0;
      cap_first     <= 1'b0;
      m0            <= '0;
      m1            <= '0;
      ram_wr_en_o   <= 1'b0;
      ram_wr_addr_o <= '0;
      DATA0_O       <= '0;
      DATA1_O       <= '0;
      eof_o         <= 1'b0;
    end else begin
      ram_wr_en_o <= 1'b0;
      eof_o       <= 1'b0;
      cap_v       <= (state == READ);
      cap_first   <= (state == READ) && (k == 2'd0);
      if (cap_v) begin
        m0 <= (cap_first || RAM_DATA0_I > m0) ? RAM_DATA0_I : m0;
        m1 <= (cap_first || RAM_DATA1_I > m1) ? RAM_DATA1_I : m1;
      end
      unique case (state)
        IDLE: if (eof_i) begin
          r     <= '0;
          c     <= '0;
          k     <= '0;
          state <= READ;
        end
        READ: begin
          k <= k + 2'd1;
          if (k == 2'd3) state <= LAST;
        end
        LAST: state <= WRITE;        // last tap captured at the end of LAST
        WRITE: begin
          ram_wr_en_o   <= 1'b1;
          ram_wr_addr_o <= ADDR_W'(int'(r) * OUT_W + int'(c));
          DATA0_O       <= m0;
          DATA1_O       <= m1;
          if (int'(c) == OUT_W - 1) begin
            c <= '0;
            if (int'(r) == OUT_W - 1) begin
              state <= IDLE;
            end else begin
              r     <= r + 1'b1;
              state <= READ;
            end
          end else begin
            c     <= c + 1'b1;
            state <= READ;
          end
        end
        default: state <= IDLE;
      endcase
      // end of frame: one clock after the last write
      if (ram_wr_en_o && int'(ram_wr_addr_o) == OUT_W * OUT_W - 1) eof_o <= 1'b1;
    end
  end

endmodule
