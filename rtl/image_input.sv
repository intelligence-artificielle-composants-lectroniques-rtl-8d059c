// image_input: turns the camera's RGB565 byte stream into the 28x28 input
// image of the network.
//
// Each pixel arrives as two bytes on cam_byte_i, each marked by cam_valid_i:
// the first holds R[4:0] and G[5:3], the second G[2:0] and B[4:0]. Only the
// green field is kept. It is inverted, so the dark strokes of a digit written
// on white paper become large values, as in the MNIST images the network was
// trained on, and placed in bits [7:2] of the 16-bit pixel word (upper and
// lower bits zero), giving values 0..252. Pixels are written to the input RAM
// at addresses 0..N_PIX-1, one clock after their second byte. cam_sof_i
// (start of frame) restarts at address 0 and at the first byte. eof_o pulses
// one clock after the last pixel is written, which starts convolution 1.
//
// The byte order, the use of the inverted green field and its place in the
// 16-bit word follow the original design's pixel diagram. Cropping and
// scaling the 640x480 camera frame to 28x28 happen before this block and are
// not part of this design.
//
// Only the green field is kept; bits [4:3] carry red or blue in both bytes
// and are never read.
module image_input
  import cnn_pkg::*;
#(
  parameter int N_PIX = 784
) (
  input  logic              sys_clk_i,
  input  logic              reset_i,
  input  logic              cam_valid_i,
  input  logic [7:0]        cam_byte_i,
  input  logic              cam_sof_i,
  output logic              ram_wr_en_o,
  output logic [ADDR_W-1:0] ram_wr_addr_o,
  output data_t             ram_wr_data_o,
  output logic              eof_o
);

  logic              phase;      // 0: first byte expected
  logic [2:0]        g_hi;
  logic [ADDR_W-1:0] pix_cnt;

  always_ff @(posedge sys_clk_i) begin
    if (reset_i || cam_sof_i) begin
      phase         <= 1'b0;
      g_hi          <= '0;
      pix_cnt       <= '0;
      ram_wr_en_o   <= 1'b0;
      ram_wr_addr_o <= '0;
      ram_wr_data_o <= '0;
      eof_o         <= 1'b0;
    end else begin
      ram_wr_en_o <= 1'b0;
      eof_o       <= ram_wr_en_o && (int'(ram_wr_addr_o) == N_PIX - 1);
      if (cam_valid_i) begin
        if (!phase) begin
          g_hi  <= cam_byte_i[2:0];
          phase <= 1'b1;
        end else begin
          phase <= 1'b0;
          if (int'(pix_cnt) < N_PIX) begin
            ram_wr_en_o   <= 1'b1;
            ram_wr_addr_o <= pix_cnt;
            ram_wr_data_o <= data_t'({8'h00, ~{g_hi, cam_byte_i[7:5]}, 2'b00});
            pix_cnt       <= pix_cnt + 1'b1;
          end
        end
      end
    end
  end

endmodule
