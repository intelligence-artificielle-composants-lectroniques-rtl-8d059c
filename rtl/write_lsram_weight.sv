// write_lsram_weight: loader of the fully connected layer's weights.
//
// The FC weights are not built into the logic: the on-chip processor sends
// them at initialisation and this block writes them into a weight RAM. A
// pulse on UART_FRAME_RDY_I opens a new weight frame (address back to 0,
// RAM_WR_DONE_O low). Each clock with DATA_VALID_I high writes DATA_I at the
// next address: RAM_WR_EN_O, DATA_O and RAM_ADDRESS_O are registered, so the
// write reaches the RAM one clock after the word. A pulse on EOF_I ends the
// frame and raises RAM_WR_DONE_O, which stays high until the next frame.
// Reset is asynchronous and active low.
//
// The port names follow the original block except RAM_WR_DONE_O, added here
// to tell the FC layer that its weights are in place; the frame protocol is
// this design's choice.
module write_lsram_weight
  import cnn_pkg::*;
(
  input  logic        RESETN_I,
  input  logic        SYS_CLK_I,
  input  logic        DATA_VALID_I,
  input  logic        UART_FRAME_RDY_I,
  input  logic        EOF_I,
  input  data_t       DATA_I,
  output logic        RAM_WR_EN_O,
  output data_t       DATA_O,
  output logic [15:0] RAM_ADDRESS_O,
  output logic        RAM_WR_DONE_O
);

  logic [15:0] next_addr;

  always_ff @(posedge SYS_CLK_I or negedge RESETN_I) begin
    if (!RESETN_I) begin
      next_addr     <= '0;
      RAM_WR_EN_O   <= 1'b0;
      DATA_O        <= '0;
      RAM_ADDRESS_O <= '0;
      RAM_WR_DONE_O <= 1'b0;
    end else begin
      RAM_WR_EN_O <= 1'b0;
      if (UART_FRAME_RDY_I) begin
        next_addr     <= '0;
        RAM_WR_DONE_O <= 1'b0;
      end else begin
        if (DATA_VALID_I) begin
          RAM_WR_EN_O   <= 1'b1;
          DATA_O        <= DATA_I;
          RAM_ADDRESS_O <= next_addr;
          next_addr     <= next_addr + 16'd1;
        end
        if (EOF_I) RAM_WR_DONE_O <= 1'b1;
      end
    end
  end

endmodule
