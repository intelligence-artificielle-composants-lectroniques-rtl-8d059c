// ram_dual_port: the 1K x 16 feature-map / coefficient memory of the CNN.
// Seventeen of these hold the input image, every intermediate feature map
// (one memory per channel) and the two halves of the FC weights.
//
// Port A writes: data_a is stored at addr_a on a rising edge with we_a high.
// Port B reads: on a rising edge with we_b high (the read enable), q_b takes
// the word at addr_b, so read data is available one cycle after the address.
// q_b holds its value while we_b is low. A read of the address written in the
// same cycle returns the old word. The port names follow the original design;
// the one-cycle registered read is this design's choice, matching the
// synchronous read of the FPGA's large RAM blocks. Memory contents are not
// reset.
module ram_dual_port #(
  parameter int DEPTH  = 1024,
  parameter int ADDR_W = 10,
  parameter int DATA_W = 16
) (
  input  logic              clk,
  input  logic              we_a,
  input  logic              we_b,
  input  logic [ADDR_W-1:0] addr_a,
  input  logic [ADDR_W-1:0] addr_b,
  input  logic [DATA_W-1:0] data_a,
  output logic [DATA_W-1:0] q_b
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a && (int'(addr_a) < DEPTH)) mem[addr_a] <= data_a;
    if (we_b) q_b <= (int'(addr_b) < DEPTH) ? mem[addr_b] : '0;
  end

endmodule
