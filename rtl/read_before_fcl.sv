// read_before_fcl: operand sequencer of the fully connected layer.
//
// The FC layer has 98 inputs (two 7x7 channels of convolution 4) and 10
// outputs. Its work is split over two multipliers: one reads channel 0 and
// its 490 weights, the other channel 1 and its 490 weights, each pair from
// its own data RAM and weight RAM. This block walks that schedule for one
// channel. It starts on conv_done_i (convolution 4 finished) once
// write_ram_done_i says the weights are loaded (a conv_done_i seen earlier is
// remembered). For digit d = 0..9 and input i = 0..N_IN-1 it reads data
// address i and weight address d*N_IN + i (one read per clock, data one clock
// later), then presents data_o, weight_o and weight_num_o = d with
// conv_start_o high for one clock. After the last input of a digit,
// one_digit_done_o pulses for one clock while weight_num_o still holds d; two
// idle clocks separate digits so the FC core can store the digit.
//
// Two instances fed with the same control inputs run in lockstep; the
// second one's addresses are unused. Timing: (N_IN + 2) x 10 + 2 clocks.
// The names follow the original design; the weight layout (digit-major) and
// the schedule are this design's choices.
module read_before_fcl
  import cnn_pkg::*;
#(
  parameter int N_IN  = 49,
  parameter int N_DIG = 10
) (
  input  logic        sys_clk_i,
  input  logic        reset_i,
  input  logic        write_ram_done_i,
  input  logic        conv_done_i,
  input  data_t       ram_weight_i,
  input  data_t       ram_data_i,
  output logic        conv_start_o,
  output logic        one_digit_done_o,
  output logic        ram_weight_read_en_o,
  output logic        ram_data_read_en_o,
  output logic [3:0]  weight_num_o,
  output logic [15:0] ram_weight_addr_o,
  output logic [15:0] ram_data_addr_o,
  output data_t       weight_o,
  output data_t       data_o
);

  typedef enum logic [1:0] {IDLE, ISSUE, GAP} state_t;
  state_t state;

  logic       pending;
  logic [3:0] d;
  logic [7:0] i;
  logic [1:0] gap;
  logic       v1, last1, last2;
  logic [3:0] d1;

  assign ram_weight_read_en_o = (state == ISSUE);
  assign ram_data_read_en_o   = (state == ISSUE);
  assign ram_data_addr_o      = 16'(i);
  assign ram_weight_addr_o    = 16'(int'(d) * N_IN + int'(i));

  always_ff @(posedge sys_clk_i) begin
    if (reset_i) begin
      state            <= IDLE;
      pending          <= 1'b0;
      d                <= '0;
      i                <= '0;
      gap              <= '0;
      v1               <= 1'b0;
      last1            <= 1'b0;
      last2            <= 1'b0;
      d1               <= '0;
      conv_start_o     <= 1'b0;
      one_digit_done_o <= 1'b0;
      weight_num_o     <= '0;
      weight_o         <= '0;
      data_o           <= '0;
    end else begin
      // read pipeline: address this clock, RAM data next clock, output after
      v1           <= (state == ISSUE);
      last1        <= (state == ISSUE) && (int'(i) == N_IN - 1);
      d1           <= d;
      conv_start_o <= v1;
      last2        <= v1 && last1;
      if (v1) begin
        weight_o     <= ram_weight_i;
        data_o       <= ram_data_i;
        weight_num_o <= d1;
      end
      one_digit_done_o <= last2;

      if (conv_done_i) pending <= 1'b1;
      unique case (state)
        IDLE: if ((pending || conv_done_i) && write_ram_done_i) begin
          pending <= 1'b0;
          d       <= '0;
          i       <= '0;
          state   <= ISSUE;
        end
        ISSUE: begin
          if (int'(i) == N_IN - 1) begin
            i     <= '0;
            gap   <= '0;
            state <= GAP;
          end else begin
            i <= i + 8'd1;
          end
        end
        GAP: begin
          gap <= gap + 2'd1;
          if (gap == 2'd2) begin
            if (int'(d) == N_DIG - 1) state <= IDLE;
            else begin
              d     <= d + 4'd1;
              state <= ISSUE;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
