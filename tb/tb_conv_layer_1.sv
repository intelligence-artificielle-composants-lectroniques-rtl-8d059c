// tb_conv_layer_1: a random 28x28 image in the input RAM; every one of the
// 676 output pixel pairs written by the layer is compared, with its address,
// against the reference convolution with the trained first-layer kernels,
// bias and ReLU. Also checks eof_o and the frame time. Two images are run.
module tb_conv_layer_1;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset, eof_i, eof_o, re, we, in_we;
  logic [9:0] raddr, waddr, in_addr;
  data_t rdata, d0, d1, in_data;
  int checks = 0, failures = 0;
  map_t m;
  int exp [2][26][26];
  int n_wr, n_eof, n_zero, n_pos;

  ram_dual_port ram (.clk, .we_a(in_we), .we_b(re), .addr_a(in_addr), .addr_b(raddr),
                     .data_a(in_data), .q_b(rdata));
  conv_layer_1 dut (.sys_clk_i(clk), .reset_i(reset), .eof_i, .RAM_DATA_I(rdata),
    .eof_o, .ram_read_en_o(re), .ram_wr_en_o(we), .ram_read_addr_o(raddr),
    .ram_wr_addr_o(waddr), .DATA0_O(d0), .DATA1_O(d1));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset) begin
    if (we) begin
      int r, c;
      r = int'(waddr) / 26; c = int'(waddr) % 26;
      check(int'(waddr) == n_wr, $sformatf("write address %0d exp %0d", waddr, n_wr));
      check(int'(d0) == exp[0][r][c] && int'(d1) == exp[1][r][c],
            $sformatf("pixel %0d,%0d got %0d %0d exp %0d %0d", r, c, d0, d1,
                      exp[0][r][c], exp[1][r][c]));
      if (d0 == 0) n_zero++; else n_pos++;
      if (d1 == 0) n_zero++; else n_pos++;
      n_wr++;
    end
    if (eof_o) begin
      n_eof++;
      check(n_wr == 676, "eof_o after the last write");
    end
  end

  initial begin
    reset = 1; eof_i = 0; in_we = 0; in_addr = 0; in_data = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int img = 0; img < 2; img++) begin
      int t0, t1;
      for (int r = 0; r < 28; r++)
        for (int c = 0; c < 28; c++) begin
          m[0][r][c] = (img == 0) ? 4 * $urandom_range(0, 63) : $urandom_range(0, 32767);
          @(negedge clk); in_we = 1; in_addr = 10'(r*28 + c); in_data = data_t'(m[0][r][c]);
        end
      @(negedge clk); in_we = 0;
      for (int f = 0; f < 2; f++)
        for (int r = 0; r < 26; r++)
          for (int c = 0; c < 26; c++)
            exp[f][r][c] = relu(conv9(m, 0, r, c, CONV1_W[f][0], CONV1_W[f][1], CONV1_W[f][2]),
                                int'(CONV1_B[f]));
      n_wr = 0; n_eof = 0; n_zero = 0; n_pos = 0;
      @(negedge clk); eof_i = 1; t0 = $time;
      @(negedge clk); eof_i = 0;
      while (!eof_o) @(negedge clk);
      t1 = $time;
      repeat (3) @(negedge clk);
      check(n_wr == 676 && n_eof == 1, $sformatf("writes %0d eofs %0d", n_wr, n_eof));
      if (img == 0) check(n_zero > 0 && n_pos > 0, "ReLU clamps and passes");
      check((t1 - t0) / 10 <= 21 * 676 + 10, $sformatf("frame took %0d clocks", (t1 - t0) / 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
