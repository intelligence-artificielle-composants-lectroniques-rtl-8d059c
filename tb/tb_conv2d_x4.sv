// tb_conv2d_x4: random four-channel windows, kernels and biases, including
// large values that saturate the channel sum; checks the result against the
// reference and the 11-clock latency.
module tb_conv2d_x4;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  reset, start, done;
  line_t pix [4][3];
  line_t wgt [4][3];
  data_t bias, res;
  int checks = 0, failures = 0, n_sat = 0, n_zero = 0;
  map_t m;

  conv2d_x4 dut (.sys_clk_i(clk), .reset_i(reset), .start_i(start), .pix_i(pix),
                 .wgt_i(wgt), .f1_bias_i(bias), .done_o(done), .result_o(res));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; start = 0; bias = 0;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 3; r++) begin pix[c][r] = '0; wgt[c][r] = '0; end
    repeat (2) @(negedge clk);
    reset = 0;
    for (int n = 0; n < 300; n++) begin
      longint s;
      int exp, lat, part;
      s = 0;
      for (int c = 0; c < 4; c++) begin
        for (int r = 0; r < 3; r++) begin
          pix[c][r] = {16'($urandom_range(0, (n % 3 == 0) ? 32767 : 2000)),
                       16'($urandom_range(0, 2000)), 16'($urandom_range(0, 2000))};
          wgt[c][r] = {16'($urandom), 16'($urandom), 16'($urandom)};
          for (int j = 0; j < 3; j++) m[c][r][j] = col_of(pix[c][r], j);
        end
        part = conv9(m, c, 0, 0, wgt[c][0], wgt[c][1], wgt[c][2]);
        s += part;
      end
      bias = data_t'($urandom_range(0, 200) - 100);
      if (s > 32767 || s < -32768) n_sat++;
      exp = relu(sat16(s), int'(bias));
      if (exp == 0) n_zero++;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 0;
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      check(lat == 11, $sformatf("latency %0d", lat));
      check(int'(res) == exp, $sformatf("result %0d exp %0d", res, exp));
    end
    check(n_sat > 5 && n_zero > 5, "saturation and clamping exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
