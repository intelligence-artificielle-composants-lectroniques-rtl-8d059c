// tb_conv_3x3: random windows and kernels, including extreme values that
// saturate; the result is compared with the integer reference and done_o must
// come exactly 9 clocks after start_i.
module tb_conv_3x3;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  reset, start, done;
  line_t p [3];
  line_t w [3];
  data_t res;
  int checks = 0, failures = 0;
  int n_sat = 0;
  map_t m;

  conv_3x3 dut (.sys_clk_i(clk), .reset_i(reset), .start_i(start),
                .pix_line1_i(p[0]), .pix_line2_i(p[1]), .pix_line3_i(p[2]),
                .wgt_line1_i(w[0]), .wgt_line2_i(w[1]), .wgt_line3_i(w[2]),
                .done_o(done), .result_o(res));

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
    reset = 1; start = 0;
    for (int i = 0; i < 3; i++) begin p[i] = '0; w[i] = '0; end
    repeat (3) @(negedge clk);
    reset = 0;
    for (int n = 0; n < 400; n++) begin
      int exp, lat;
      for (int i = 0; i < 3; i++) begin
        if (n % 5 == 4) begin   // extremes
          p[i] = {3{16'h7fff}};
          w[i] = (n % 10 == 4) ? {3{16'h7fff}} : {3{16'h8000}};
        end else begin
          p[i] = {16'($urandom), 16'($urandom), 16'($urandom)};
          w[i] = {16'($urandom), 16'($urandom), 16'($urandom)};
          if (n % 2 == 0) p[i] = p[i] & {3{16'h00ff}};
        end
        for (int j = 0; j < 3; j++) m[0][i][j] = col_of(p[i], j);
      end
      exp = conv9(m, 0, 0, 0, w[0], w[1], w[2]);
      if (exp == 32767 || exp == -32768) n_sat++;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 0;   // clock edges since the edge that sampled start
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      check(lat == 9, $sformatf("latency %0d", lat));
      check(int'(res) == exp, $sformatf("result %0d exp %0d", res, exp));
      @(negedge clk);
      check(!done && int'(res) == exp, "done is one clock, result held");
    end
    check(n_sat > 10, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
