// tb_conv_layer_2: two random 13x13 channels in two RAMs; each of the 121
// written output quadruples is compared, with its address, against the
// reference: per-channel 3x3 convolutions, saturating channel sum, bias and
// ReLU, with the layer-2 coefficients of the package. Also checks eof_o.
module tb_conv_layer_2;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset, eof_i, eof_o, re, we, in_we;
  logic [9:0] raddr, waddr, in_addr;
  data_t q0, q1, in_d0, in_d1;
  data_t d [4];
  int checks = 0, failures = 0;
  map_t m;
  int exp [4][11][11];
  int n_wr, n_eof, n_zero, n_pos;

  ram_dual_port ram0 (.clk, .we_a(in_we), .we_b(re), .addr_a(in_addr), .addr_b(raddr),
                      .data_a(in_d0), .q_b(q0));
  ram_dual_port ram1 (.clk, .we_a(in_we), .we_b(re), .addr_a(in_addr), .addr_b(raddr),
                      .data_a(in_d1), .q_b(q1));
  conv_layer_2 dut (.sys_clk_i(clk), .reset_i(reset), .eof_i, .RAM_DATA0_I(q0),
    .RAM_DATA1_I(q1), .eof_o, .ram_read_en_o(re), .ram_wr_en_o(we),
    .ram_read_addr_o(raddr), .ram_write_addr_o(waddr),
    .DATA0_O(d[0]), .DATA1_O(d[1]), .DATA2_O(d[2]), .DATA3_O(d[3]));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset) begin
    if (we) begin
      int r, c;
      r = int'(waddr) / 11; c = int'(waddr) % 11;
      check(int'(waddr) == n_wr, "write order");
      for (int f = 0; f < 4; f++) begin
        check(int'(d[f]) == exp[f][r][c], $sformatf("f%0d at %0d,%0d got %0d exp %0d",
              f, r, c, d[f], exp[f][r][c]));
        if (d[f] == 0) n_zero++; else n_pos++;
      end
      n_wr++;
    end
    if (eof_o) n_eof++;
  end

  initial begin
    int t0, t1;
    reset = 1; eof_i = 0; in_we = 0; in_addr = 0; in_d0 = 0; in_d1 = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int r = 0; r < 13; r++)
      for (int c = 0; c < 13; c++) begin
        m[0][r][c] = $urandom_range(0, 20000);
        m[1][r][c] = $urandom_range(0, 20000);
        @(negedge clk); in_we = 1; in_addr = 10'(r*13 + c);
        in_d0 = data_t'(m[0][r][c]); in_d1 = data_t'(m[1][r][c]);
      end
    @(negedge clk); in_we = 0;
    for (int f = 0; f < 4; f++)
      for (int r = 0; r < 11; r++)
        for (int c = 0; c < 11; c++) begin
          int a, b;
          a = conv9(m, 0, r, c, gen_line(2, f, 0, 0), gen_line(2, f, 0, 1), gen_line(2, f, 0, 2));
          b = conv9(m, 1, r, c, gen_line(2, f, 1, 0), gen_line(2, f, 1, 1), gen_line(2, f, 1, 2));
          exp[f][r][c] = relu(sat16(longint'(a) + longint'(b)), int'(gen_bias(2, f)));
        end
    n_wr = 0; n_eof = 0; n_zero = 0; n_pos = 0;
    @(negedge clk); eof_i = 1; t0 = $time;
    @(negedge clk); eof_i = 0;
    while (!eof_o) @(negedge clk);
    t1 = $time;
    repeat (3) @(negedge clk);
    check(n_wr == 121 && n_eof == 1, $sformatf("writes %0d eofs %0d", n_wr, n_eof));
    check(n_zero > 0 && n_pos > 0, "ReLU clamps and passes");
    check((t1 - t0) / 10 <= 23 * 121 + 10, $sformatf("frame took %0d clocks", (t1 - t0) / 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
