// tb_conv_layer_34: convolution 3 (11x11x4 -> 9x9x4) and convolution 4
// (9x9x4 -> 7x7x2), each fed from four RAMs holding random maps. Every
// written output is compared, with its address, against the reference (four
// channel convolutions, saturating sum, bias, ReLU with the layer's
// coefficients). Also checks eof_o, that all filters were selected in turn
// and the frame time.
module tb_conv_layer_34;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset, eof_i, in_we;
  logic [9:0] in_addr;
  data_t in_d [4];
  logic eof3, re3, we3, eof4, re4, we4;
  logic [9:0] ra3, wa3, ra4, wa4;
  data_t q3 [4];
  data_t q4 [4];
  data_t d3 [4];
  data_t d4 [2];
  int checks = 0, failures = 0;
  map_t m3, m4;
  int exp3 [4][9][9];
  int exp4 [2][7][7];
  int n3 = 0, n4 = 0, e3 = 0, e4 = 0, nz = 0;

  for (genvar c = 0; c < 4; c++) begin : g_ram
    ram_dual_port r3 (.clk, .we_a(in_we), .we_b(re3), .addr_a(in_addr), .addr_b(ra3),
                      .data_a(in_d[c]), .q_b(q3[c]));
    ram_dual_port r4 (.clk, .we_a(in_we), .we_b(re4), .addr_a(in_addr), .addr_b(ra4),
                      .data_a(in_d[c]), .q_b(q4[c]));
  end

  conv_layer_34 dut3 (.sys_clk_i(clk), .reset_i(reset), .eof_i, .RAM_DATA_I(q3),
    .eof_o(eof3), .ram_read_en_o(re3), .ram_wr_en_o(we3), .ram_read_addr_o(ra3),
    .ram_wr_addr_o(wa3), .DATA_O(d3));
  conv_layer_34 #(.LAYER(4)) dut4 (.sys_clk_i(clk), .reset_i(reset), .eof_i,
    .RAM_DATA_I(q4), .eof_o(eof4), .ram_read_en_o(re4), .ram_wr_en_o(we4),
    .ram_read_addr_o(ra4), .ram_wr_addr_o(wa4), .DATA_O(d4));

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
    if (we3) begin
      int r, c;
      r = int'(wa3) / 9; c = int'(wa3) % 9;
      check(int'(wa3) == n3, "L3 write order");
      for (int f = 0; f < 4; f++) begin
        check(int'(d3[f]) == exp3[f][r][c], $sformatf("L3 f%0d %0d,%0d got %0d exp %0d",
              f, r, c, d3[f], exp3[f][r][c]));
        if (d3[f] == 0) nz++;
      end
      n3++;
    end
    if (we4) begin
      int r, c;
      r = int'(wa4) / 7; c = int'(wa4) % 7;
      check(int'(wa4) == n4, "L4 write order");
      for (int f = 0; f < 2; f++)
        check(int'(d4[f]) == exp4[f][r][c], $sformatf("L4 f%0d %0d,%0d got %0d exp %0d",
              f, r, c, d4[f], exp4[f][r][c]));
      n4++;
    end
    if (eof3) e3++;
    if (eof4) e4++;
  end

  function automatic int ref_px(const ref map_t m, input int layer, int f, int r, int c);
    longint s;
    s = 0;
    for (int ch = 0; ch < 4; ch++)
      s += conv9(m, ch, r, c, gen_line(layer, f, ch, 0), gen_line(layer, f, ch, 1),
                 gen_line(layer, f, ch, 2));
    return relu(sat16(s), int'(gen_bias(layer, f)));
  endfunction

  initial begin
    int t0, t3, t4;
    reset = 1; eof_i = 0; in_we = 0; in_addr = 0;
    for (int c = 0; c < 4; c++) in_d[c] = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    // the same random 11x11 maps go to both sets of RAMs; layer 4 uses 9x9 of them
    for (int r = 0; r < 11; r++)
      for (int c = 0; c < 11; c++) begin
        @(negedge clk); in_we = 1;
        for (int ch = 0; ch < 4; ch++) begin
          m3[ch][r][c] = $urandom_range(0, 12000);
          in_d[ch] = data_t'(m3[ch][r][c]);
        end
        in_addr = 10'(r*11 + c);
      end
    @(negedge clk); in_we = 0;
    // layer 4 reads row-major with width 9: address a -> (a/9, a%9) of the stored words
    for (int ch = 0; ch < 4; ch++)
      for (int a = 0; a < 81; a++) m4[ch][a/9][a%9] = m3[ch][a/11][a%11];
    for (int f = 0; f < 4; f++)
      for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) exp3[f][r][c] = ref_px(m3, 3, f, r, c);
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < 7; r++) for (int c = 0; c < 7; c++) exp4[f][r][c] = ref_px(m4, 4, f, r, c);
    @(negedge clk); eof_i = 1; t0 = $time;
    @(negedge clk); eof_i = 0;
    t3 = 0; t4 = 0;
    while (t3 == 0 || t4 == 0) begin
      @(negedge clk);
      if (eof3) t3 = $time;
      if (eof4) t4 = $time;
    end
    repeat (3) @(negedge clk);
    check(n3 == 81 && e3 == 1, $sformatf("L3 writes %0d eofs %0d", n3, e3));
    check(n4 == 49 && e4 == 1, $sformatf("L4 writes %0d eofs %0d", n4, e4));
    check(nz > 0, "ReLU clamped");
    check((t3 - t0) / 10 <= 81 * (16 + 12 * 4) + 5, $sformatf("L3 took %0d", (t3 - t0) / 10));
    check((t4 - t0) / 10 <= 49 * (16 + 12 * 2) + 5, $sformatf("L4 took %0d", (t4 - t0) / 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
