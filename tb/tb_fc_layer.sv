// tb_fc_layer: two 7x7 channels and two 490-word weight sets in four RAMs;
// after conv_done_i the ten scores must equal the reference (98 exact
// products, shift, saturation, bias from the package), one_digit_done_o must
// pulse once, and the run must take at most 525 clocks. Two runs.
module tb_fc_layer;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset, wdone, cdone, done, wre, dre, in_we;
  logic [15:0] waddr, daddr;
  logic [9:0] in_addr;
  data_t in_v [4];
  data_t q [4];      // weight 0, data 0, weight 1, data 1
  data_t digit [10];
  int checks = 0, failures = 0, n_done = 0;
  int mem [4][490];

  for (genvar k = 0; k < 4; k++) begin : g_ram
    ram_dual_port r (.clk, .we_a(in_we), .we_b((k % 2 == 0) ? wre : dre), .addr_a(in_addr),
                     .addr_b((k % 2 == 0) ? waddr[9:0] : daddr[9:0]), .data_a(in_v[k]), .q_b(q[k]));
  end

  fc_layer dut (.sys_clk_i(clk), .reset_i(reset), .write_ram_done_i(wdone), .conv_done_i(cdone),
    .ram_weight_i_0(q[0]), .ram_data_i_0(q[1]), .ram_weight_i_1(q[2]), .ram_data_i_1(q[3]),
    .one_digit_done_o(done), .ram_weight_read_en_o(wre), .ram_data_read_en_o(dre),
    .digit_o(digit), .ram_weight_addr_o(waddr), .ram_data_addr_o(daddr));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset && done) n_done++;

  initial begin
    reset = 1; wdone = 1; cdone = 0; in_we = 0; in_addr = 0;
    for (int k = 0; k < 4; k++) in_v[k] = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int run = 0; run < 2; run++) begin
      int t0, t1;
      for (int a = 0; a < 490; a++) begin
        mem[0][a] = int'(data_t'($urandom));
        mem[2][a] = int'(data_t'($urandom));
        mem[1][a] = (a < 49) ? $urandom_range(0, 3000) : 0;
        mem[3][a] = (a < 49) ? $urandom_range(0, 3000) : 0;
        @(negedge clk); in_we = 1; in_addr = 10'(a);
        for (int k = 0; k < 4; k++) in_v[k] = data_t'(mem[k][a]);
      end
      @(negedge clk); in_we = 0;
      n_done = 0;
      @(negedge clk); cdone = 1; t0 = $time;
      @(negedge clk); cdone = 0;
      while (!done) @(negedge clk);
      t1 = $time;
      for (int d = 0; d < 10; d++) begin
        longint s;
        int e;
        s = 0;
        for (int i = 0; i < 49; i++)
          s += longint'(mem[1][i]) * longint'(mem[0][d*49+i])
             + longint'(mem[3][i]) * longint'(mem[2][d*49+i]);
        e = sat16(longint'(scale(s)) + longint'(fc_bias(d)));
        check(int'(digit[d]) == e, $sformatf("run %0d digit %0d = %0d exp %0d", run, d, digit[d], e));
      end
      repeat (5) @(negedge clk);
      check(n_done == 1, "one done pulse");
      check((t1 - t0) / 10 <= 525, $sformatf("FC took %0d clocks", (t1 - t0) / 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
