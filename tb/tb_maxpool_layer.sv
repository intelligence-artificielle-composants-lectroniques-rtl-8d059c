// tb_maxpool_layer: two random 26x26 channels (signed values) in two RAMs;
// each of the 169 written pairs is compared, with its address, to the maximum
// of its 2x2 block. Also checks eof_o and the 6-clock-per-output timing.
// The top-left 4x4 corner of channel 1 holds a textbook example of 2x2
// pooling, whose four results (100 184 / 12 45) are checked as literals.
module tb_maxpool_layer;
  import cnn_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset, eof_i, eof_o, re, we, in_we;
  logic [9:0] raddr, waddr, in_addr;
  data_t q0, q1, d0, d1, in_d0, in_d1;
  int checks = 0, failures = 0;
  int m [2][26][26];
  int n_wr, n_eof;
  // textbook 4x4 example and its pooled result
  localparam int EX [4][4] = '{'{29, 15, 28, 184}, '{0, 100, 70, 38},
                               '{12, 12, 7, 2}, '{12, 12, 45, 6}};
  localparam int EX_POOL [2][2] = '{'{100, 184}, '{12, 45}};

  ram_dual_port ram0 (.clk, .we_a(in_we), .we_b(re), .addr_a(in_addr), .addr_b(raddr),
                      .data_a(in_d0), .q_b(q0));
  ram_dual_port ram1 (.clk, .we_a(in_we), .we_b(re), .addr_a(in_addr), .addr_b(raddr),
                      .data_a(in_d1), .q_b(q1));
  maxpool_layer dut (.sys_clk_i(clk), .reset_i(reset), .eof_i, .RAM_DATA0_I(q0),
    .RAM_DATA1_I(q1), .eof_o, .ram_read_en_o(re), .ram_wr_en_o(we),
    .ram_wr_addr_o(waddr), .DATA0_O(d0), .DATA1_O(d1), .ram_read_addr_o_0(raddr));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int max4(int ch, int r, int c);
    int v;
    v = m[ch][2*r][2*c];
    if (m[ch][2*r][2*c+1] > v)   v = m[ch][2*r][2*c+1];
    if (m[ch][2*r+1][2*c] > v)   v = m[ch][2*r+1][2*c];
    if (m[ch][2*r+1][2*c+1] > v) v = m[ch][2*r+1][2*c+1];
    return v;
  endfunction

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
      r = int'(waddr) / 13; c = int'(waddr) % 13;
      check(int'(waddr) == n_wr, "write order");
      check(int'(d0) == max4(0, r, c) && int'(d1) == max4(1, r, c),
            $sformatf("pool %0d,%0d got %0d %0d exp %0d %0d", r, c, d0, d1,
                      max4(0, r, c), max4(1, r, c)));
      if (r < 2 && c < 2)
        check(int'(d1) == EX_POOL[r][c], $sformatf("example %0d,%0d got %0d", r, c, d1));
      n_wr++;
    end
    if (eof_o) n_eof++;
  end

  initial begin
    int t0, t1;
    reset = 1; eof_i = 0; in_we = 0; in_addr = 0; in_d0 = 0; in_d1 = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int r = 0; r < 26; r++)
      for (int c = 0; c < 26; c++) begin
        m[0][r][c] = int'(data_t'($urandom));
        m[1][r][c] = (r < 4 && c < 4) ? EX[r][c] : $urandom_range(0, 300);
        @(negedge clk); in_we = 1; in_addr = 10'(r*26 + c);
        in_d0 = data_t'(m[0][r][c]); in_d1 = data_t'(m[1][r][c]);
      end
    @(negedge clk); in_we = 0;
    n_wr = 0; n_eof = 0;
    @(negedge clk); eof_i = 1; t0 = $time;
    @(negedge clk); eof_i = 0;
    while (!eof_o) @(negedge clk);
    t1 = $time;
    repeat (3) @(negedge clk);
    check(n_wr == 169 && n_eof == 1, $sformatf("writes %0d eofs %0d", n_wr, n_eof));
    check((t1 - t0) / 10 <= 6 * 169 + 4, $sformatf("frame took %0d clocks", (t1 - t0) / 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
