// tb_read_before_fcl: a data RAM with 49 random words and a weight RAM with
// 490 random words. Checks that nothing starts before the weights are marked
// loaded, that a conv_done_i seen earlier is remembered, that every operand
// pair arrives in order (digit-major weights) with the right digit number,
// that one_digit_done_o follows each digit's last pair, and the run time.
module tb_read_before_fcl;
  import cnn_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset, wdone, cdone, start, dd, wre, dre, in_we;
  logic [3:0] wnum;
  logic [15:0] waddr, daddr;
  logic [9:0] in_addr;
  data_t wq, dq, w_o, d_o, in_w, in_d;
  int checks = 0, failures = 0;
  data_t wm [490];
  data_t dm [49];
  int n_st, n_dd;

  ram_dual_port rw (.clk, .we_a(in_we), .we_b(wre), .addr_a(in_addr), .addr_b(waddr[9:0]),
                    .data_a(in_w), .q_b(wq));
  ram_dual_port rd (.clk, .we_a(in_we), .we_b(dre), .addr_a(in_addr), .addr_b(daddr[9:0]),
                    .data_a(in_d), .q_b(dq));
  read_before_fcl dut (.sys_clk_i(clk), .reset_i(reset), .write_ram_done_i(wdone),
    .conv_done_i(cdone), .ram_weight_i(wq), .ram_data_i(dq), .conv_start_o(start),
    .one_digit_done_o(dd), .ram_weight_read_en_o(wre), .ram_data_read_en_o(dre),
    .weight_num_o(wnum), .ram_weight_addr_o(waddr), .ram_data_addr_o(daddr),
    .weight_o(w_o), .data_o(d_o));

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

  always @(posedge clk) if (!reset) begin
    if (start) begin
      int d, i;
      d = n_st / 49; i = n_st % 49;
      check(int'(wnum) == d && d_o == dm[i] && w_o == wm[d*49 + i],
            $sformatf("operand %0d: num %0d data %h weight %h", n_st, wnum, d_o, w_o));
      check(!dd, "no digit done with an operand");
      n_st++;
    end
    if (dd) begin
      check(n_st == 49 * (n_dd + 1) && int'(wnum) == n_dd,
            $sformatf("digit done %0d after %0d operands, num %0d", n_dd, n_st, wnum));
      n_dd++;
    end
  end

  initial begin
    int t0, t1;
    reset = 1; wdone = 0; cdone = 0; in_we = 0; in_addr = 0; in_w = 0; in_d = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int a = 0; a < 490; a++) begin
      wm[a] = data_t'($urandom);
      if (a < 49) dm[a] = data_t'($urandom);
      @(negedge clk); in_we = 1; in_addr = 10'(a); in_w = wm[a]; in_d = (a < 49) ? dm[a] : '0;
    end
    @(negedge clk); in_we = 0;
    for (int run = 0; run < 2; run++) begin
      n_st = 0; n_dd = 0;
      if (run == 0) begin
        @(negedge clk); cdone = 1;
        @(negedge clk); cdone = 0;
        repeat (20) @(negedge clk);
        check(n_st == 0 && !wre, "waits for the weights");
        wdone = 1; t0 = $time;
      end else begin
        @(negedge clk); cdone = 1; t0 = $time;
        @(negedge clk); cdone = 0;
      end
      while (n_dd < 10) @(negedge clk);
      t1 = $time;
      repeat (10) @(negedge clk);
      check(n_st == 490 && n_dd == 10, $sformatf("operands %0d digits %0d", n_st, n_dd));
      check((t1 - t0) / 10 <= 52 * 10 + 4, $sformatf("run took %0d clocks", (t1 - t0) / 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
