// tb_fcl: feeds ten digits of 49 random operand pairs per channel, with
// gaps, then one_digit_done_i for each; checks the ten scores (exact sum of
// products, shift, saturation, 8-bit bias) and the single mul_done_o after
// digit 9. Large operands exercise the saturation.
module tb_fcl;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset, start, ddone, mdone;
  data_t d1, d2, w1, w2;
  logic [3:0] wnum;
  logic signed [7:0] bias [10];
  data_t digit [10];
  int checks = 0, failures = 0, n_md = 0, n_sat = 0;
  int exp [10];

  fcl dut (.sys_clk_i(clk), .reset_i(reset), .start_i(start), .one_digit_done_i(ddone),
           .dataset1_i(d1), .dataset2_i(d2), .weightset1_i(w1), .weightset2_i(w2),
           .weightnum_i(wnum), .bias_i(bias), .mul_done_o(mdone), .digit_o(digit));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset && mdone) n_md++;

  initial begin
    reset = 1; start = 0; ddone = 0; d1 = 0; d2 = 0; w1 = 0; w2 = 0; wnum = 0;
    for (int k = 0; k < 10; k++) bias[k] = 8'($urandom);
    repeat (2) @(negedge clk);
    reset = 0;
    for (int img = 0; img < 4; img++) begin
      n_md = 0;
      for (int d = 0; d < 10; d++) begin
        longint s;
        s = 0;
        wnum = 4'(d);
        for (int i = 0; i < 49; i++) begin
          while ($urandom_range(0, 3) == 0) begin start = 0; @(negedge clk); end
          start = 1;
          d1 = data_t'((img == 3) ? $urandom_range(20000, 32767) : $urandom_range(0, 4000));
          d2 = data_t'($urandom_range(0, 4000));
          w1 = data_t'((img == 3) ? 16'sd30000 : $urandom);
          w2 = data_t'($urandom);
          s += longint'(d1) * longint'(w1) + longint'(d2) * longint'(w2);
          @(negedge clk);
        end
        start = 0;
        ddone = 1;
        exp[d] = sat16(longint'(scale(s)) + longint'(bias[d]));
        if (scale(s) == 32767) n_sat++;
        @(negedge clk);
        ddone = 0;
        wnum = 4'($urandom);
        check(int'(digit[d]) == exp[d], $sformatf("digit %0d = %0d exp %0d", d, digit[d], exp[d]));
        check(mdone == (d == 9), "mul_done only after digit 9");
      end
      repeat (2) @(negedge clk);
      check(n_md == 1, "one mul_done per image");
      for (int d = 0; d < 10; d++) check(int'(digit[d]) == exp[d], "scores hold");
    end
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
