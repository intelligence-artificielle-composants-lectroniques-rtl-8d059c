// tb_relu: random results and biases, including wrap-around cases; checks
// the registered sum, the clamping of negatives and the one-clock done delay.
module tb_relu;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  resetn, done_i, done_o;
  data_t result_i, bias_i, result_o;
  int checks = 0, failures = 0, n_clamp = 0, n_pass = 0;

  relu dut (.SYS_CLK_I(clk), .RESETN_I(resetn), .done_i, .result_i, .bias_i,
            .done_o, .result_o);

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

  initial begin
    resetn = 0; done_i = 0; result_i = 0; bias_i = 0;
    repeat (2) @(negedge clk);
    check(!done_o && result_o == 0, "reset state");
    resetn = 1;
    for (int n = 0; n < 1000; n++) begin
      int exp;
      bit d;
      result_i = data_t'($urandom);
      bias_i   = (n % 3 == 0) ? data_t'($urandom) : data_t'($urandom_range(0, 31) - 16);
      d        = 1'($urandom);
      done_i   = d;
      exp = relu(int'(result_i), int'(bias_i));
      @(negedge clk);
      check(int'(result_o) == exp, $sformatf("relu(%0d,%0d)=%0d exp %0d", result_i, bias_i, result_o, exp));
      check(done_o == d, "done delayed by one clock");
      if (exp == 0) n_clamp++; else n_pass++;
    end
    check(n_clamp > 100 && n_pass > 100, "both clamp and pass-through exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
