// tb_adder: random pairs with and without overflow; checks the saturating
// sum, the one-clock done pulse and that the result holds without done_i.
module tb_adder;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  reset, done_i, done_o;
  data_t a, b, r;
  int checks = 0, failures = 0, n_sat = 0;

  adder dut (.sys_clk_i(clk), .reset_i(reset), .done_i, .a_i(a), .b_i(b),
             .done_o, .result_o(r));

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
    reset = 1; done_i = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int n = 0; n < 1000; n++) begin
      int exp;
      a = data_t'($urandom); b = data_t'($urandom);
      exp = sat16(longint'(a) + longint'(b));
      if (exp == 32767 || exp == -32768) n_sat++;
      done_i = 1;
      @(negedge clk);
      done_i = 0;
      check(done_o && int'(r) == exp, $sformatf("%0d+%0d=%0d exp %0d", a, b, r, exp));
      a = data_t'($urandom);
      @(negedge clk);
      check(!done_o && int'(r) == exp, "hold without done_i");
    end
    check(n_sat > 50, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
