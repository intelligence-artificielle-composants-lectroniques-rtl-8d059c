// tb_max_comp: random score sets, including ties and all-negative sets;
// checks the index of the largest score (lowest index on a tie), the valid
// pulse and that the output holds between valid sets.
module tb_max_comp;
  import cnn_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic resetn, vin, vout;
  data_t din [10];
  logic [3:0] dout;
  int checks = 0, failures = 0;

  max_comp dut (.RESETN_I(resetn), .SYS_CLK_I(clk), .DATA_VALID_I(vin), .DATA_IN_I(din),
                .DATA_OUT_O(dout), .DATA_VALID_O(vout));

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
    resetn = 0; vin = 0;
    for (int k = 0; k < 10; k++) din[k] = 0;
    repeat (2) @(negedge clk);
    resetn = 1;
    for (int n = 0; n < 1000; n++) begin
      int best;
      for (int k = 0; k < 10; k++)
        din[k] = (n % 4 == 0) ? data_t'($urandom_range(0, 3)) :
                 (n % 4 == 1) ? data_t'(-$urandom_range(1, 30000)) : data_t'($urandom);
      best = 0;
      for (int k = 1; k < 10; k++) if (din[k] > din[best]) best = k;
      vin = 1;
      @(negedge clk);
      vin = 0;
      check(vout && int'(dout) == best, $sformatf("argmax %0d exp %0d", dout, best));
      for (int k = 0; k < 10; k++) din[k] = data_t'($urandom);
      @(negedge clk);
      check(!vout && int'(dout) == best, "holds without valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
