// tb_conv_scheduler: the scheduler drives a model convolution that answers
// start_o after a random delay with a value that encodes the selected filter.
// Checks the filter order on mux_select_o, one start per filter, the stored
// results, the single convdone2ram_o per window and that a start_i while
// busy is ignored. Run with four filters and with two.
module tb_conv_scheduler;
  import cnn_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset;
  logic start4, done4, cdone4, st4;
  logic start2, done2, cdone2, st2;
  logic [1:0] sel4, sel2;
  data_t res4, res2;
  data_t f4 [4];
  data_t f2 [2];
  int checks = 0, failures = 0;

  conv_scheduler dut4 (.sys_clk_i(clk), .reset_i(reset), .start_i(start4),
    .convdone_i(cdone4), .conv_result_i(res4), .start_o(st4),
    .convdone2ram_o(done4), .mux_select_o(sel4), .f_result_o(f4));
  conv_scheduler #(.N_FILT(2)) dut2 (.sys_clk_i(clk), .reset_i(reset), .start_i(start2),
    .convdone_i(cdone2), .conv_result_i(res2), .start_o(st2),
    .convdone2ram_o(done2), .mux_select_o(sel2), .f_result_o(f2));

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

  // Model convolutions: answer each start_o after 1..6 clocks with a value
  // that encodes the key of the window and the selected filter.
  int key4, key2, nst4, nst2, cnt4, cnt2;
  always @(posedge clk) begin
    cdone4 <= 1'b0;
    cdone2 <= 1'b0;
    if (!reset) begin
      if (st4) begin
        check(int'(sel4) == nst4, $sformatf("N=4 select %0d exp %0d", sel4, nst4));
        nst4 <= nst4 + 1;
        cnt4 <= $urandom_range(1, 6);
      end else if (cnt4 > 0) begin
        cnt4 <= cnt4 - 1;
        if (cnt4 == 1) begin cdone4 <= 1'b1; res4 <= data_t'(key4 * 16 + int'(sel4)); end
      end
      if (st2) begin
        check(int'(sel2) == nst2, $sformatf("N=2 select %0d exp %0d", sel2, nst2));
        nst2 <= nst2 + 1;
        cnt2 <= $urandom_range(1, 6);
      end else if (cnt2 > 0) begin
        cnt2 <= cnt2 - 1;
        if (cnt2 == 1) begin cdone2 <= 1'b1; res2 <= data_t'(key2 * 16 + int'(sel2)); end
      end
    end
  end

  initial begin
    reset = 1; cnt4 = 0; cnt2 = 0; nst4 = 0; nst2 = 0; start4 = 0; start2 = 0; cdone4 = 0; cdone2 = 0; res4 = 0; res2 = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int w = 0; w < 50; w++) begin
      key4 = w; key2 = w + 100; nst4 = 0; nst2 = 0;
      @(negedge clk); start4 = 1; start2 = 1;
      @(negedge clk); start4 = 0; start2 = 0;
      begin
        bit seen4, seen2;
        seen4 = 0; seen2 = 0;
        while (!(seen4 && seen2)) begin
          start4 = ($urandom_range(0, 3) == 0);   // ignored while busy
          @(negedge clk);
          if (done4) seen4 = 1;
          if (done2) seen2 = 1;
        end
        start4 = 0;
      end
      check(nst4 == 4 && nst2 == 2, $sformatf("starts %0d %0d", nst4, nst2));
      for (int f = 0; f < 4; f++) check(int'(f4[f]) == w * 16 + f, $sformatf("f4[%0d]=%0d", f, f4[f]));
      for (int f = 0; f < 2; f++) check(int'(f2[f]) == (w + 100) * 16 + f, "f2 result");
      @(negedge clk);
      check(!done4 && !done2 && !st4 && !st2, "idle after window");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
