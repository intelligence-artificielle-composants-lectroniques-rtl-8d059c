// tb_conv_weights_sch: for every select value of the layer-3 and layer-4
// selectors, checks all twelve kernel rows and the bias against the
// coefficient set of the selected filter, and that different filters give
// different kernels.
module tb_conv_weights_sch;
  import cnn_pkg::*;
  logic [1:0] sel;
  line_t w3 [4][3];
  line_t w4 [4][3];
  data_t b3, b4;
  int checks = 0, failures = 0;
  line_t prev;

  conv_weights_sch #(.LAYER(3)) dut3 (.select_i(sel), .wgt_o(w3), .bias_o(b3));
  conv_weights_sch #(.LAYER(4)) dut4 (.select_i(sel), .wgt_o(w4), .bias_o(b4));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = '0;
    for (int s = 0; s < 4; s++) begin
      int f4;
      sel = 2'(s);
      #1;
      f4 = (s < 2) ? s : 1;
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 3; r++) begin
          check(w3[c][r] == gen_line(3, s, c, r), $sformatf("L3 f%0d c%0d r%0d", s, c, r));
          check(w4[c][r] == gen_line(4, f4, c, r), $sformatf("L4 f%0d c%0d r%0d", s, c, r));
        end
      check(b3 == gen_bias(3, s) && b4 == gen_bias(4, f4), "bias");
      check(w3[0][0] != prev, "filters differ");
      prev = w3[0][0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
