// tb_write_lsram_weight: sends weight frames with gaps in DATA_VALID_I and
// checks every RAM write (address, data, one clock after the word), the
// done flag raised by EOF_I and cleared by the next frame, and the restart
// of the addresses.
module tb_write_lsram_weight;
  import cnn_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic resetn, valid, frame_rdy, eof, wr_en, done;
  data_t din, dout;
  logic [15:0] addr;
  int checks = 0, failures = 0;
  data_t sent [$];
  int n_wr;

  write_lsram_weight dut (.RESETN_I(resetn), .SYS_CLK_I(clk), .DATA_VALID_I(valid),
    .UART_FRAME_RDY_I(frame_rdy), .EOF_I(eof), .DATA_I(din), .RAM_WR_EN_O(wr_en),
    .DATA_O(dout), .RAM_ADDRESS_O(addr), .RAM_WR_DONE_O(done));

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

  always @(posedge clk) if (resetn && wr_en) begin
    check(int'(addr) == n_wr && n_wr < sent.size() && dout == sent[n_wr],
          $sformatf("write %0d at %0d", n_wr, addr));
    n_wr++;
  end

  initial begin
    resetn = 0; valid = 0; frame_rdy = 0; eof = 0; din = 0; n_wr = 0;
    repeat (2) @(negedge clk);
    resetn = 1;
    for (int fr = 0; fr < 3; fr++) begin
      int len;
      len = 100 + 195 * fr;
      sent.delete();
      @(negedge clk); frame_rdy = 1;
      @(negedge clk); frame_rdy = 0;
      n_wr = 0;
      check(!done, "done cleared by a new frame");
      for (int i = 0; i < len; i++) begin
        while ($urandom_range(0, 2) == 0) begin valid = 0; @(negedge clk); end
        valid = 1; din = data_t'($urandom); sent.push_back(din);
        @(negedge clk);
      end
      valid = 0;
      check(!done, "not done before EOF");
      eof = 1;
      @(negedge clk); eof = 0;
      @(negedge clk);
      check(done, "done after EOF");
      check(n_wr == len, $sformatf("writes %0d exp %0d", n_wr, len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
