// tb_image_input: sends 28x28 frames of random RGB565 pixels as byte pairs
// with gaps, and checks every pixel written (address, inverted green field in
// bits [7:2]), the single eof_o after the last pixel, that bytes beyond the
// frame are not written and that cam_sof_i restarts the frame.
module tb_image_input;
  import cnn_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset, valid, sof, we, eof;
  logic [7:0] byte_i;
  logic [9:0] addr;
  data_t data;
  int checks = 0, failures = 0;
  int exp [784];
  int n_wr, n_eof;

  image_input dut (.sys_clk_i(clk), .reset_i(reset), .cam_valid_i(valid),
    .cam_byte_i(byte_i), .cam_sof_i(sof), .ram_wr_en_o(we), .ram_wr_addr_o(addr),
    .ram_wr_data_o(data), .eof_o(eof));

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

  always @(posedge clk) if (!reset) begin
    if (we) begin
      check(int'(addr) == n_wr && n_wr < 784 && int'(data) == exp[n_wr],
            $sformatf("pixel %0d at %0d = %h", n_wr, addr, data));
      n_wr++;
    end
    if (eof) begin
      n_eof++;
      check(n_wr == 784, "eof after the last pixel");
    end
  end

  task automatic send_byte(logic [7:0] b);
    while ($urandom_range(0, 3) == 0) begin valid = 0; @(negedge clk); end
    valid = 1; byte_i = b;
    @(negedge clk);
    valid = 0;
  endtask

  initial begin
    reset = 1; valid = 0; sof = 0; byte_i = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int fr = 0; fr < 3; fr++) begin
      int npix;
      npix = (fr == 1) ? 300 : 784;     // frame 1 is cut short by a new sof
      n_wr = 0; n_eof = 0;
      @(negedge clk); sof = 1;
      @(negedge clk); sof = 0;
      for (int p = 0; p < npix; p++) begin
        logic [15:0] rgb;
        logic [5:0] g;
        rgb = 16'($urandom);
        g = rgb[10:5];
        exp[p] = int'({8'h00, ~g, 2'b00});
        send_byte(rgb[15:8]);
        send_byte(rgb[7:0]);
      end
      if (fr != 1) begin
        repeat (4) send_byte(8'hAA);    // extra bytes: ignored
        repeat (3) @(negedge clk);
        check(n_wr == 784 && n_eof == 1, $sformatf("frame %0d writes %0d eofs %0d", fr, n_wr, n_eof));
      end else begin
        repeat (3) @(negedge clk);
        check(n_wr == 300 && n_eof == 0, "partial frame");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
