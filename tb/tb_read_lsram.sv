// tb_read_lsram: a 7x7 map with random pixels in a RAM; the convolution is
// answered after a random delay. Checks every window's three lines against
// the map, the number of windows, reads per window, the line-end and
// frame-end pulses, and the 10-clock delay from a window's first read to
// conv_start_o.
module tb_read_lsram;
  import cnn_pkg::*;
  localparam int W = 7, OW = W - 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset, eof, conv_done, line_end, frame_end, conv_start, re, we;
  logic [9:0] raddr, waddr;
  data_t rdata, wdata;
  line_t l1, l2, l3;
  int checks = 0, failures = 0;
  data_t img [W*W];

  ram_dual_port ram (.clk, .we_a(we), .we_b(re), .addr_a(waddr), .addr_b(raddr),
                     .data_a(wdata), .q_b(rdata));
  read_lsram #(.IN_W(W)) dut (.sys_clk_i(clk), .reset_i(reset), .eof_i(eof),
    .conv_done_i(conv_done), .ram_data_i(rdata), .line_end_o(line_end),
    .frame_end_o(frame_end), .conv_start_o(conv_start), .ram_read_en_o(re),
    .ram_addr_o(raddr), .line1_o(l1), .line2_o(l2), .line3_o(l3));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic line_t row_of(int r, int c);
    return {img[r*W+c], img[r*W+c+1], img[r*W+c+2]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_le = 0, n_fe = 0, n_reads = 0;
  always @(posedge clk) if (!reset) begin
    if (line_end) n_le++;
    if (frame_end) n_fe++;
    if (re) n_reads++;
  end

  initial begin
    reset = 1; eof = 0; conv_done = 0; we = 0; waddr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int i = 0; i < W*W; i++) begin
      img[i] = data_t'($urandom);
      @(negedge clk); we = 1; waddr = 10'(i); wdata = img[i];
    end
    @(negedge clk); we = 0;
    for (int frame = 0; frame < 2; frame++) begin
      n_le = 0; n_fe = 0; n_reads = 0;
      @(negedge clk); eof = 1;
      @(negedge clk); eof = 0;
      for (int r = 0; r < OW; r++)
        for (int c = 0; c < OW; c++) begin
          int lat;
          lat = 0;
          while (!re) begin @(negedge clk); end
          check(int'(raddr) == r*W + c, $sformatf("first read address %0d", raddr));
          while (!conv_start && lat < 50) begin @(negedge clk); lat++; end
          check(lat == 10, $sformatf("window start delay %0d", lat));
          check(l1 == row_of(r, c) && l2 == row_of(r+1, c) && l3 == row_of(r+2, c),
                $sformatf("window %0d,%0d lines", r, c));
          repeat ($urandom_range(1, 5)) @(negedge clk);
          check(l1 == row_of(r, c) && l3 == row_of(r+2, c), "lines held until done");
          conv_done = 1;
          @(negedge clk); conv_done = 0;
        end
      repeat (3) @(negedge clk);
      check(n_le == OW, $sformatf("line ends %0d", n_le));
      check(n_fe == 1, $sformatf("frame ends %0d", n_fe));
      check(n_reads == 9 * OW * OW, $sformatf("reads %0d", n_reads));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
