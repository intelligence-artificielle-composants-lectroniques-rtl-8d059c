// tb_ram_dual_port: writes random words through port A, reads them back
// through port B and checks the one-clock read latency, that q_b holds while
// the read enable is low, and that a read of the word being written returns
// the old value.
module tb_ram_dual_port;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        we_a, we_b;
  logic [9:0]  addr_a, addr_b;
  logic [15:0] data_a, q_b;
  int checks = 0, failures = 0;
  logic [15:0] model [1024];

  ram_dual_port dut (.clk, .we_a, .we_b, .addr_a, .addr_b, .data_a, .q_b);

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
    we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; data_a = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      we_a = 1; addr_a = 10'(i); data_a = 16'($urandom);
      model[i] = data_a;
    end
    @(negedge clk); we_a = 0;
    for (int n = 0; n < 600; n++) begin
      int a;
      a = $urandom_range(0, 1023);
      @(negedge clk); we_b = 1; addr_b = 10'(a);
      @(negedge clk); we_b = 0; addr_b = 10'($urandom);
      check(q_b == model[a], $sformatf("read %0d got %h exp %h", a, q_b, model[a]));
      @(negedge clk);
      check(q_b == model[a], "q_b held while read enable low");
    end
    // read during write of the same address: old value
    @(negedge clk);
    we_a = 1; addr_a = 10'd5; data_a = ~model[5]; we_b = 1; addr_b = 10'd5;
    @(negedge clk);
    we_a = 0; we_b = 0;
    check(q_b == model[5], "read-during-write returns old word");
    model[5] = ~model[5];
    @(negedge clk); we_b = 1;
    @(negedge clk); we_b = 0;
    check(q_b == model[5], "new word after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
