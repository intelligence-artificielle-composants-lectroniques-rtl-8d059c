// tb_cnn_top: end-to-end test of the whole recogniser at its default sizes.
//
// Loads two sets of FC weights through the weight-loading ports and sends
// 28x28 RGB565 frames through the camera port. The first frame is sent
// before the weights are loaded, so the FC layer has to wait for them. For
// every frame a reference model computes all layers from the same pixels
// and coefficients; the ten scores and the recognised digit must match, and
// the frame must complete within the expected number of clocks. The test
// also counts how often each mechanism of the design occurred (end-of-frame
// strobes of every layer, filter switching in convolutions 3 and 4, ReLU
// clamping, max-pool selection, waiting for the weights, weight reload,
// camera gaps) and counts a failure for any that never happened.
module tb_cnn_top;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        reset, cam_valid, cam_sof, wgt_frame_rdy, wgt_eof;
  logic [7:0]  cam_byte;
  logic [1:0]  wgt_valid;
  data_t       wgt_data;
  data_t       digit [10];
  logic        digit_valid, result_valid;
  logic [3:0]  result;
  logic [5:0]  layer_done;

  cnn_top dut (.sys_clk_i(clk), .reset_i(reset), .cam_valid_i(cam_valid),
    .cam_byte_i(cam_byte), .cam_sof_i(cam_sof), .wgt_valid_i(wgt_valid),
    .wgt_frame_rdy_i(wgt_frame_rdy), .wgt_eof_i(wgt_eof), .wgt_data_i(wgt_data),
    .digit_o(digit), .digit_valid_o(digit_valid), .digit_recog_result_o(result),
    .result_valid_o(result_valid), .layer_done_o(layer_done));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  localparam int N_FRAMES = 3;
  initial begin
    repeat (40000 * N_FRAMES + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanism counters
  int n_layer [6];
  int n_sel3_switch = 0, n_sel4_switch = 0, n_relu_clamp = 0, n_pool_pick = 0;
  int n_fc_wait = 0, n_result = 0;
  logic [1:0] sel3_q = '0, sel4_q = '0;
  always @(posedge clk) if (!reset) begin
    for (int k = 0; k < 6; k++) if (layer_done[k]) n_layer[k]++;
    if (dut.u_conv3.sel != sel3_q) n_sel3_switch++;
    if (dut.u_conv4.sel != sel4_q) n_sel4_switch++;
    sel3_q <= dut.u_conv3.sel;
    sel4_q <= dut.u_conv4.sel;
    if (dut.c1_we && (dut.c1_wdata[0] == 0 || dut.c1_wdata[1] == 0)) n_relu_clamp++;
    if (dut.mp_we && dut.mp_wdata[0] != 0) n_pool_pick++;
    if (dut.u_fc.g_rd[0].u_rd.pending && !dut.u_fc.write_ram_done_i) n_fc_wait++;
    if (result_valid) n_result++;
  end

  // ------------------------------------------------------ reference model
  map_t a, b;
  int fcw [2][490];
  int exp_digit [10];
  int exp_result;

  task automatic ref_net(input int img [28][28]);
    map_t c;
    for (int r = 0; r < 28; r++) for (int q = 0; q < 28; q++) a[0][r][q] = img[r][q];
    // conv 1
    for (int f = 0; f < 2; f++) for (int r = 0; r < 26; r++) for (int q = 0; q < 26; q++)
      b[f][r][q] = relu(conv9(a, 0, r, q, CONV1_W[f][0], CONV1_W[f][1], CONV1_W[f][2]),
                        int'(CONV1_B[f]));
    // max pool
    for (int f = 0; f < 2; f++) for (int r = 0; r < 13; r++) for (int q = 0; q < 13; q++) begin
      int v;
      v = b[f][2*r][2*q];
      if (b[f][2*r][2*q+1] > v)   v = b[f][2*r][2*q+1];
      if (b[f][2*r+1][2*q] > v)   v = b[f][2*r+1][2*q];
      if (b[f][2*r+1][2*q+1] > v) v = b[f][2*r+1][2*q+1];
      c[f][r][q] = v;
    end
    // conv 2
    for (int f = 0; f < 4; f++) for (int r = 0; r < 11; r++) for (int q = 0; q < 11; q++) begin
      int s0, s1;
      s0 = conv9(c, 0, r, q, gen_line(2, f, 0, 0), gen_line(2, f, 0, 1), gen_line(2, f, 0, 2));
      s1 = conv9(c, 1, r, q, gen_line(2, f, 1, 0), gen_line(2, f, 1, 1), gen_line(2, f, 1, 2));
      a[f][r][q] = relu(sat16(longint'(s0) + longint'(s1)), int'(gen_bias(2, f)));
    end
    // conv 3
    for (int f = 0; f < 4; f++) for (int r = 0; r < 9; r++) for (int q = 0; q < 9; q++) begin
      longint s;
      s = 0;
      for (int ch = 0; ch < 4; ch++)
        s += conv9(a, ch, r, q, gen_line(3, f, ch, 0), gen_line(3, f, ch, 1), gen_line(3, f, ch, 2));
      b[f][r][q] = relu(sat16(s), int'(gen_bias(3, f)));
    end
    // conv 4
    for (int f = 0; f < 2; f++) for (int r = 0; r < 7; r++) for (int q = 0; q < 7; q++) begin
      longint s;
      s = 0;
      for (int ch = 0; ch < 4; ch++)
        s += conv9(b, ch, r, q, gen_line(4, f, ch, 0), gen_line(4, f, ch, 1), gen_line(4, f, ch, 2));
      c[f][r][q] = relu(sat16(s), int'(gen_bias(4, f)));
    end
    // fully connected and argmax
    exp_result = 0;
    for (int d = 0; d < 10; d++) begin
      longint s;
      s = 0;
      for (int ch = 0; ch < 2; ch++)
        for (int i = 0; i < 49; i++)
          s += longint'(c[ch][i/7][i%7]) * longint'(fcw[ch][d*49+i]);
      exp_digit[d] = sat16(longint'(scale(s)) + longint'(fc_bias(d)));
      if (exp_digit[d] > exp_digit[exp_result]) exp_result = d;
    end
  endtask

  // ------------------------------------------------------ stimulus
  int n_gap = 0;
  task automatic send_byte(logic [7:0] v);
    if ($urandom_range(0, 7) == 0) begin
      cam_valid = 0; n_gap++;
      @(negedge clk);
    end
    cam_valid = 1; cam_byte = v;
    @(negedge clk);
    cam_valid = 0;
  endtask

  task automatic load_weights(input int set);
    @(negedge clk); wgt_frame_rdy = 1;
    @(negedge clk); wgt_frame_rdy = 0;
    for (int ch = 0; ch < 2; ch++)
      for (int k = 0; k < 490; k++) begin
        fcw[ch][k] = (set == 0) ? $urandom_range(0, 8191) - 4096 : $urandom_range(0, 16383) - 8192;
        wgt_valid = 2'b01 << ch; wgt_data = data_t'(fcw[ch][k]);
        @(negedge clk);
      end
    wgt_valid = 0;
    wgt_eof = 1;
    @(negedge clk); wgt_eof = 0;
  endtask

  int img [28][28];
  task automatic send_image(input int kind);
    @(negedge clk); cam_sof = 1;
    @(negedge clk); cam_sof = 0;
    for (int r = 0; r < 28; r++)
      for (int q = 0; q < 28; q++) begin
        logic [5:0] g;
        logic [15:0] rgb;
        bit ink;
        // a thick stroke pattern on white paper, different per frame
        ink = (kind == 0) ? ((q >= 12 && q <= 15) || (r >= 13 && r <= 16 && q >= 6 && q <= 20))
            : (kind == 1) ? ((r - q <= 3 && q - r <= 3) && r > 3 && r < 25)
            : ($urandom_range(0, 2) == 0);
        g = ink ? 6'($urandom_range(0, 10)) : 6'($urandom_range(50, 63));
        rgb = {5'($urandom), g, 5'($urandom)};
        img[r][q] = int'({8'h00, ~g, 2'b00});
        send_byte(rgb[15:8]);
        send_byte(rgb[7:0]);
      end
  endtask

  initial begin
    reset = 1; cam_valid = 0; cam_sof = 0; cam_byte = 0; wgt_valid = 0;
    wgt_frame_rdy = 0; wgt_eof = 0; wgt_data = 0;
    for (int k = 0; k < 6; k++) n_layer[k] = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int fr = 0; fr < N_FRAMES; fr++) begin
      int t0, t1, nres0;
      nres0 = n_result;
      send_image(fr);
      ref_net(img);
      t0 = $time;
      if (fr == 0) begin
        // weights arrive after the image: the FC layer must wait for them
        while (!layer_done[5]) @(negedge clk);
        repeat (50) @(negedge clk);
        check(n_result == nres0, "no result before the weights are loaded");
        load_weights(0);
        ref_net(img);
      end else if (fr == 2) begin
        load_weights(1);      // new weight set, loaded while the network runs
        ref_net(img);
      end
      while (!result_valid) @(negedge clk);
      t1 = $time;
      for (int d = 0; d < 10; d++)
        check(int'(digit[d]) == exp_digit[d],
              $sformatf("frame %0d score %0d = %0d exp %0d", fr, d, digit[d], exp_digit[d]));
      check(int'(result) == exp_result, $sformatf("frame %0d digit %0d exp %0d", fr, result, exp_result));
      $display("frame %0d: recognised %0d, %0d clocks from the last pixel", fr, result, (t1 - t0) / 10);
      if (fr != 0) check((t1 - t0) / 10 <= 27000, $sformatf("frame took %0d clocks", (t1 - t0) / 10));
      repeat (5) @(negedge clk);
    end
    // mechanisms
    for (int k = 0; k < 6; k++) check(n_layer[k] == N_FRAMES, $sformatf("layer %0d strobes %0d", k, n_layer[k]));
    check(n_sel3_switch >= 81 * 3 * N_FRAMES, $sformatf("conv3 filter switches %0d", n_sel3_switch));
    check(n_sel4_switch >= 49 * 1 * N_FRAMES, $sformatf("conv4 filter switches %0d", n_sel4_switch));
    check(n_relu_clamp > 0, "ReLU clamping happened");
    check(n_pool_pick > 0, "max pool selected non-zero maxima");
    check(n_fc_wait > 0, "FC layer waited for its weights");
    check(n_gap > 0, "camera gaps happened");
    check(n_result == N_FRAMES, $sformatf("results %0d", n_result));
    $display("mechanisms: layer strobes %0d/%0d/%0d/%0d/%0d/%0d, conv3 switches %0d, conv4 switches %0d, relu clamps %0d, pool %0d, fc wait %0d clocks, camera gaps %0d",
             n_layer[0], n_layer[1], n_layer[2], n_layer[3], n_layer[4], n_layer[5],
             n_sel3_switch, n_sel4_switch, n_relu_clamp, n_pool_pick, n_fc_wait, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
