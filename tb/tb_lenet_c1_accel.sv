// tb_lenet_c1_accel: end-to-end test of the accelerator at its default sizes
// (32x32 image, six 5x5 kernels, 3 CONs of 14 CUs, six ReLU channels).
// Random float16 image and kernels; the consumer pauses the activation
// stream at random. Checks: the convolution finishes after 3141 edges; the
// pre-activation map equals an in-order float16 reference convolution; the
// 784 activated positions arrive once each, in raster order, each equal to
// the channel-wise ReLU of the reference; `done` follows the last one.
// Counts the mechanisms the design relies on and fails if one never
// happened: kernel batch switch, CU passes (each with its reset-delay
// cycles), negative values zeroed by the ReLU, positive values passed,
// stream pauses (ReLU clocks gated off with the output held) and the ReLU
// completion flag.
module tb_lenet_c1_accel;
  import tb_fp16_ref_pkg::*;
  localparam int IMG = 32, K = 5, NK = 6, OUT = IMG - K + 1, NPIX = OUT * OUT;

  logic clk = 0, reset = 0, act_ready = 1;
  logic [IMG*IMG*16-1:0] image;
  logic [NK*K*K*16-1:0]  filters;
  logic [NK*OUT*OUT*16-1:0] fmap;
  logic conv_done, act_valid, act_finished, done;
  logic [NK*16-1:0] act_data;
  logic [9:0] act_index;
  logic [15:0] ref_map [NK][NPIX];
  int checks = 0, failures = 0;

  lenet_c1_accel dut (.clk, .reset, .image, .filters, .act_ready, .fmap, .conv_done,
    .act_data, .act_valid, .act_index, .act_finished, .done);

  always #5 clk = ~clk;
  initial #1 reset = 1;    // an edge, so asynchronous resets act

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // mechanism counters
  int n_batch_switch = 0, n_cu_clear = 0, n_neg_zeroed = 0, n_pos_passed = 0;
  int n_pauses = 0, n_held = 0, n_finished = 0;
  logic [NK*16-1:0] last_data;

  always @(posedge clk) if (!reset) begin
    if (dut.u_c1.u_sel.batch == 1'b1 && dut.u_c1.con_start != '0) n_batch_switch++;
    if (dut.u_c1.g_con[0].u_con.g_cu[0].u_cu.state == 2'd1) n_cu_clear++;
    if (act_finished) n_finished++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges, bad, next_index;
    for (int p = 0; p < IMG*IMG; p++) image[p*16 +: 16] = rand_h(8, 16);
    for (int i = 0; i < NK*K*K; i++) filters[i*16 +: 16] = rand_h(8, 16);
    for (int k = 0; k < NK; k++)
      for (int p = 0; p < NPIX; p++) begin
        logic [15:0] m;
        m = 16'h0000;
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++)
            m = ref_add(m, ref_mul(filters[(k*K*K + ky*K + kx)*16 +: 16],
                                   image[((p / OUT + ky)*IMG + p % OUT + kx)*16 +: 16]));
        ref_map[k][p] = m;
      end
    repeat (2) @(negedge clk);
    reset = 0;
    edges = 0;
    while (!conv_done && edges < 7000) begin
      @(negedge clk);
      edges++;
    end
    chk(edges == 3141, $sformatf("convolution took %0d edges, expected 3141", edges));
    bad = 0;
    for (int k = 0; k < NK; k++)
      for (int p = 0; p < NPIX; p++) begin
        checks++;
        if (fmap[(k*NPIX + p)*16 +: 16] !== ref_map[k][p]) begin
          bad++;
          if (bad < 5) $display("FAIL fmap(%0d,%0d)=%h expected %h", k, p,
                                fmap[(k*NPIX + p)*16 +: 16], ref_map[k][p]);
        end
      end
    failures += bad;

    // activation stream with random pauses
    next_index = 0;
    last_data = act_data;
    while (!done && edges < 12000) begin
      act_ready = ($urandom % 5 != 0);
      @(negedge clk);
      edges++;
      if (act_valid) begin
        bit ok;
        chk(int'(act_index) == next_index, $sformatf("index %0d expected %0d", act_index, next_index));
        ok = 1;
        for (int k = 0; k < NK; k++) begin
          logic [15:0] m;
          m = ref_map[k][act_index];
          if (m[15]) begin
            if (m[14:0] != 0) n_neg_zeroed++;
            m = 16'h0000;
          end else if (m != 0) n_pos_passed++;
          if (act_data[16*k +: 16] !== m) ok = 0;
        end
        chk(ok, $sformatf("activation at %0d", act_index));
        next_index++;
        last_data = act_data;
      end else if (next_index > 0 && !done) begin
        n_pauses++;
        if (act_data == last_data) n_held++;
        chk(act_data == last_data, "output held while paused");
      end
    end
    chk(done, "done after the stream");
    chk(next_index == NPIX, $sformatf("%0d positions streamed", next_index));

    $display("mechanisms: batch_switch=%0d cu_windows=%0d relu_zeroed=%0d relu_passed=%0d pauses=%0d held=%0d finished=%0d",
             n_batch_switch, n_cu_clear / 2, n_neg_zeroed, n_pos_passed, n_pauses, n_held, n_finished);
    chk(n_batch_switch == 1, "one kernel batch switch");
    chk(n_cu_clear == 2 * 2 * 56, "two reset-delay cycles for each of the 112 windows of CU 0");
    chk(n_neg_zeroed > 0, "ReLU zeroed a negative value");
    chk(n_pos_passed > 0, "ReLU passed a positive value");
    chk(n_pauses > 0 && n_held > 0, "stream paused with the ReLU clock gated");
    chk(n_finished > 0, "ReLU completion flag seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
