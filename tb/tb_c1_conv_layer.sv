// tb_c1_conv_layer: end-to-end test of the C1 layer at the LeNet-5 sizes.
// Random float16 image (32x32) and six random 5x5 kernels. After reset the
// layer must raise `done` after exactly 3141 clock edges (two kernel batches
// of 56 passes of 28 cycles, plus start-up and batch hand-over), and every
// one of the 28x28x6 outputs must equal an in-order float16 reference
// convolution. Kernel batch switches are counted and must be 1.
module tb_c1_conv_layer;
  import tb_fp16_ref_pkg::*;
  localparam int IMG = 32, K = 5, NK = 6, OUT = IMG - K + 1;

  logic clk = 0, reset = 0;
  logic [IMG*IMG*16-1:0] image;
  logic [NK*K*K*16-1:0]  filters;
  logic [NK*OUT*OUT*16-1:0] fmap;
  logic done;
  int checks = 0, failures = 0;

  c1_conv_layer dut (.clk, .reset, .image, .filters, .fmap, .done);

  always #5 clk = ~clk;
  initial #1 reset = 1;    // an edge, so asynchronous resets act

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] px(int r, int c);
    return image[(r*IMG + c)*16 +: 16];
  endfunction
  function automatic logic [15:0] wt(int k, int ky, int kx);
    return filters[(k*K*K + ky*K + kx)*16 +: 16];
  endfunction

  int batch_switches = 0;
  always @(posedge clk) if (!reset && dut.u_sel.batch == 1'b1 && dut.con_start != '0)
    batch_switches++;

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges, bad;
    for (int p = 0; p < IMG*IMG; p++) image[p*16 +: 16] = rand_h(8, 16);
    for (int i = 0; i < NK*K*K; i++) filters[i*16 +: 16] = rand_h(8, 16);
    repeat (2) @(negedge clk);
    reset = 0;
    edges = 0;
    while (!done && edges < 7000) begin
      @(negedge clk);
      edges++;
    end
    chk(edges == 3141, $sformatf("layer took %0d edges, expected 3141", edges));
    chk(batch_switches == 1, $sformatf("%0d kernel batch switches", batch_switches));
    bad = 0;
    for (int k = 0; k < NK; k++)
      for (int r = 0; r < OUT; r++)
        for (int c = 0; c < OUT; c++) begin
          logic [15:0] m;
          m = 16'h0000;
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++)
              m = ref_add(m, ref_mul(wt(k, ky, kx), px(r + ky, c + kx)));
          checks++;
          if (fmap[((k*OUT + r)*OUT + c)*16 +: 16] !== m) begin
            bad++;
            if (bad < 5) $display("FAIL out(%0d,%0d,%0d) = %h expected %h", k, r, c,
                                  fmap[((k*OUT + r)*OUT + c)*16 +: 16], m);
          end
        end
    failures += bad;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
