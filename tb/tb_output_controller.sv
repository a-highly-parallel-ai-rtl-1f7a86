// tb_output_controller: checks that pass results land in the right place.
// Replays the pass sequence of a whole layer (2 batches x 56 passes x 3
// CONs) with random results and random gaps, CONs reporting on different
// cycles, keeps its own copy of the expected map, and compares the full
// feature map at the end. `done` must stay low until the last pass is in and
// then rise on the next edge.
module tb_output_controller;
  localparam int IMG = 32, K = 5, NK = 6, NCON = 3, NCU = 14;
  localparam int OUT = IMG - K + 1, NSEG = OUT / NCU;

  logic clk = 0, reset = 0;
  logic [NCON-1:0] pass_valid = '0;
  logic [NCON-1:0][4:0] row;
  logic [NCON-1:0] seg;
  logic [NCON-1:0][NCU-1:0][15:0] results;
  logic batch = 0;
  logic [NK-1:0][OUT-1:0][OUT-1:0][15:0] fmap;
  logic done;
  logic [15:0] model [NK][OUT][OUT];
  int checks = 0, failures = 0;

  output_controller #(.IMG(IMG), .K(K), .NKERNEL(NK), .NCON(NCON), .NCU(NCU)) dut (
    .clk, .reset, .pass_valid, .row, .seg, .results, .batch, .fmap, .done);

  always #5 clk = ~clk;
  initial #1 reset = 1;    // an edge, so asynchronous resets act

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    row = '0; seg = '0; results = '0;
    repeat (2) @(negedge clk);
    reset = 0;
    chk(fmap == '0 && !done, "cleared by reset");
    for (int b = 0; b < NK / NCON; b++) begin
      for (int p = 0; p < OUT * NSEG; p++) begin
        logic [NCON-1:0] pending;
        pending = '1;
        while (pending != '0) begin
          @(negedge clk);
          chk(!done, "done only after the last pass");
          batch = 1'(b);
          pass_valid = '0;
          for (int c = 0; c < NCON; c++) begin
            if (pending[c] && ($urandom % 2 == 0)) begin
              pass_valid[c] = 1;
              pending[c] = 0;
              row[c] = 5'(p / NSEG);
              seg[c] = 1'(p % NSEG);
              for (int j = 0; j < NCU; j++) begin
                results[c][j] = 16'($urandom);
                model[b*NCON + c][p / NSEG][(p % NSEG) * NCU + j] = results[c][j];
              end
            end else begin
              row[c] = 5'($urandom);
              seg[c] = 1'($urandom);
            end
          end
        end
      end
    end
    @(negedge clk);
    pass_valid = '0;
    chk(done, "done after the last pass");
    bad = 0;
    for (int k = 0; k < NK; k++)
      for (int r = 0; r < OUT; r++)
        for (int c = 0; c < OUT; c++) begin
          checks++;
          if (fmap[k][r][c] !== model[k][r][c]) begin
            bad++;
            if (bad < 5) $display("FAIL fmap[%0d][%0d][%0d]=%h expected %h", k, r, c, fmap[k][r][c], model[k][r][c]);
          end
        end
    failures += bad;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
