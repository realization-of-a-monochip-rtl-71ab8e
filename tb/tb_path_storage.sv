// tb_path_storage: decision words of a known data sequence u drive the
// path storage and traceback at several truncation lengths, with random
// idle cycles between steps. The decision of every state at step n is
// u[n-6], the bit that leaves the true previous state, so every traced
// path joins the true one within six steps; for the longer lengths a few
// decisions of other states are randomised as well. The testbench runs
// its own step/block counters. The bit decoded for step n must come out
// right after step n + 3*lt, and nothing may come out before 3*lt steps.
module tb_path_storage;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0, step = 0, warm = 0, out_valid, out_bit;
  logic [LT_W-1:0] lt = 7'd64;
  logic [5:0] step_idx = 0;
  logic [1:0] wblk = 0;
  logic [63:0] decisions = 0;
  int checks = 0, failures = 0;
  bit u[$];
  int g;

  path_storage dut (.clk, .rst_n, .lt, .step, .step_idx, .wblk, .warm, .decisions, .out_valid, .out_bit);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int l, input int nsteps, input bit noisy);
    int outs = 0;
    bit step_d = 0;
    int g_d = 0;
    lt = LT_W'(l);
    rst_n = 0;
    step = 0;
    u.delete();
    g = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (g < nsteps) begin
      @(negedge clk);
      // outputs registered at the previous edge
      if (step_d && g_d >= 3 * l) begin
        checks++;
        if (out_valid !== 1'b1 || out_bit !== u[g_d - 3 * l]) begin
          failures++;
          if (failures < 6) $display("lt %0d step %0d: valid %b bit %b exp %b", l, g_d, out_valid, out_bit, u[g_d - 3 * l]);
        end
        outs++;
      end else begin
        checks++;
        if (out_valid) begin
          failures++;
          $display("lt %0d: output at step %0d", l, g_d);
        end
      end
      step = ($urandom % 4) != 0;
      step_idx = 6'(g % l);
      wblk = 2'((g / l) % 3);
      warm = (g >= 3 * l);
      if (step) begin
        u.push_back(1'($urandom % 2));
        for (int s = 0; s < 64; s++) begin
          decisions[s] = (g >= 6) ? u[g - 6] : 1'b0;
          if (noisy && ($urandom % 16) == 0) decisions[s] = 1'($urandom % 2);
        end
        // the true state keeps its true predecessor
        if (g >= 6) begin
          int ts = 0;
          for (int k = 0; k < 6; k++) ts[k] = u[g - k];
          decisions[ts] = u[g - 6];
        end
      end
      step_d = step;
      g_d = g;
      if (step) g++;
    end
    @(negedge clk);
    step = 0;
    checks++;
    if (outs != nsteps - 3 * l - 1) begin
      failures++;
      $display("lt %0d: %0d outputs", l, outs);
    end
  endtask

  initial begin
    run(64, 900, 1);
    run(32, 600, 1);
    run(7, 200, 0);
    run(6, 200, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
