// tb_timer: the pair grouping at each rate (first/last every 1, 2 or 4
// pairs) and the block counters for several truncation lengths: step_idx
// counts 0..lt-1, wblk cycles 0, 1, 2, and warm rises after exactly 3*lt
// steps. Reference counters are kept in the testbench.
module tb_timer;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0, pair_valid = 0, step = 0, first, last, warm;
  logic [LT_W-1:0] lt = 7'd64;
  logic [5:0] step_idx;
  logic [1:0] wblk;
  rate_t rate = RATE_1_2;
  int checks = 0, failures = 0;

  timer dut (.clk, .rst_n, .rate, .lt, .pair_valid, .first, .last, .step, .step_idx, .wblk, .warm);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reset_dut();
    rst_n = 0;
    pair_valid = 0;
    step = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  task automatic pairs(input rate_t rt);
    int n = 0, per;
    rate = rt;
    reset_dut();
    per = (rt == RATE_1_4) ? 2 : (rt == RATE_1_8) ? 4 : 1;
    while (n < 100) begin
      pair_valid = ($urandom % 2) != 0;
      #1;
      if (pair_valid) begin
        checks++;
        if (first !== (n % per == 0) || last !== (n % per == per - 1)) begin
          failures++;
          $display("rate %s pair %0d: first %b last %b", rt.name(), n, first, last);
        end
        n++;
      end
      @(negedge clk);
    end
    pair_valid = 0;
  endtask

  task automatic steps(input int l);
    int n = 0;
    lt = LT_W'(l);
    reset_dut();
    while (n < 8 * l) begin
      step = ($urandom % 3) != 0;
      #1;
      checks++;
      if (step_idx !== 6'(n % l) || wblk !== 2'((n / l) % 3) || warm !== (n >= 3 * l)) begin
        failures++;
        if (failures < 8) $display("lt %0d step %0d: idx %0d wblk %0d warm %b", l, n, step_idx, wblk, warm);
      end
      if (step) n++;
      @(negedge clk);
    end
    step = 0;
  endtask

  initial begin
    pairs(RATE_1_2);
    pairs(RATE_3_4);
    pairs(RATE_1_4);
    pairs(RATE_1_8);
    steps(64);
    steps(32);
    steps(5);
    steps(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
