// tb_depuncturer: random soft pairs through the de-puncturer at rate 1/2
// (pass-through) and rate 3/4. At rate 3/4 the expected branches are built
// from the puncturing rule: (R, S) of an even pair is a full branch; an odd
// pair gives (R, erased) and then (erased, S). The unit must refuse input
// exactly once per two pairs taken, while it emits the third branch.
module tb_depuncturer;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [2:0] in_r = 0, in_s = 0;
  sym_pair_t out;
  rate_t rate = RATE_1_2;
  int checks = 0, failures = 0;
  sym_pair_t exp_q[$];
  int nout;

  depuncturer dut (.clk, .rst_n, .rate, .in_valid, .in_r, .in_s, .in_ready, .out_valid, .out);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    sym_pair_t e;
    nout++;
    checks++;
    if (exp_q.size() == 0) failures++;
    else begin
      e = exp_q.pop_front();
      if (out.p_era !== e.p_era || out.q_era !== e.q_era ||
          (!e.p_era && out.p !== e.p) || (!e.q_era && out.q !== e.q)) begin
        failures++;
        if (failures < 6) $display("branch %0d: got %p exp %p", nout, out, e);
      end
    end
  end

  task automatic run(input rate_t rt, input int npairs);
    int taken = 0, refused = 0;
    rate = rt;
    rst_n = 0;
    exp_q.delete();
    nout = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (taken < npairs) begin
      in_valid = ($urandom % 4) != 0;
      in_r = 3'($urandom);
      in_s = 3'($urandom);
      @(posedge clk);
      if (in_valid && !in_ready) refused++;
      if (in_valid && in_ready) begin
        if (rt != RATE_3_4 || taken % 2 == 0)
          exp_q.push_back('{p: in_r, q: in_s, p_era: 1'b0, q_era: 1'b0});
        else begin
          exp_q.push_back('{p: in_r, q: '0, p_era: 1'b0, q_era: 1'b1});
          exp_q.push_back('{p: '0, q: in_s, p_era: 1'b1, q_era: 1'b0});
        end
        taken++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (nout != ((rt == RATE_3_4) ? npairs * 3 / 2 : npairs)) begin
      failures++;
      $display("rate %s: %0d branches from %0d pairs", rt.name(), nout, npairs);
    end
    checks++;
    if (rt == RATE_1_2 && refused != 0) failures++;
  endtask

  // In rate 3/4 with input always offered, in_ready is low one cycle in three.
  task automatic ready_pattern();
    int low = 0, taken = 0;
    rate = RATE_3_4;
    rst_n = 0;
    exp_q.delete();
    repeat (2) @(negedge clk);
    rst_n = 1;
    in_valid = 1;
    for (int c = 0; c < 300; c++) begin
      @(posedge clk);
      if (!in_ready) low++;
      if (in_ready) begin
        if (taken % 2 == 0)
          exp_q.push_back('{p: in_r, q: in_s, p_era: 1'b0, q_era: 1'b0});
        else begin
          exp_q.push_back('{p: in_r, q: '0, p_era: 1'b0, q_era: 1'b1});
          exp_q.push_back('{p: '0, q: in_s, p_era: 1'b1, q_era: 1'b0});
        end
        taken++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (low != 100) begin
      failures++;
      $display("in_ready low %0d of 300 cycles", low);
    end
    rst_n = 0;
    exp_q.delete();
  endtask

  initial begin
    run(RATE_1_2, 500);
    run(RATE_3_4, 600);
    run(RATE_1_8, 200);
    @(negedge clk);
    ready_pattern();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
