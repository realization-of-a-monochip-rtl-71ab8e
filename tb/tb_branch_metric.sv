// tb_branch_metric: random soft pairs (with random erasures at rate 3/4)
// at every rate. The expected metric of codeword {c1,c0} is the sum over
// the codeword's pairs of |v - c*max| for every symbol not erased, with
// max = 7 (3-bit) or 3 (upper two bits, rate 1/8). The metrics must appear
// one cycle after the last pair, with bm_valid for exactly one cycle.
module tb_branch_metric;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, last = 0, bm_valid;
  sym_pair_t in_pair;
  bm_vec_t bm;
  rate_t rate = RATE_1_2;
  int checks = 0, failures = 0;
  int expv[4], expv_d[4];
  int expect_valid = 0, expect_d = 0;

  branch_metric dut (.clk, .rst_n, .rate, .in_valid, .in_pair, .first, .last, .bm_valid, .bm);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_dist(input int v, input bit era, input bit c, input rate_t r);
    int q, mx;
    q  = (r == RATE_1_8) ? v / 2 : v;
    mx = (r == RATE_1_8) ? 3 : 7;
    if (era) return 0;
    return c ? mx - q : q;
  endfunction

  // At each edge the outputs show what the previous edge clocked in, so
  // they are checked against the expectation of the previous cycle.
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (bm_valid !== (expect_d == 1)) begin
      failures++;
      $display("bm_valid %b expected %0d", bm_valid, expect_d);
    end
    if (expect_d == 1) begin
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(bm[c]) != expv_d[c]) begin
          failures++;
          if (failures < 8) $display("rate %s codeword %0d: %0d exp %0d", rate.name(), c, bm[c], expv_d[c]);
        end
      end
    end
    expect_d = in_valid ? expect_valid : 0;
    expv_d = expv;
  end

  task automatic run(input rate_t rt, input int ncw);
    int per;
    int acc[4];
    rate = rt;
    per = (rt == RATE_1_4) ? 2 : (rt == RATE_1_8) ? 4 : 1;
    for (int w = 0; w < ncw; w++) begin
      for (int c = 0; c < 4; c++) acc[c] = 0;
      for (int k = 0; k < per; k++) begin
        // random idle cycles between pairs
        while (($urandom % 3) == 0) begin
          in_valid = 0;
          @(negedge clk);
          expect_valid = 0;
        end
        in_valid = 1;
        first = (k == 0);
        last  = (k == per - 1);
        in_pair.p = 3'($urandom);
        in_pair.q = 3'($urandom);
        in_pair.p_era = (rt == RATE_3_4) && ($urandom % 3 == 0);
        in_pair.q_era = (rt == RATE_3_4) && !in_pair.p_era && ($urandom % 3 == 0);
        for (int c = 0; c < 4; c++)
          acc[c] += ref_dist(int'(in_pair.p), in_pair.p_era, c[1], rt) + ref_dist(int'(in_pair.q), in_pair.q_era, c[0], rt);
        if (last) for (int c = 0; c < 4; c++) expv[c] = acc[c];
        expect_valid = last ? 1 : 0;
        @(negedge clk);
        in_valid = 0;
      end
    end
    @(negedge clk);
    expect_valid = 0;
  endtask

  initial begin
    in_pair = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(RATE_1_2, 200);
    run(RATE_3_4, 200);
    run(RATE_1_4, 200);
    run(RATE_1_8, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
