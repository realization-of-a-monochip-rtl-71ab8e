// tb_viterbi_decoder: random data is encoded in the testbench with the
// reference taps (punctured 110/101 at rate 3/4, pairs repeated at 1/4 and
// 1/8), sent as 3-bit soft symbols with soft noise (up to 2 levels) and a hard symbol error
// every 40 symbols, and decoded. Each rate is run with its usual
// truncation length (32, and 64 for rate 3/4) and rate 1/2 also with 64.
// Every decoded bit must equal the data bit. At rate 1/2 with a pair every
// cycle, bit k must leave exactly 3*lt + 3 cycles after the pair of bit k
// entered (one bit per clock).
module tb_viterbi_decoder;
  import vit_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_bit, sync_order, speed_valid;
  logic [2:0] in_r = 0, in_s = 0;
  logic [LT_W-1:0] lt = 7'd32;
  logic [15:0] speed;
  rate_t rate = RATE_1_2;
  int checks = 0, failures = 0;
  bit u[$];
  int in_cycle[$];
  int nout, cycle = 0;
  int max_speed;

  viterbi_decoder dut (
    .clk, .rst_n, .rate, .lt, .sync_threshold(16'hffff), .in_valid, .in_r, .in_s, .in_ready,
    .out_valid, .out_bit, .sync_order, .speed, .speed_valid);

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;

  initial begin
    #50000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit check_latency = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int idx, t_in;
    idx = nout + 3 * int'(lt);
    t_in = (idx < in_cycle.size()) ? in_cycle[idx] : 0;
    checks++;
    if (nout >= u.size() || out_bit !== u[nout]) begin
      failures++;
      if (failures < 6) $display("rate %s lt %0d bit %0d: got %b", rate.name(), lt, nout, out_bit);
    end
    if (check_latency && idx < in_cycle.size()) begin
      checks++;
      if (cycle - t_in != 3) begin
        failures++;
        if (failures < 6) $display("bit %0d latency %0d", nout, cycle - t_in);
      end
    end
    nout++;
  end
  always @(posedge clk) if (rst_n && speed_valid && int'(speed) > max_speed) max_speed = int'(speed);

  task automatic run(input rate_t rt, input int l, input int nbits, input bit gaps);
    bit h[7];
    bit pq[$][2];
    bit pbuf[$], qbuf[$];
    int reps, nsym = 0;
    rate = rt;
    lt = LT_W'(l);
    rst_n = 0;
    u.delete();
    in_cycle.delete();
    nout = 0;
    max_speed = 0;
    check_latency = (rt == RATE_1_2) && !gaps;
    for (int k = 0; k < 7; k++) h[k] = 0;
    reps = (rt == RATE_1_4) ? 2 : (rt == RATE_1_8) ? 4 : 1;
    // encode
    for (int n = 0; n < nbits; n++) begin
      bit p, q;
      u.push_back(1'($urandom % 2));
      for (int k = 6; k > 0; k--) h[k] = h[k-1];
      h[0] = u[n];
      p = ref_p(h);
      q = ref_q(h);
      if (rt == RATE_3_4) begin
        if (n % 3 != 2) pbuf.push_back(p);
        if (n % 3 != 1) qbuf.push_back(q);
        while (pbuf.size() > 0 && qbuf.size() > 0) pq.push_back('{pbuf.pop_front(), qbuf.pop_front()});
      end else
        for (int k = 0; k < reps; k++) pq.push_back('{p, q});
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (pq.size() > 0) begin
      bit a[2];
      if (gaps && ($urandom % 4) == 0) begin
        in_valid = 0;
        @(negedge clk);
        continue;
      end
      a = pq[0];
      in_valid = 1;
      in_r = soft_sym(a[0], 2);
      in_s = soft_sym(a[1], 2);
      nsym += 2;
      if (nsym % 40 == 0) in_r = 3'(7 - in_r);   // a hard error
      @(posedge clk);
      if (in_ready) begin
        void'(pq.pop_front());
        in_cycle.push_back(cycle);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (nout < nbits - 3 * l - 2) begin
      failures++;
      $display("rate %s: only %0d bits decoded of %0d", rt.name(), nout, nbits);
    end
    $display("rate %s lt %0d: %0d bits decoded, largest link speed %0d", rt.name(), l, nout, max_speed);
  endtask

  initial begin
    run(RATE_1_2, 32, 1500, 0);
    run(RATE_1_2, 64, 1500, 1);
    run(RATE_3_4, 64, 1500, 1);
    run(RATE_1_4, 32, 800, 0);
    run(RATE_1_8, 32, 600, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
