// tb_codec_top: end-to-end test of the chip, coder output looped to the
// decoder input through a noisy soft-decision channel, at the default
// truncation length of 64 (and 32, the usual value for rates 1/2, 1/4,
// 1/8).
//
// Part 1, every rate in turn (reset between): random data into the coder,
// its (R, S) pairs mapped to 3-bit soft symbols with small noise and a hard
// error every 50 symbols, queued, and fed to the decoder whenever it is
// ready. Every decoded bit must equal the data bit, and no synchronisation
// order may be raised.
// Part 2, rate 1/2: the symbol stream is slipped by one symbol, so the
// decoder pairs Q(n) with P(n+1). The synchronisation device must order a
// resynchronisation; the testbench then removes the slip, as the receiver
// would, and no further order may follow.
// Part 3, rate 1/2 at three noise levels: the published speed of the
// least metric, the link-quality estimate, must rise with the noise (the
// heaviest level may cross the rate-1/2 threshold, so orders are not
// checked there).
//
// Mechanisms counted, each must occur: puncturing (fewer pairs than bits),
// repetition (coder not ready), erasure insertion, decoder input stall,
// path metric framing, synchronisation order, and each of the four rates.
module tb_codec_top;
  import vit_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  rate_t cod_rate = RATE_1_2, dec_rate = RATE_1_2;
  logic cod_in_valid = 0, cod_in_bit = 0, cod_in_ready, cod_out_valid, cod_out_r, cod_out_s;
  logic [LT_W-1:0] dec_lt = 7'd64;
  logic [15:0] sync_threshold = 16'd250, link_speed;
  logic dec_in_valid = 0, dec_in_ready, dec_out_valid, dec_out_bit, sync_order, link_speed_valid;
  logic [2:0] dec_in_r = 0, dec_in_s = 0;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_punct = 0, n_rep = 0, n_erase = 0, n_stall = 0, n_frame = 0, n_order = 0;
  int n_rate[4];

  codec_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel: coder pairs become soft symbols in a queue
  bit data[$];
  logic [2:0] chan[$];       // flat symbol stream R0 S0 R1 S1 ...
  int nsym = 0, nout = 0;
  bit errors_on = 1;
  int unsigned noise_lvl = 1;
  bit check_bits = 1;

  always @(posedge clk) if (rst_n) begin
    if (cod_in_valid && cod_in_ready) data.push_back(cod_in_bit);
    if (cod_in_valid && !cod_in_ready) n_rep++;
    if (cod_out_valid) begin
      logic [2:0] a, b;
      a = soft_sym(cod_out_r, noise_lvl);
      b = soft_sym(cod_out_s, noise_lvl);
      nsym += 2;
      if (errors_on && nsym % 50 == 0) a = 3'(7 - a);
      chan.push_back(a);
      chan.push_back(b);
    end
    if (dec_in_valid && !dec_in_ready) n_stall++;
    if (dec_out_valid) begin
      if (check_bits) begin
        checks++;
        if (nout >= data.size() || dec_out_bit !== data[nout]) begin
          failures++;
          if (failures < 6) $display("rate %s bit %0d wrong", dec_rate.name(), nout);
        end
      end
      nout++;
    end
    if (dut.u_decoder.step && dut.u_decoder.frame) n_frame++;
    if (dut.u_decoder.pair_valid && (dut.u_decoder.pair.p_era || dut.u_decoder.pair.q_era)) n_erase++;
    if (sync_order) n_order++;
  end

  // in_ready as seen at the last edge
  logic dec_in_ready_q = 0;
  always @(posedge clk) dec_in_ready_q <= dec_in_ready;

  // decoder feed: two symbols per pair from the channel queue
  always @(negedge clk) begin
    if (dec_in_valid && dec_in_ready_q) begin
      void'(chan.pop_front());
      void'(chan.pop_front());
    end
    dec_in_valid = rst_n && chan.size() >= 2;
    dec_in_r = (chan.size() >= 2) ? chan[0] : 3'd0;
    dec_in_s = (chan.size() >= 2) ? chan[1] : 3'd0;
  end

  task automatic start(input rate_t rt, input int l);
    rst_n = 0;
    cod_in_valid = 0;
    cod_rate = rt;
    dec_rate = rt;
    dec_lt = LT_W'(l);
    // thresholds found by simulation, between the in-sync and the
    // out-of-sync growth of the least metric over 128 steps
    case (rt)
      RATE_1_2: sync_threshold = 16'd250;
      RATE_3_4: sync_threshold = 16'd200;
      RATE_1_4: sync_threshold = 16'd500;
      default:  sync_threshold = 16'd200;
    endcase
    data.delete();
    chan.delete();
    nout = 0;
    nsym = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
  endtask

  task automatic run(input rate_t rt, input int l, input int nbits, input bit chk_sync = 1);
    int orders0;
    start(rt, l);
    orders0 = n_order;
    n_rate[rt]++;
    while (data.size() < nbits) begin
      cod_in_valid = 1;
      cod_in_bit = 1'($urandom % 2);
      @(negedge clk);
    end
    cod_in_valid = 0;
    repeat (200) @(negedge clk);
    checks++;
    if (nout < nbits - 3 * l - 4) begin
      failures++;
      $display("rate %s lt %0d: %0d of %0d bits decoded", rt.name(), l, nout, nbits);
    end
    if (chk_sync) checks++;
    if (chk_sync && n_order != orders0) begin
      failures++;
      $display("rate %s lt %0d: synchronisation order while in sync (speed %0d)", rt.name(), l, link_speed);
    end
    if (rt == RATE_3_4) begin
      // four symbols per three bits
      checks++;
      if (nsym > (data.size() * 4) / 3 + 2 || nsym < (data.size() * 4) / 3 - 2) failures++;
      if (nsym < data.size() * 2) n_punct++;
    end
    $display("rate %s lt %0d: %0d bits decoded, last link speed %0d", rt.name(), l, nout, link_speed);
  endtask

  // Slipped stream: one symbol is dropped, then restored after the order.
  task automatic slip_test(input int l);
    int after, base;
    start(RATE_1_2, l);
    base = n_order;
    check_bits = 0;
    errors_on = 0;
    n_rate[RATE_1_2]++;
    // let the coder start, then drop one symbol
    while (chan.size() < 4) begin
      cod_in_valid = 1;
      cod_in_bit = 1'($urandom % 2);
      @(negedge clk);
    end
    void'(chan.pop_front());
    begin : find_order
      for (int c = 0; c < 4000; c++) begin
        cod_in_valid = 1;
        cod_in_bit = 1'($urandom % 2);
        @(negedge clk);
        if (n_order > base) disable find_order;
      end
    end
    checks++;
    if (n_order == base) begin
      failures++;
      $display("slipped stream: no synchronisation order");
    end else $display("slipped stream: order after %0d bits, speed %0d", data.size(), link_speed);
    // the receiver slips back by dropping one more symbol
    void'(chan.pop_front());
    after = n_order;
    // one window may still straddle the slip
    repeat (300) begin
      cod_in_valid = 1;
      cod_in_bit = 1'($urandom % 2);
      @(negedge clk);
    end
    after = n_order;
    repeat (1500) begin
      cod_in_valid = 1;
      cod_in_bit = 1'($urandom % 2);
      @(negedge clk);
    end
    cod_in_valid = 0;
    checks++;
    if (n_order != after) begin
      failures++;
      $display("order after resynchronisation");
    end
    check_bits = 1;
    errors_on = 1;
  endtask

  // Link quality: the published speed must rise with the channel noise.
  task automatic quality_test();
    int sp[3];
    errors_on = 0;
    for (int nl = 0; nl < 3; nl++) begin
      noise_lvl = nl;
      run(RATE_1_2, 64, 700, 0);
      sp[nl] = int'(link_speed);
    end
    noise_lvl = 1;
    errors_on = 1;
    checks++;
    if (!(sp[0] < sp[1] && sp[1] < sp[2])) begin
      failures++;
      $display("link speed does not follow the noise: %0d %0d %0d", sp[0], sp[1], sp[2]);
    end else $display("link speed at noise 0, 1, 2: %0d %0d %0d", sp[0], sp[1], sp[2]);
  endtask

  initial begin
    for (int r = 0; r < 4; r++) n_rate[r] = 0;
    run(RATE_1_2, 64, 1200);
    run(RATE_3_4, 64, 1500);
    run(RATE_1_4, 64, 800);
    run(RATE_1_8, 64, 600);
    run(RATE_1_2, 32, 800);
    run(RATE_1_4, 32, 500);
    run(RATE_1_8, 32, 400);
    quality_test();
    slip_test(64);
    $display("mechanisms: puncturing %0d, repetition %0d, erasures %0d, stalls %0d, framing %0d, sync orders %0d",
             n_punct, n_rep, n_erase, n_stall, n_frame, n_order);
    $display("rates run: 1/2 %0d, 3/4 %0d, 1/4 %0d, 1/8 %0d", n_rate[0], n_rate[1], n_rate[2], n_rate[3]);
    checks++; if (n_punct == 0) failures++;
    checks++; if (n_rep == 0) failures++;
    checks++; if (n_erase == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_frame == 0) failures++;
    checks++; if (n_order == 0) failures++;
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (n_rate[r] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
