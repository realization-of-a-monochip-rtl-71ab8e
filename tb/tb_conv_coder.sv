// tb_conv_coder: the coder at each of its four rates (reset between them).
// Bits are offered every cycle; the expected output stream is built from
// the reference parity taps: (P, Q) once at rate 1/2, twice at 1/4, four
// times at 1/8, and punctured 110/101 at rate 3/4. Every output pair is
// compared in order, and the number of cycles needed to take N bits is
// checked (N, 2N, 4N; N at rate 3/4).
module tb_conv_coder;
  import vit_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0, in_ready, out_valid, out_r, out_s;
  rate_t rate = RATE_1_2;
  int checks = 0, failures = 0;
  bit rexp[$], sexp[$];
  bit h[7];
  int nout;

  conv_coder dut (.clk, .rst_n, .rate, .in_valid, .in_bit, .in_ready, .out_valid, .out_r, .out_s);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    bit er, es;
    nout++;
    checks++;
    if (rexp.size() == 0) failures++;
    else begin
      er = rexp.pop_front();
      es = sexp.pop_front();
      if (out_r !== er || out_s !== es) begin
        failures++;
        if (failures < 8) $display("rate %s out %0d: got %b%b exp %b%b", rate.name(), nout, out_r, out_s, er, es);
      end
    end
  end

  task automatic run(input rate_t rt, input int nbits);
    int taken = 0, cycles = 0, reps, exp_cycles, exp_out;
    bit pp, qq;
    bit pbuf[$], qbuf[$];
    rate = rt;
    rst_n = 0;
    rexp.delete(); sexp.delete();
    nout = 0;
    for (int k = 0; k < 7; k++) h[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    reps = (rt == RATE_1_4) ? 2 : (rt == RATE_1_8) ? 4 : 1;
    while (taken < nbits) begin
      in_valid = 1;
      in_bit = 1'($urandom % 2);
      @(posedge clk);
      cycles++;
      if (in_ready) begin
        for (int k = 6; k > 0; k--) h[k] = h[k-1];
        h[0] = in_bit;
        pp = ref_p(h);
        qq = ref_q(h);
        if (rt == RATE_3_4) begin
          if (taken % 3 != 2) pbuf.push_back(pp);
          if (taken % 3 != 1) qbuf.push_back(qq);
          while (pbuf.size() > 0 && qbuf.size() > 0) begin
            rexp.push_back(pbuf.pop_front());
            sexp.push_back(qbuf.pop_front());
          end
        end else begin
          for (int k = 0; k < reps; k++) begin
            rexp.push_back(pp);
            sexp.push_back(qq);
          end
        end
        taken++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (8) @(negedge clk);
    exp_cycles = nbits * reps - reps + 1;
    exp_out = (rt == RATE_3_4) ? (nbits / 3) * 2 : nbits * reps;
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("rate %s: %0d cycles for %0d bits, expected %0d", rt.name(), cycles, nbits, exp_cycles);
    end
    checks++;
    if (nout != exp_out || rexp.size() != 0) begin
      failures++;
      $display("rate %s: %0d outputs, expected %0d", rt.name(), nout, exp_out);
    end
  endtask

  initial begin
    run(RATE_1_2, 600);
    run(RATE_3_4, 600);
    run(RATE_1_4, 600);
    run(RATE_1_8, 600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
