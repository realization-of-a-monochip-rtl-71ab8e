// tb_path_metric_unit: random branch metric vectors (0..28) drive the path
// metric unit for many steps, with random idle cycles. A reference trellis
// in the testbench, built from the reference parity taps, keeps unbounded
// integer metrics and the framing offset (32 more whenever every metric,
// less the offset, is 32 or more). Every decision word, the least metric
// and the framing flag are compared, and framing must have happened.
module tb_path_metric_unit;
  import vit_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, step = 0, frame;
  bm_vec_t bm;
  logic [63:0] decisions;
  logic [7:0] min_metric;
  int checks = 0, failures = 0, frames = 0;
  longint m [64];
  longint off = 0;

  path_metric_unit dut (.clk, .rst_n, .step, .bm, .decisions, .frame, .min_metric);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cw(input int s, input bit b);
    bit h[7];
    h[0] = b;
    for (int k = 1; k < 7; k++) h[k] = s[k-1];
    return {ref_p(h), ref_q(h)};
  endfunction

  initial begin
    longint nm [64];
    logic [63:0] edec;
    longint mn;
    bit efr;
    for (int s = 0; s < 64; s++) m[s] = 0;
    for (int c = 0; c < 4; c++) bm[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      step = ($urandom % 5) != 0;
      for (int c = 0; c < 4; c++) bm[c] = 5'($urandom % 29);
      // reference
      efr = 1;
      mn = m[0];
      for (int s = 0; s < 64; s++) begin
        if (m[s] - off < 32) efr = 0;
        if (m[s] < mn) mn = m[s];
      end
      for (int ns = 0; ns < 64; ns++) begin
        longint c0, c1;
        int i;
        bit b;
        i = ns / 2;
        b = ns[0];
        c0 = m[i]      + bm[cw(i, b)];
        c1 = m[i + 32] + bm[cw(i + 32, b)];
        edec[ns] = (c1 < c0);
        nm[ns] = (c1 < c0) ? c1 : c0;
      end
      #1;
      checks += 3;
      if (decisions !== edec) begin
        failures++;
        if (failures < 5) $display("step %0d decisions %h exp %h", n, decisions, edec);
      end
      if (longint'(min_metric) != mn - off) begin
        failures++;
        if (failures < 5) $display("step %0d min %0d exp %0d", n, min_metric, mn - off);
      end
      if (frame !== efr) failures++;
      if (step) begin
        if (efr) begin
          off += 32;
          frames++;
        end
        for (int s = 0; s < 64; s++) m[s] = nm[s];
      end
    end
    checks++;
    if (frames == 0) begin
      failures++;
      $display("framing never happened");
    end
    $display("framing events: %0d", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
