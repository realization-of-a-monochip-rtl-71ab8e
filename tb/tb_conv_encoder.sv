// tb_conv_encoder: random bits, with random idle cycles, through the
// encoder. Each (P, Q) is compared with the parity the reference taps give
// for the current bit and the six stored bits, and the state with those
// six bits (newest in bit 0).
module tb_conv_encoder;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, d = 0, p, q;
  logic [5:0] state;
  int checks = 0, failures = 0;
  bit hist[6];     // hist[0] newest stored bit
  bit h[7];

  conv_encoder dut (.clk, .rst_n, .en, .d, .p, .q, .state);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 6; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      d  = 1'($urandom % 2);
      #1;
      h[0] = d;
      for (int k = 1; k < 7; k++) h[k] = hist[k-1];
      checks++;
      if (p !== ref_p(h) || q !== ref_q(h)) begin
        failures++;
        if (failures < 5) $display("mismatch n=%0d p=%b q=%b exp %b %b", n, p, q, ref_p(h), ref_q(h));
      end
      checks++;
      if (state !== {hist[5], hist[4], hist[3], hist[2], hist[1], hist[0]}) failures++;
      if (en) begin
        for (int k = 5; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = d;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
