// tb_reverse_buffer: blocks of bits written last-first at their offsets,
// two per cycle as the traceback does, must read back in offset order from
// the other bank during the following period while the next block is
// written.
module tb_reverse_buffer;
  logic clk = 0, wbank = 0, we0 = 0, we1 = 0, wd0 = 0, wd1 = 0, rd;
  logic [5:0] wa0 = 0, wa1 = 0, ra = 0;
  bit blk [2][64];
  int checks = 0, failures = 0;

  reverse_buffer dut (.clk, .wbank, .we0, .wa0, .wd0, .we1, .wa1, .wd1, .ra, .rd);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int period = 0; period < 20; period++) begin
      for (int k = 0; k < 64; k++) blk[period % 2][k] = 1'($urandom % 2);
      for (int j = 0; j < 32; j++) begin
        @(negedge clk);
        wbank = 1'(period % 2);
        we0 = 1; wa0 = 6'(63 - 2 * j);     wd0 = blk[period % 2][63 - 2 * j];
        we1 = 1; wa1 = 6'(62 - 2 * j);     wd1 = blk[period % 2][62 - 2 * j];
        ra = 6'(2 * j);
        #1;
        if (period > 0) begin
          checks++;
          if (rd !== blk[(period + 1) % 2][2 * j]) failures++;
        end
        ra = 6'(2 * j + 1);
        #1;
        if (period > 0) begin
          checks++;
          if (rd !== blk[(period + 1) % 2][2 * j + 1]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
