// tb_puncturer: random parity pairs, with random idle cycles, through the
// puncturer. Expected streams are built from the deletion rule: of every
// three pairs P is kept in the first two and Q in the first and third.
// Every output pair is compared in order, and 3N inputs must give exactly
// 2N outputs.
module tb_puncturer;
  logic clk = 0, rst_n = 0, in_valid = 0, p = 0, q = 0, out_valid, r, s;
  int checks = 0, failures = 0;
  bit rexp[$], sexp[$];
  int nin = 0, nout = 0;

  puncturer dut (.clk, .rst_n, .in_valid, .p, .q, .out_valid, .r, .s);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    bit er, es;
    nout++;
    checks++;
    if (rexp.size() == 0 || sexp.size() == 0) failures++;
    else begin
      er = rexp.pop_front();
      es = sexp.pop_front();
      if (r !== er || s !== es) begin
        failures++;
        if (failures < 5) $display("pair %0d: got %b%b exp %b%b", nout, r, s, er, es);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (nin < 3000) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      p = 1'($urandom % 2);
      q = 1'($urandom % 2);
      if (in_valid) begin
        if (nin % 3 != 2) rexp.push_back(p);
        if (nin % 3 != 1) sexp.push_back(q);
        nin++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (nout != 2000) begin
      failures++;
      $display("outputs %0d, expected 2000", nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
