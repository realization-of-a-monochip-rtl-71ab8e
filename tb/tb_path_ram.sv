// tb_path_ram: random writes and two random reads per cycle against a
// testbench copy of the memory. Reads are combinational, so a word written
// at one edge must be visible on both ports right after it.
module tb_path_ram;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr_a = 0, raddr_b = 0;
  logic [63:0] wdata = 0, rdata_a, rdata_b;
  logic [63:0] model [192];
  bit written [192];
  int checks = 0, failures = 0;

  path_ram dut (.clk, .we, .waddr, .wdata, .raddr_a, .rdata_a, .raddr_b, .rdata_b);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word once
    for (int a = 0; a < 192; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = {$urandom, $urandom};
      model[a] = wdata;
      written[a] = 1;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      raddr_a = 8'($urandom % 192);
      raddr_b = 8'($urandom % 192);
      #1;
      checks += 2;
      if (rdata_a !== model[raddr_a]) failures++;
      if (rdata_b !== model[raddr_b]) failures++;
      we = ($urandom % 2) != 0;
      waddr = 8'($urandom % 192);
      wdata = {$urandom, $urandom};
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
