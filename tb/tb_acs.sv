// tb_acs: random metrics and branch metrics, with and without framing,
// into one ACS module. Expected values are worked out with integers:
// subtract 32 when framing, add, clip at 255, keep the smaller sum (the
// path from state i on a tie) and report 1 when the path from i+32 wins.
// Corner cases (ties, saturation) are included.
module tb_acs;
  logic [7:0] m_lo, m_hi, m_even, m_odd;
  logic [4:0] d0, d1;
  logic frame, dec_even, dec_odd;
  int checks = 0, failures = 0;

  acs dut (.m_lo, .m_hi, .d0, .d1, .frame, .m_even, .m_odd, .dec_even, .dec_odd);

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input int v);
    return (v > 255) ? 255 : v;
  endfunction

  task automatic check_one();
    int a, b, e0, e1, o0, o1, ee, eo;
    bit de, dd;
    a = int'(m_lo) - (frame ? 32 : 0);
    b = int'(m_hi) - (frame ? 32 : 0);
    if (a < 0) a += 256;
    if (b < 0) b += 256;
    e0 = clip(a + int'(d0));   // i -> 2i
    e1 = clip(b + int'(d1));   // i+32 -> 2i
    o0 = clip(a + int'(d1));   // i -> 2i+1
    o1 = clip(b + int'(d0));   // i+32 -> 2i+1
    de = (e1 < e0);
    dd = (o1 < o0);
    ee = de ? e1 : e0;
    eo = dd ? o1 : o0;
    #1;
    checks++;
    if (int'(m_even) != ee || int'(m_odd) != eo || dec_even !== de || dec_odd !== dd) begin
      failures++;
      if (failures < 6)
        $display("lo %0d hi %0d d0 %0d d1 %0d f %b: got %0d/%b %0d/%b exp %0d/%b %0d/%b",
                 m_lo, m_hi, d0, d1, frame, m_even, dec_even, m_odd, dec_odd, ee, de, eo, dd);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      frame = ($urandom % 4) == 0;
      m_lo = frame ? 8'(32 + $urandom % 200) : 8'($urandom % 230);
      m_hi = frame ? 8'(32 + $urandom % 200) : 8'($urandom % 230);
      d0 = 5'($urandom % 29);
      d1 = 5'($urandom % 29);
      check_one();
    end
    // ties and saturation
    frame = 0; m_lo = 8'd10; m_hi = 8'd10; d0 = 5'd3; d1 = 5'd3; check_one();
    frame = 0; m_lo = 8'd250; m_hi = 8'd240; d0 = 5'd20; d1 = 5'd28; check_one();
    frame = 0; m_lo = 8'd255; m_hi = 8'd255; d0 = 5'd1; d1 = 5'd0; check_one();
    frame = 1; m_lo = 8'd32; m_hi = 8'd40; d0 = 5'd0; d1 = 5'd0; check_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
