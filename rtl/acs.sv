// acs: one Addition-Comparison-Selection module, processing one butterfly
// of the trellis (states i and i+32 at time n to states 2i and 2i+1 at
// time n+1):
//   M(2i,  n+1) = MIN(M(i,n) + d0, M(i+32,n) + d1)
//   M(2i+1,n+1) = MIN(M(i,n) + d1, M(i+32,n) + d0)
// The decision of a new state is 0 when its survivor comes from state i and
// 1 when it comes from state i+32, as in the document. On a tie the path
// from state i is kept (this design's choice).
//
// Framing: when frame is high (every path metric of the decoder is at
// least 32) 224 is added modulo 256 to both incoming metrics, which is
// subtracting 32, before the additions. Sums saturate at 255 (FFh), the
// all-one byte the document names.
//
// Purely combinational; the path metric unit registers the results.
module acs
  import vit_pkg::*;
(
  input  logic [PM_W-1:0] m_lo,     // M(i, n)
  input  logic [PM_W-1:0] m_hi,     // M(i+32, n)
  input  logic [BM_W-1:0] d0,
  input  logic [BM_W-1:0] d1,
  input  logic            frame,
  output logic [PM_W-1:0] m_even,   // M(2i, n+1)
  output logic [PM_W-1:0] m_odd,    // M(2i+1, n+1)
  output logic            dec_even,
  output logic            dec_odd
);
  localparam logic [PM_W-1:0] FRAME_ADD = PM_W'(256 - FRAME_TH);   // 224

  function automatic logic [PM_W-1:0] sat_add(input logic [PM_W-1:0] a,
                                              input logic [BM_W-1:0] b);
    logic [PM_W:0] s;
    s = {1'b0, a} + (PM_W+1)'(b);
    sat_add = s[PM_W] ? '1 : s[PM_W-1:0];
  endfunction

  logic [PM_W-1:0] a, b, lo0, lo1, hi0, hi1;

  always_comb begin
    a   = frame ? m_lo + FRAME_ADD : m_lo;
    b   = frame ? m_hi + FRAME_ADD : m_hi;
    lo0 = sat_add(a, d0);
    lo1 = sat_add(a, d1);
    hi0 = sat_add(b, d0);
    hi1 = sat_add(b, d1);
    dec_even = (hi1 < lo0);
    dec_odd  = (hi0 < lo1);
    m_even   = dec_even ? hi1 : lo0;
    m_odd    = dec_odd  ? hi0 : lo1;
  end
endmodule
