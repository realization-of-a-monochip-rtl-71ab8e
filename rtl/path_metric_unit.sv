// path_metric_unit: the path metric computer, 64 one-byte path metrics
// extended by one trellis branch per step by 32 ACS modules in parallel.
//
// ACS module i handles states i and i+32. Its branch metric d0 is the
// metric of the codeword the coder sends going from state i to state 2i
// (input bit 0), and d1 that of the complementary codeword, which is what
// both the i -> 2i+1 and the i+32 -> 2i branches send because both
// polynomials tap the newest and the oldest bit. The 64 decisions form the
// decision word (bit s for new state s) handed to the path storage RAM.
//
// Framing: frame is high when all 64 stored metrics are 32 or more; the ACS
// modules then subtract 32 as they extend the paths, so the least metric
// stays below 64 and the spread, bounded by 6 times the largest branch
// metric (at most 168), fits the byte.
//
// Timing: on a clock with step high the 64 metrics are replaced by the new
// ones; decisions is valid in that same cycle (combinational from the
// stored metrics and bm). min_metric is the least stored metric, for the
// synchronisation device. Reset starts every state at metric 0 (the
// starting state is not known), this design's choice.
module path_metric_unit
  import vit_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  step,
  input  bm_vec_t               bm,
  output logic [NSTATE-1:0]     decisions,
  output logic                  frame,
  output logic [PM_W-1:0]       min_metric
);
  logic [PM_W-1:0] pm     [NSTATE];
  logic [PM_W-1:0] pm_nxt [NSTATE];

  // Framing flag: every metric has one of its upper three bits set.
  always_comb begin
    frame = 1'b1;
    for (int s = 0; s < NSTATE; s++)
      if (pm[s] < PM_W'(FRAME_TH)) frame = 1'b0;
  end

  always_comb begin
    min_metric = pm[0];
    for (int s = 1; s < NSTATE; s++)
      if (pm[s] < min_metric) min_metric = pm[s];
  end

  for (genvar i = 0; i < NACS; i++) begin : g_acs
    localparam logic [1:0] C0 = code_out(6'(i), 1'b0);
    acs u_acs (
      .m_lo    (pm[i]),
      .m_hi    (pm[i+NACS]),
      .d0      (bm[C0]),
      .d1      (bm[~C0]),
      .frame   (frame),
      .m_even  (pm_nxt[2*i]),
      .m_odd   (pm_nxt[2*i+1]),
      .dec_even(decisions[2*i]),
      .dec_odd (decisions[2*i+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTATE; s++) pm[s] <= '0;
    end else if (step) begin
      for (int s = 0; s < NSTATE; s++) pm[s] <= pm_nxt[s];
    end
  end
endmodule
